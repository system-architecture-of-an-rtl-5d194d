// Reconfigurable rotation-based DSP computing engine (top level).
//
// An array of P identical programmable modules and one reconfigurable
// interconnection network.  By loading each module's switches, scaling
// multipliers, output multiplier and rotation coefficients, and choosing one
// of nine network types, the same hardware runs lattice FIR, two-channel QMF
// lattice, cascaded second-order IIR (ARMA), time-recursive discrete
// transforms (DCT/DST, MLT, DFT, DHT), their multirate versions with twice the
// sample rate per module step, and the QRD-LSL adaptive lattice.
//
// Initialization mode: the host writes module i's parameter set with
// cfg_we/cfg_addr/cfg_data, the network setting with net_we/net_data and the
// engine setting (input mode, transform block length) with eng_we/eng_data.
// Execution mode: the host offers one sample per clock at most (in_valid,
// x_in).  In IN_DIRECT mode every sample steps the array once; in the
// multirate modes the downsampling circuit pairs samples and the array steps
// once per pair, i.e. the modules run at half the sample rate.
//
// Outputs:
//   y_valid, y[0..2]  network filter outputs, valid the clock after a step
//                     (y[0] = y(n) for FIR/IIR; y[0], y[1] = two QMF subbands
//                     or f(n), b(n) of QRD-LSL; y[0..2] = subfilter outputs
//                     in the multirate modes)
//   ys_valid, ys      full-rate output rebuilt by the upsampling circuit (IN_FFA)
//   x_valid, xa, xb   transform coefficients, valid the clock after the last
//                     step of a block (xb = imaginary part of a DFT)
// Each module adds one step of latency: a module's output is readable right
// after the step that took its input, and the next module takes it at the
// following step.  An order-N cascade (Type I) therefore shows y(n) after the
// (N-1)-th step following the one that took x(n); in IN_DIRECT mode every
// step is one clock.
//
// The block counter is this design's stand-in for the host clearing the
// module registers between transform blocks: when eng.blk_len is non-zero the
// first step of each block loads zero into every feedback register, so
// blocks follow each other without a gap.  `sync` restarts the block counter
// and the sample pairing.  All state resets asynchronously with rst_n
// (active low) to zero, which leaves the network at an unused type until the
// host configures it.
module dsp_engine
  import dsp_pkg::*;
#(
  parameter int P = 12  // number of programmable modules
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // initialization
  input  logic                 cfg_we,
  input  logic [7:0]           cfg_addr,
  input  module_cfg_t          cfg_data,
  input  logic                 net_we,
  input  net_cfg_t             net_data,
  input  logic                 eng_we,
  input  eng_cfg_t             eng_data,
  // execution
  input  logic                 sync,
  input  logic                 in_valid,
  input  sample_t              x_in,
  output logic                 y_valid,
  output sample_t              y [3],
  output logic                 ys_valid,
  output sample_t              ys,
  output logic                 x_valid,
  output sample_t              xa [P],
  output sample_t              xb [P]
);

  module_cfg_t mcfg [P];
  net_cfg_t    ncfg;
  eng_cfg_t    ecfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) mcfg[i] <= '0;
      ncfg <= '0;
      ecfg <= '0;
    end else begin
      for (int i = 0; i < P; i++)
        if (cfg_we && cfg_addr == 8'(i)) mcfg[i] <= cfg_data;
      if (net_we) ncfg <= net_data;
      if (eng_we) ecfg <= eng_data;
    end
  end

  // ---------------------------------------------------------------- input side
  sample_t ds_x [3];
  logic    ds_step;
  logic    pe_en;
  sample_t net_x [3];

  downsampling_circuit u_down (
    .clk     (clk),
    .rst_n   (rst_n),
    .mode    (ecfg.in_mode),
    .sync    (sync),
    .in_valid(in_valid),
    .x_in    (x_in),
    .step    (ds_step),
    .xs      (ds_x)
  );

  always_comb begin
    pe_en    = (ecfg.in_mode == IN_DIRECT) ? in_valid : ds_step;
    net_x[0] = ds_x[0];
    net_x[1] = ds_x[1];
    net_x[2] = ds_x[2];
  end

  // ------------------------------------------------------------ block control
  logic [7:0] blk_cnt, blk_idx;
  logic       clr;

  always_comb begin
    blk_idx = sync ? 8'd0 : blk_cnt;
    clr     = (ecfg.blk_len != 8'd0) && (blk_idx == 8'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_cnt <= '0;
      x_valid <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= pe_en;
      x_valid <= pe_en && (ecfg.blk_len != 8'd0) && (blk_idx == ecfg.blk_len - 8'd1);
      if (sync && !pe_en) blk_cnt <= '0;
      else if (pe_en) blk_cnt <= (blk_idx == ecfg.blk_len - 8'd1) ? 8'd0 : blk_idx + 8'd1;
    end
  end

  // ----------------------------------------------------- programmable modules
  sample_t ins [P], ins_p [P], outs [P], outs_p [P];
  mu_t     mu_ins [P], mu_outs [P];

  for (genvar i = 0; i < P; i++) begin : g_pe
    programmable_module u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (pe_en),
      .clr   (clr),
      .cfg   (mcfg[i]),
      .in_i  (ins[i]),
      .in_p  (ins_p[i]),
      .mu_in (mu_ins[i]),
      .out_i (outs[i]),
      .out_p (outs_p[i]),
      .mu_out(mu_outs[i])
    );
  end

  interconnection_network #(.P(P)) u_net (
    .cfg    (ncfg),
    .x      (net_x),
    .outs   (outs),
    .outs_p (outs_p),
    .mu_outs(mu_outs),
    .ins    (ins),
    .ins_p  (ins_p),
    .mu_ins (mu_ins),
    .y      (y),
    .xa     (xa),
    .xb     (xb)
  );

  // ---------------------------------------------------------- output side
  upsampling_circuit u_up (
    .clk     (clk),
    .rst_n   (rst_n),
    .y_valid (y_valid && ecfg.in_mode == IN_FFA),
    .y       (y),
    .ys_valid(ys_valid),
    .ys      (ys)
  );

endmodule
