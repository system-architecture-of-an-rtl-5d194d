// Testbench of dsp_engine enlarged to P = 16 modules: the multirate 8-point
// DCT, which needs two modules per coefficient and so does not fit the
// default 12-module engine.
//
// The testbench plays the host.  Module 2k computes coefficient k from the
// even samples and module 2k+1 from the odd samples: both rotate by 4 omega_k
// per step (omega_k = k pi/16), with scaling factors
// beta_k cos/sin((2L + 2l + 1) omega_k), l = 0 (even) or 1 (odd), L = 8.  The
// network (Type V, multirate) adds the two halves.  Four back-to-back blocks
// of eight samples, one sample per clock, are checked against the DCT-II
// definition X(k) = beta_k sum_n x(n) cos((2n+1) k pi/16), beta_0 = sqrt(1/8),
// beta_k = sqrt(2/8).  It also checks that x_valid rises exactly on the last
// sample of each block and that the array steps once per two samples.
module tb_dsp_engine_p16;
  import dsp_pkg::*;

  localparam int  P  = 16;
  localparam int  NP = 8;              // transform size
  localparam real SC = real'(1 << CFRAC);
  localparam real PI = 3.14159265358979;

  logic        clk = 0, rst_n = 1;
  logic        cfg_we = 0, net_we = 0, eng_we = 0, sync = 0, in_valid = 0;
  logic [7:0]  cfg_addr = 0;
  module_cfg_t cfg_data;
  net_cfg_t    net_data;
  eng_cfg_t    eng_data;
  sample_t     x_in;
  logic        y_valid, ys_valid, x_valid;
  sample_t     y [3], ys, xa [P], xb [P];
  int          checks = 0, failures = 0, steps = 0;

  dsp_engine #(.P(P)) dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .net_we(net_we), .net_data(net_data), .eng_we(eng_we), .eng_data(eng_data),
    .sync(sync), .in_valid(in_valid), .x_in(x_in),
    .y_valid(y_valid), .y(y), .ys_valid(ys_valid), .ys(ys),
    .x_valid(x_valid), .xa(xa), .xb(xb)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dut.pe_en) steps++;

  function automatic coef_t cq(input real v);
    return coef_t'($rtoi(v * SC + (v < 0.0 ? -0.5 : 0.5)));
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    module_cfg_t m;
    sample_t     xs [NP];
    real         om, beta, e, tol, sumabs;
    int          steps0;
    cfg_data = '0; net_data = '0; eng_data = '0; x_in = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    @(negedge clk);
    // initialization: 16 modules, switches 0000110 (feedback loops closed)
    for (int k = 0; k < NP; k++) begin
      om   = real'(k) * PI / (2.0 * real'(NP));
      beta = (k == 0) ? $sqrt(1.0 / real'(NP)) : $sqrt(2.0 / real'(NP));
      for (int l = 0; l < 2; l++) begin
        m = '0;
        m.sw.s4 = 1; m.sw.s5 = 1;
        m.f0 = cq(beta * $cos((2.0 * real'(NP) + 2.0 * real'(l) + 1.0) * om));
        m.f1 = cq(beta * $sin((2.0 * real'(NP) + 2.0 * real'(l) + 1.0) * om));
        m.r  = cq(1.0);
        m.c  = cq($cos(4.0 * om));
        m.s  = cq($sin(4.0 * om));
        cfg_we = 1; cfg_addr = 8'(2*k + l); cfg_data = m;
        @(negedge clk);
      end
    end
    cfg_we = 0;
    net_data.ntype = NET_V; net_data.order = 8'(NP); net_data.multirate = 1;
    eng_data.in_mode = IN_BLOCK; eng_data.blk_len = 8'(NP / 2);
    net_we = 1; eng_we = 1;
    @(negedge clk);
    net_we = 0; eng_we = 0;
    sync = 1;
    @(negedge clk);
    sync = 0;
    // execution: four blocks back to back
    steps0 = steps;
    for (int b = 0; b < 4; b++) begin
      sumabs = 0.0;
      for (int n = 0; n < NP; n++) begin
        xs[n] = sample_t'($urandom_range(0, 8000)) - sample_t'(4000);
        sumabs += absr(real'(xs[n]));
      end
      for (int n = 0; n < NP; n++) begin
        in_valid = 1; x_in = xs[n];
        @(negedge clk);
        checks++;
        if (x_valid !== (n == NP - 1)) begin
          failures++; $display("FAIL x_valid timing, block %0d sample %0d", b, n);
        end
      end
      tol = 0.002 * sumabs + 16.0;
      for (int k = 0; k < NP; k++) begin
        e = 0.0;
        for (int n = 0; n < NP; n++)
          e += $cos(real'(2*n + 1) * real'(k) * PI / (2.0 * real'(NP))) * real'(xs[n]);
        e *= (k == 0) ? $sqrt(1.0 / real'(NP)) : $sqrt(2.0 / real'(NP));
        checks++;
        if (absr(real'(xa[k]) - e) > tol) begin
          failures++;
          $display("FAIL block %0d X(%0d): got %0d expected %f", b, k, xa[k], e);
        end
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (steps - steps0 != 16) begin   // 32 samples -> 16 array steps
      failures++; $display("FAIL %0d array steps for 32 samples", steps - steps0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
