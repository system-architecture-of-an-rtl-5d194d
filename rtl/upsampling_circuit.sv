// Upsampling circuit: rebuilds the full-rate output of a multirate FIR or
// IIR filter from the three half-rate subfilter outputs.
//
// When y_valid is high, y[0], y[1], y[2] are the outputs of H_0, H_0 + H_1
// and H_1 for one pair of input samples.  Two output samples are formed:
//   y(2k-1) = y[2] + y[1]      (emitted first)
//   y(2k)   = y[0] + y[1]      (emitted on the next clock)
// and sent out serially, one per clock, on ys/ys_valid, which restores the
// input sample rate.  The two adders, the interleaving upsamplers and the
// output delay follow the multirate filtering drawing; the exact order of the
// two samples matches the downsampling circuit of this design.  y_valid may
// be high at most every second clock (it is, as the array steps once per two
// input samples).  rst_n: asynchronous, active low.
module upsampling_circuit
  import dsp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    y_valid,
  input  sample_t y [3],
  output logic    ys_valid,
  output sample_t ys
);

  sample_t top, bottom, pend;
  logic    pend_v;

  always_comb begin
    top    = y[0] + y[1];
    bottom = y[2] + y[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ys       <= '0;
      ys_valid <= 1'b0;
      pend     <= '0;
      pend_v   <= 1'b0;
    end else if (y_valid) begin
      ys       <= bottom;
      ys_valid <= 1'b1;
      pend     <= top;
      pend_v   <= 1'b1;
    end else begin
      ys       <= pend;
      ys_valid <= pend_v;
      pend_v   <= 1'b0;
    end
  end

endmodule
