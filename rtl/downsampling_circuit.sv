// Downsampling circuit: turns the full-rate host stream into the half-rate
// streams of the multirate modes, so the module array steps once per two
// input samples.
//
// Samples arrive one per clock at most (in_valid).  A phase bit pairs them;
// on the second sample of each pair `step` is high for that cycle and xs[]
// holds the streams for the array (combinational from the held first sample,
// the current sample and two registers):
//   IN_FFA   (three-filter multirate FIR/IIR):  with a(k) = x(2k), b(k) = x(2k-1)
//            x_0 = a(k) - b(k),  x_1 = b(k),  x_2 = a(k-1) - b(k)
//            feeding H_0, H_0 + H_1 and H_1 respectively
//   IN_POLY  x_0 = x(2k), x_1 = -x(2k-1)         (polyphase pair, QMF analysis)
//   IN_BLOCK x_0 = x(2m), x_1 = x(2m+1)          (even/odd pair of a transform block)
//            (also the two subband samples v1(k), v0(k) of a QMF synthesis bank)
// The negated delayed branch of IN_POLY is the analysis-bank input of the
// two-channel paraunitary QMF lattice.
// The three-stream structure (decimators, input delay, one adder per outer
// branch, middle branch unmodified) follows the multirate filtering drawing;
// the signs are this design's, chosen so that the matching upsampling circuit
// reproduces y = H x exactly.  `sync` restarts the pairing (start of a block)
// and clears the history registers.  rst_n: asynchronous, active low.
module downsampling_circuit
  import dsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  in_mode_e mode,
  input  logic     sync,      // restart pairing; the sample with in_valid starts a pair
  input  logic     in_valid,
  input  sample_t  x_in,
  output logic     step,      // a pair is complete: step the module array
  output sample_t  xs [3]
);

  logic    phase;      // 1: the first sample of a pair is held
  sample_t first;      // x(2k)
  sample_t b_hold;     // x(2k-1) = second sample of the previous pair
  sample_t a_hold;     // x(2k-2) = first sample of the previous pair

  logic ph;
  assign ph   = sync ? 1'b0 : phase;
  assign step = in_valid && ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= 1'b0;
      first  <= '0;
      b_hold <= '0;
      a_hold <= '0;
    end else begin
      if (sync && !in_valid) phase <= 1'b0;
      if (sync) begin
        b_hold <= '0;
        a_hold <= '0;
      end
      if (in_valid) begin
        phase <= !ph;
        if (!ph) begin
          first <= x_in;
        end else begin
          b_hold <= x_in;
          a_hold <= first;
        end
      end
    end
  end

  always_comb begin
    xs[0] = '0;
    xs[1] = '0;
    xs[2] = '0;
    unique case (mode)
      IN_FFA: begin
        xs[0] = first - b_hold;
        xs[1] = b_hold;
        xs[2] = a_hold - b_hold;
      end
      IN_POLY: begin
        xs[0] = first;
        xs[1] = -b_hold;
      end
      IN_BLOCK: begin
        xs[0] = first;
        xs[1] = x_in;
      end
      default: begin
        xs[0] = x_in;
        xs[1] = x_in;
        xs[2] = x_in;
      end
    endcase
  end

endmodule
