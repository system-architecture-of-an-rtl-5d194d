// Rotation circuit of the unified programmable module, built from four
// multipliers and two adders.
//
// It applies a programmable 2x2 rotation to the vector (a, b):
//   circular   (hyp = 0):  y0 =  c*a + s*b,   y1 = -s*a + c*b
//   hyperbolic (hyp = 1):  y0 =  c*a + s*b,   y1 =  s*a + c*b
// with c = cos(theta), s = sin(theta) in the circular case (QMF, IIR, DT)
// and c = cosh(theta), s = sinh(theta) in the hyperbolic case (FIR lattice).
// The circular form and the multiplier arrangement follow the module drawing
// of the architecture; merging both forms into one circuit with a sign
// select on the lower-left coefficient is this design's choice (the text
// allows either multipliers or a CORDIC in hyperbolic mode for FIR).
//
// Each output is the sum of two full-precision products, rounded once to a
// DW-bit sample (CFRAC fraction bits dropped, round to nearest, wrap on
// overflow).  Purely combinational: no clock, zero latency.
module rotation_circuit
  import dsp_pkg::*;
(
  input  sample_t a,    // upper input
  input  sample_t b,    // lower input
  input  coef_t   c,    // cos / cosh coefficient
  input  coef_t   s,    // sin / sinh coefficient
  input  logic    hyp,  // 1 = hyperbolic, 0 = circular
  output sample_t y0,   // upper output
  output sample_t y1    // lower output
);

  localparam int PW = DW + CW + 1;

  logic signed [PW-1:0] ae, be, ce, se, s_low;
  logic signed [PW-1:0] acc0, acc1;

  always_comb begin
    ae    = PW'(a);
    be    = PW'(b);
    ce    = PW'(c);
    se    = PW'(s);
    s_low = hyp ? se : -se;
    acc0  = ce * ae + se * be + PW'(1 <<< (CFRAC-1));
    acc1  = s_low * ae + ce * be + PW'(1 <<< (CFRAC-1));
    y0    = sample_t'(acc0 >>> CFRAC);
    y1    = sample_t'(acc1 >>> CFRAC);
  end

endmodule
