// CORDIC processor (circular), the rotation kernel of the QRD-LSL module.
//
// Two operating modes, as the architecture defines them:
//  * angle accumulation mode (mode = CORDIC_VECTOR): the vector (x, y) is
//    rotated until y is annihilated; the direction taken at every iteration
//    is emitted as mu_out, so x_out = |(x, y)| and y_out ~ 0.
//  * vector rotation mode (mode = CORDIC_ROTATE): (x, y) is rotated through
//    the micro-rotation directions given by mu_in (for example the mu_out of
//    an angle computer), i.e. by the same angle; mu_out repeats mu_in.
// Bit i of mu is the direction of iteration i: 1 = counter-clockwise
// (x -= y>>i, y += x>>i), 0 = clockwise.  mu is carried as one parallel word
// per sample rather than a serial sequence (this design's choice).
//
// The CORDIC gain K = prod sqrt(1 + 2^-2i) is removed inside by one constant
// multiplication by 1/K (this design's choice; the text leaves gain handling
// open), so the outputs have the scale of the inputs.  In angle accumulation
// mode x must be >= 0 or the vector angle within +/-99 degrees (true for the
// non-negative energy terms of QRD-LSL).
//
// The W iterations are unrolled and purely combinational: one complete CORDIC
// operation per sample, matching the throughput 1/(T_CORDIC + T_MAC) the
// architecture quotes for a CORDIC-based module.  INV_K is 1/K for the default
// 16 iterations in CFRAC fixed point (K has converged to 1e-6 after 10).
module cordic_processor
  import dsp_pkg::*;
#(
  parameter int W     = CORDIC_W,
  parameter int GUARD = 4,                              // extra fraction bits
  parameter logic signed [CW-1:0] INV_K = CW'(39797)    // round(0.6072529 * 2^CFRAC)
) (
  input  cordic_mode_e mode,
  input  sample_t      x_in,
  input  sample_t      y_in,
  input  logic [W-1:0] mu_in,
  output sample_t      x_out,
  output sample_t      y_out,
  output logic [W-1:0] mu_out
);

  localparam int IW = DW + 2 + GUARD;  // internal width: gain headroom + guard

  logic signed [IW-1:0] xs [0:W];
  logic signed [IW-1:0] ys [0:W];
  logic [W-1:0]         dir;

  always_comb begin
    xs[0] = IW'(x_in) <<< GUARD;
    ys[0] = IW'(y_in) <<< GUARD;
    for (int i = 0; i < W; i++) begin
      if (mode == CORDIC_VECTOR) dir[i] = ys[i][IW-1];  // y < 0: turn counter-clockwise
      else                       dir[i] = mu_in[i];
      if (dir[i]) begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
      end else begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
      end
    end
    mu_out = dir;
  end

  // gain compensation and return to the sample format
  localparam int PW = IW + CW;
  logic signed [PW-1:0] xp, yp;
  always_comb begin
    xp    = PW'(xs[W]) * PW'(INV_K) + PW'(1 <<< (CFRAC+GUARD-1));
    yp    = PW'(ys[W]) * PW'(INV_K) + PW'(1 <<< (CFRAC+GUARD-1));
    x_out = sample_t'(xp >>> (CFRAC+GUARD));
    y_out = sample_t'(yp >>> (CFRAC+GUARD));
  end

endmodule
