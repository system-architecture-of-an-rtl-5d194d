// Shared types and constants of the reconfigurable rotation-based DSP engine.
//
// Number formats (this design's choice; the architecture itself fixes no word
// length): samples are signed DW-bit integers, coefficients (scaling
// multipliers f0/f1/r and the rotation coefficients cos/sin or cosh/sinh) are
// signed CW-bit fixed point with CFRAC fraction bits, i.e. the range is
// +/-2^(CW-CFRAC-1).  The CORDIC kernel uses CORDIC_W iterations and passes
// its rotation as a CORDIC_W-bit word, one direction bit per iteration.
//
// module_cfg_t is the per-module parameter set the host loads during
// initialization: the seven data-path switches s0..s6, the scaling
// multipliers f0, f1, the output multiplier r, the rotation coefficients and
// the kernel selection.  net_cfg_t selects one of the nine network types and
// the order (or block size) N the network is wired for.
package dsp_pkg;

  parameter int DW       = 24;  // sample word length
  parameter int CW       = 24;  // coefficient word length
  parameter int CFRAC    = 16;  // coefficient fraction bits (range +/-128)
  parameter int CORDIC_W = 16;  // CORDIC iterations = length of the mu word

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic [CORDIC_W-1:0]  mu_t;

  // Switch word, bit i is switch s_i.  Tables in the text are written
  // [s0 s1 s2 s3 s4 s5 s6], so the string "000100" means s3 = 1.
  typedef struct packed {
    logic s6;  // 1: lower output takes the direct (un-rotated) data path
    logic s5;  // 1: lower feedback path closed
    logic s4;  // 1: upper feedback path closed
    logic s3;  // 1: lower input delayed by one sample
    logic s2;  // 1: upper input delayed by one sample
    logic s1;  // lower input: 0 = in, 1 = in'
    logic s0;  // upper input: 0 = in, 1 = in'
  } switches_t;

  typedef enum logic [0:0] {
    KERNEL_MULT   = 1'b0,  // multiplier rotation circuit (four multipliers)
    KERNEL_CORDIC = 1'b1   // CORDIC processor (QRD-LSL module)
  } kernel_e;

  typedef enum logic [0:0] {
    CORDIC_ROTATE = 1'b0,  // vector rotation mode: rotate by mu_in
    CORDIC_VECTOR = 1'b1   // angle accumulation mode: annihilate y, emit mu_out
  } cordic_mode_e;

  typedef struct packed {
    switches_t    sw;
    coef_t        f0;     // upper scaling multiplier f_{0,i}
    coef_t        f1;     // lower scaling multiplier f_{1,i}
    coef_t        r;      // output multiplier r_i (both outputs)
    coef_t        c;      // cos(theta) or cosh(theta)
    coef_t        s;      // sin(theta) or sinh(theta)
    logic         hyp;    // 1: hyperbolic rotation [[c s][s c]], 0: circular [[c s][-s c]]
    kernel_e      kernel;
    cordic_mode_e cmode;  // used when kernel == KERNEL_CORDIC
    logic         mu_host; // 1: vector rotation mode rotates by mu below, 0: by mu_in
    mu_t          mu;     // host-loaded micro-rotation directions (a fixed angle)
  } module_cfg_t;

  typedef enum logic [3:0] {
    NET_I    = 4'd1,  // FIR, QMF: cascade
    NET_II   = 4'd2,  // multirate FIR: three interleaved cascades
    NET_III  = 4'd3,  // IIR (ARMA): pairwise sums into the next pair
    NET_IV   = 4'd4,  // multirate IIR
    NET_V    = 4'd5,  // DCT / DST / IDCT: X(i) = out_i
    NET_VI   = 4'd6,  // MLT: X(i) = -s_i (out_{i+1} + out'_i)
    NET_VII  = 4'd7,  // DFT: Re = out_i, Im = out'_i
    NET_VIII = 4'd8,  // DHT: X(i) = out_i + out'_i
    NET_IX   = 4'd9   // QRD-LSL: lower cascade plus mu exchange
  } net_type_e;

  typedef struct packed {
    net_type_e   ntype;
    logic [7:0]  order;      // N of the routing rules (order, block size or stage count)
    logic        multirate;  // DT types: sum even/odd module pairs first
  } net_cfg_t;

  // How the host sample stream reaches the array.
  typedef enum logic [1:0] {
    IN_DIRECT = 2'd0,  // one sample per PE step, x on every network input
    IN_FFA    = 2'd1,  // multirate FIR/IIR: three streams x_0..x_2 per two samples
    IN_POLY   = 2'd2,  // two polyphase streams x(2k), x(2k-1) (QMF analysis)
    IN_BLOCK  = 2'd3   // multirate DT: x(2m), x(2m+1) arrive together
  } in_mode_e;

  typedef struct packed {
    in_mode_e   in_mode;
    logic [7:0] blk_len;  // PE steps per transform block, 0 = streaming filter
  } eng_cfg_t;

  // Fixed-point product of a sample and a coefficient, rounded to nearest.
  function automatic sample_t coef_mul(input sample_t x, input coef_t k);
    logic signed [DW+CW-1:0] p;
    logic signed [DW+CW-1:0] xe, ke;
    xe = (DW+CW)'(x);
    ke = (DW+CW)'(k);
    p  = xe * ke + (DW+CW)'(1 <<< (CFRAC-1));
    return sample_t'(p >>> CFRAC);
  endfunction

endpackage
