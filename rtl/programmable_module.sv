// Unified programmable module: the single processing element of the engine.
//
// One module can act as an FIR lattice section (|k|<1 or |k|>1), a QMF
// lattice section, the c_i gain or the second-order section A_i(z) of the
// rotation-based IIR, the SIPO time-recursive rotation module of the
// discrete transforms, and an angle computer or rotator of the QRD-LSL
// filter.  The role is chosen by cfg, loaded by the host:
//
//   in  --s0--> [z^-1 if s2] --*f0--|reg|--(+ fb0 if s4)--+--> kernel --*r--> out
//   in' --s1--> [z^-1 if s3] --*f1--|reg|--(+ fb1 if s5)--+             *r--+--s6--> out'
//                      \___________ direct path ________|reg|_____________/
//   fb0 = out delayed one step, fb1 = rotated lower output delayed one step.
//
// s0/s1 pick in or in' for the upper/lower branch (00: both take in, 01:
// straight, 10: swapped), s2/s3 insert the input delay, s4/s5 close the
// feedback loops, s6 sends the lower input straight to out' (QRD-LSL angle
// computers).  The kernel is either the multiplier rotation circuit
// (circular or hyperbolic, coefficients c, s) or the CORDIC processor, which
// in QRD-LSL mode consumes mu_in or produces mu_out.  With mu_host set, the
// CORDIC in vector rotation mode instead rotates by the fixed direction word
// cfg.mu loaded by the host, so circular-rotation functions (QMF, DT) can also
// run on the CORDIC kernel.  Direction bit 1 turns counter-clockwise, so a
// multiplier-kernel rotation [[c s][-s c]] by theta is the CORDIC word for
// -theta.  This switch set, the
// pipeline register after f0/f1, the feedback taken after r, and the
// direct path follow the architecture; the following are this design's
// choices: the direct path and mu_in are registered together with the
// pipeline stage so out, out' and mu_out stay aligned; a module holding both
// kernels selectable at run time; the lower feedback is taken before s6;
// the host-loaded rotation word (the text says rotations are performed by
// feeding a +/-1 sequence, not where a fixed one comes from).
//
// Timing: the module advances only when en is high (one step per sample in
// the PE clock domain).  A sample taken at a step is visible at out/out'
// right after that step (latency one step); out/out'/mu_out are
// combinational from the module's registers, so there is no combinational
// path from any input to any output.  clr together with en loads zero into
// both feedback registers (start of a new transform block).  rst_n is an
// asynchronous active-low reset of all registers.
module programmable_module
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,      // step enable
  input  logic        clr,     // clear feedback state (with en)
  input  module_cfg_t cfg,
  input  sample_t     in_i,    // in_i
  input  sample_t     in_p,    // in'_i
  input  mu_t         mu_in,
  output sample_t     out_i,   // out_i
  output sample_t     out_p,   // out'_i
  output mu_t         mu_out
);

  sample_t u0, u1, d0, d1, v0, v1;
  sample_t p0, p1, pd, fb0, fb1;
  mu_t     pmu;
  sample_t a, b;
  sample_t rc0, rc1, co0, co1, k0, k1, o0, o1;
  mu_t     cmu, kmu;

  // input switches s0..s3
  always_comb begin
    u0 = cfg.sw.s0 ? in_p : in_i;
    u1 = cfg.sw.s1 ? in_p : in_i;
    v0 = cfg.sw.s2 ? d0 : u0;
    v1 = cfg.sw.s3 ? d1 : u1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d0  <= '0;
      d1  <= '0;
      p0  <= '0;
      p1  <= '0;
      pd  <= '0;
      pmu <= '0;
      fb0 <= '0;
      fb1 <= '0;
    end else if (en) begin
      d0  <= u0;
      d1  <= u1;
      p0  <= coef_mul(v0, cfg.f0);  // pipeline stage after the scaling multipliers
      p1  <= coef_mul(v1, cfg.f1);
      pd  <= v1;
      pmu <= mu_in;
      fb0 <= clr ? '0 : o0;
      fb1 <= clr ? '0 : o1;
    end
  end

  // feedback adders s4/s5
  always_comb begin
    a = p0 + (cfg.sw.s4 ? fb0 : sample_t'(0));
    b = p1 + (cfg.sw.s5 ? fb1 : sample_t'(0));
  end

  rotation_circuit u_rot (
    .a  (a),
    .b  (b),
    .c  (cfg.c),
    .s  (cfg.s),
    .hyp(cfg.hyp),
    .y0 (rc0),
    .y1 (rc1)
  );

  always_comb kmu = cfg.mu_host ? cfg.mu : pmu;

  cordic_processor u_cordic (
    .mode  (cfg.cmode),
    .x_in  (a),
    .y_in  (b),
    .mu_in (kmu),
    .x_out (co0),
    .y_out (co1),
    .mu_out(cmu)
  );

  always_comb begin
    if (cfg.kernel == KERNEL_CORDIC) begin
      k0     = co0;
      k1     = co1;
      mu_out = cmu;
    end else begin
      k0     = rc0;
      k1     = rc1;
      mu_out = pmu;
    end
    o0    = coef_mul(k0, cfg.r);
    o1    = coef_mul(k1, cfg.r);
    out_i = o0;
    out_p = cfg.sw.s6 ? pd : o1;
  end

endmodule
