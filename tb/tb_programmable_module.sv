// Self-checking testbench of programmable_module.
// Each role of the unified module is configured as the settings table lists
// it and compared, step by step, with the textbook equations of that role
// evaluated in real arithmetic:
//   1. FIR lattice section |k| < 1 (switches 010100, hyperbolic rotation):
//      out = x(n) - k x'(n-1),  out' = -k x(n) + x'(n-1)
//   2. FIR lattice section |k| > 1 (switches 101000: inputs swapped, the
//      delay kept on x', now in the upper branch), same equations as case 1
//      realised with f = -sign(k) sqrt(k^2-1), theta = atanh(-1/k)
//   3. second-order IIR section A(z) (switches 001111): the difference
//      equation of H0~(z) = [r(k0 cos + k1 sin) - r^2 k0 z^-1] / (1 - 2r cos z^-1 + r^2 z^-2),
//      driven by x(n-1) (the built-in input delay)
//   4. discrete-transform module (switches 000011): after L samples out and
//      out' equal X_C(k) and X_S(k) of the direct cosine/sine sums; a second
//      block right after the first checks the clear between blocks
//   5. QRD-LSL angle computer (CORDIC, 0100101) feeding a rotator (0100100)
//      through mu: energy E(n) = sqrt(E(n-1)^2 + x(n)^2), direct path
//      out' = x(n), rotator = the same Givens rotation applied to (Z, w).
//   6. fixed circular rotation on the CORDIC kernel (0100000, direction word
//      loaded by the host, mu_in ignored): out = cos a + sin b,
//      out' = -sin a + cos b, as the multiplier kernel with the same angle.
// Every module output is checked one step after its input (latency 1).
module tb_programmable_module;
  import dsp_pkg::*;

  logic        clk = 0, rst_n = 1, en = 0, clr = 0;
  module_cfg_t cfg, cfg2;
  sample_t     in_i, in_p, out_i, out_p, out2_i, out2_p, w_in;
  mu_t         mu_in, mu_out, mu_out2;
  int          checks = 0, failures = 0;
  int          cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  programmable_module dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .cfg(cfg),
    .in_i(in_i), .in_p(in_p), .mu_in(mu_in),
    .out_i(out_i), .out_p(out_p), .mu_out(mu_out)
  );

  // rotator of the QRD-LSL pair, fed with the angle computer's mu
  programmable_module dut2 (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(1'b0), .cfg(cfg2),
    .in_i(w_in), .in_p(w_in), .mu_in(mu_out),
    .out_i(out2_i), .out_p(out2_p), .mu_out(mu_out2)
  );

  localparam real SC = real'(1 << CFRAC);

  function automatic coef_t cq(input real v);
    return coef_t'($rtoi(v * SC + (v < 0.0 ? -0.5 : 0.5)));
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic near(input string what, input sample_t got, input real exp, input real tol);
    checks++;
    if (absr(real'(got) - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %f", what, got, exp);
    end
  endtask

  // one step: inputs applied before the edge, outputs read after it
  task automatic step(input sample_t a, input sample_t b);
    in_i = a;
    in_p = b;
    en   = 1;
    @(posedge clk);
    #1;
    en  = 0;
    clr = 0;
  endtask

  task automatic restart();
    rst_n = 0;
    #2;
    rst_n = 1;
    @(posedge clk);
    #1;
  endtask

  function automatic module_cfg_t base(input logic [6:0] sw_s0_first);
    module_cfg_t m;
    m = '0;
    // table strings read [s0 s1 s2 s3 s4 s5 s6]
    m.sw.s0 = sw_s0_first[6];
    m.sw.s1 = sw_s0_first[5];
    m.sw.s2 = sw_s0_first[4];
    m.sw.s3 = sw_s0_first[3];
    m.sw.s4 = sw_s0_first[2];
    m.sw.s5 = sw_s0_first[1];
    m.sw.s6 = sw_s0_first[0];
    m.r     = coef_t'(1 << CFRAC);
    m.c     = coef_t'(1 << CFRAC);
    return m;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, th, g, xa, xb, xb_prev, e0, e1;
    real r, cth, sth, k0, k1, b0, b1, y1r, y2r, yr, u1, u2;
    real beta, om, eta, accc [2], accs [2];
    real en_e, z, phi, ew, ez;
    sample_t xs [16];
    cfg = '0; cfg2 = '0; in_i = 0; in_p = 0; mu_in = 0; w_in = 0;
    #3;

    // ---------------------------------------------------------- 1. |k| < 1
    k = -0.6917; th = 0.5 * $ln((1.0 - k) / (1.0 + k));  // atanh(-k)
    g = $sqrt(1.0 - k * k);
    cfg = base(7'b0101000);
    cfg.f0 = cq(g); cfg.f1 = cq(g); cfg.hyp = 1;
    cfg.c = cq((($exp(th) + $exp(-th)) / 2.0)); cfg.s = cq((($exp(th) - $exp(-th)) / 2.0));
    restart();
    xb_prev = 0.0;
    for (int n = 0; n < 200; n++) begin
      xa = real'($urandom_range(0, 60000)) - 30000.0;
      xb = real'($urandom_range(0, 60000)) - 30000.0;
      step(sample_t'($rtoi(xa)), sample_t'($rtoi(xb)));
      near("fir k<1 out", out_i, xa - k * xb_prev, 4.0);
      near("fir k<1 out'", out_p, -k * xa + xb_prev, 4.0);
      xb_prev = xb;
    end

    // ---------------------------------------------------------- 2. |k| > 1
    k = -4.1573; th = 0.5 * $ln((1.0 - 1.0 / k) / (1.0 + 1.0 / k));  // atanh(-1/k)
    g = (k > 0 ? -1.0 : 1.0) * $sqrt(k * k - 1.0);
    cfg = base(7'b1010000);
    cfg.f0 = cq(g); cfg.f1 = cq(g); cfg.hyp = 1;
    cfg.c = cq((($exp(th) + $exp(-th)) / 2.0)); cfg.s = cq((($exp(th) - $exp(-th)) / 2.0));
    restart();
    xb_prev = 0.0;
    for (int n = 0; n < 200; n++) begin
      xa = real'($urandom_range(0, 20000)) - 10000.0;
      xb = real'($urandom_range(0, 20000)) - 10000.0;
      step(sample_t'($rtoi(xa)), sample_t'($rtoi(xb)));
      near("fir k>1 out", out_i, xa - k * xb_prev, 8.0);
      near("fir k>1 out'", out_p, -k * xa + xb_prev, 8.0);
      xb_prev = xb;
    end

    // ------------------------------------------------ 3. IIR section A(z)
    r = 0.65; th = 0.7854; k0 = -0.5148; k1 = 0.0531;
    cth = $cos(th); sth = $sin(th);
    cfg = base(7'b0011110);
    cfg.f0 = cq(k0); cfg.f1 = cq(k1); cfg.r = cq(r);
    cfg.c = cq(cth); cfg.s = cq(sth); cfg.hyp = 0;
    restart();
    b0 = r * (k0 * cth + k1 * sth); b1 = -r * r * k0;
    y1r = 0.0; y2r = 0.0; u1 = 0.0; u2 = 0.0;
    for (int n = 0; n < 300; n++) begin
      xa = real'($urandom_range(0, 40000)) - 20000.0;
      step(sample_t'($rtoi(xa)), 0);
      // y(n) = b0 u(n-1) + b1 u(n-2) + 2 r cos y(n-1) - r^2 y(n-2), u = x
      yr = b0 * u1 + b1 * u2 + 2.0 * r * cth * y1r - r * r * y2r;
      near("iir A(z)", out_i, yr, 12.0);
      y2r = y1r; y1r = yr; u2 = u1; u1 = xa;
    end

    // ------------------------------------------------- 4. transform module
    beta = 0.5; om = 3.0 * 3.14159265358979 / 16.0; eta = 0.3;
    cfg = base(7'b0000110);
    cfg.f0 = cq(beta * $cos(17.0 * om + eta));   // (2L+1) w + eta, L = 8
    cfg.f1 = cq(beta * $sin(17.0 * om + eta));
    cfg.c  = cq($cos(2.0 * om)); cfg.s = cq($sin(2.0 * om)); cfg.hyp = 0;
    restart();
    for (int blk = 0; blk < 3; blk++) begin
      accc[0] = 0.0; accs[0] = 0.0;
      for (int n = 0; n < 8; n++) begin
        xs[n] = sample_t'($urandom_range(0, 40000)) - sample_t'(20000);
        accc[0] += beta * $cos(real'(2 * n + 1) * om + eta) * real'(xs[n]);
        accs[0] += beta * $sin(real'(2 * n + 1) * om + eta) * real'(xs[n]);
        clr = (n == 0);
        step(xs[n], xs[n]);
      end
      near("DT X_C", out_i, accc[0], 16.0);
      near("DT X_S", out_p, accs[0], 16.0);
    end

    // --------------------------------- 5. QRD-LSL angle computer + rotator
    cfg = base(7'b0100101);
    cfg.f0 = 0; cfg.f1 = coef_t'(1 << CFRAC); cfg.kernel = KERNEL_CORDIC; cfg.cmode = CORDIC_VECTOR;
    cfg2 = base(7'b0100100);
    cfg2.f0 = 0; cfg2.f1 = coef_t'(1 << CFRAC); cfg2.kernel = KERNEL_CORDIC; cfg2.cmode = CORDIC_ROTATE;
    restart();
    en_e = 0.0; z = 0.0; phi = 0.0;
    for (int n = 0; n < 60; n++) begin
      xa = real'($urandom_range(0, 8000)) - 4000.0;
      xb = real'($urandom_range(0, 8000)) - 4000.0;
      w_in = sample_t'($rtoi(xb));
      step(sample_t'($rtoi(xa)), sample_t'($rtoi(xa)));
      // rotator: rotates (Z, w) by the angle found one step earlier
      if (n > 0) begin
        ez = z * $cos(phi) + xb * $sin(phi);
        ew = -z * $sin(phi) + xb * $cos(phi);
        near("rotator state", out2_i, ez, 0.002 * (absr(z) + absr(xb)) + 8.0);
        near("rotator output", out2_p, ew, 0.002 * (absr(z) + absr(xb)) + 8.0);
      end
      z = real'(out2_i);
      phi = $atan2(xa, en_e);
      en_e = $sqrt(en_e * en_e + xa * xa);
      near("angle computer energy", out_i, en_e, 0.002 * en_e + 8.0);
      checks++;                                   // direct path is exact
      if (out_p !== sample_t'($rtoi(xa))) begin
        failures++;
        $display("FAIL direct path: got %0d expected %0d", out_p, $rtoi(xa));
      end
      en_e = real'(out_i);
    end

    // ------------------------------- 6. CORDIC with a host-loaded direction word
    for (int t = 0; t < 4; t++) begin
      real zz;
      th = (real'($urandom_range(0, 3000)) - 1500.0) / 1000.0;   // |theta| <= 1.5 rad
      cfg = base(7'b0100000);
      cfg.f0 = coef_t'(1 << CFRAC); cfg.f1 = coef_t'(1 << CFRAC);
      cfg.kernel = KERNEL_CORDIC; cfg.cmode = CORDIC_ROTATE; cfg.mu_host = 1;
      zz = -th;                 // counter-clockwise by -theta
      for (int i = 0; i < CORDIC_W; i++) begin
        cfg.mu[i] = (zz >= 0.0);
        zz -= (cfg.mu[i] ? 1.0 : -1.0) * $atan(2.0 ** (-i));
      end
      restart();
      for (int n = 0; n < 50; n++) begin
        xa = real'($urandom_range(0, 60000)) - 30000.0;
        xb = real'($urandom_range(0, 60000)) - 30000.0;
        mu_in = mu_t'($urandom);
        step(sample_t'($rtoi(xa)), sample_t'($rtoi(xb)));
        near("cordic fixed out", out_i, $cos(th) * xa + $sin(th) * xb, 6.0);
        near("cordic fixed out'", out_p, -$sin(th) * xa + $cos(th) * xb, 6.0);
      end
    end
    mu_in = 0;

    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
