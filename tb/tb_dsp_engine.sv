// End-to-end testbench of dsp_engine at its default size (P = 12 modules).
//
// The testbench plays the host: for every function it computes the module
// parameters (switches, f0, f1, r, rotation coefficients) from the filter or
// transform specification, loads them in initialization mode, streams data in
// execution mode and checks the results against references computed here in
// real arithmetic:
//   A. FIR lattice, Type I: the order-9 example with PARCOR coefficients
//      k = -0.4472 ... 0.1094 (two of them |k| > 1); reference = the lattice
//      section equations, one step per section, and the impulse response
//      against the example's direct-form coefficients.
//   B. IIR (ARMA), Type III: the five-section cascade of the design example
//      (c_i = 1, A_i(z) of the published example); reference = the cascade difference
//      equations, delayed by one step per section.
//   C. Block transforms, Types V-VIII: 8-point DCT (three blocks back to
//      back), 8-point DFT and DHT, 8-point IDCT and DST-IV, MLT with N = 4;
//      reference = the defining sums of X_C, X_S and the combination
//      functions.
//   D. Multirate 6-point DCT (IN_BLOCK, 12 modules), 4-point DCT and
//      4-point DHT (8 modules each): even/odd modules and the summation
//      circuit; the 4-point DCT's scaling factors against the published table.
//   E. Multirate FIR, Type II with the down/upsampling circuits: order-8
//      filters H(z) = H0(z^2) + z^-1 H1(z^2), one random and the order-9
//      example split into its polyphase parts; reference = direct
//      convolution.
//   F. Multirate IIR, Type IV: the order-4 example, its published subfilter cascades;
//      reference = H0'(z^2) x + z^-1 H1'(z^2) x.  Then the published settings
//      of the same example (one pair corrected) against H'(z) itself.
//   G. QMF bank, Type I, angles of the 20-tap example: the analysis bank
//      (polyphase input) must preserve signal energy and give the same
//      subbands on the CORDIC kernel (fixed direction words) as on the
//      multipliers, and the synthesis bank (same angles, reverse order) must
//      rebuild the input exactly, delayed.
//   H. QRD-LSL, Type IX, two stages (8 modules, CORDIC kernel); reference =
//      a real-valued step-by-step model of the angle computers and rotators.
// For the FIR, QMF, IIR and DCT examples the loaded module registers are
// also compared with the published settings tables (switch strings, f0, f1,
// r, theta), except the |k| > 1 switch string (see phase A).
// It counts how often each mechanism occurs (every network type, multirate
// steps, |k| > 1 input swap, block clears, CORDIC angle accumulation and
// fixed-angle rotation, direct path) and counts a failure for one that
// never occurred.  Rates: one sample per clock into the engine in every
// mode, one array step per sample (direct) or per two samples (multirate),
// checked by counting.
module tb_dsp_engine;
  import dsp_pkg::*;

  localparam int  P  = 12;
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

  int checks = 0, failures = 0;
  int cnt_type [10];
  int cnt_mr_steps = 0, cnt_swap = 0, cnt_blocks = 0, cnt_cordic_vec = 0, cnt_direct = 0;
  int cnt_cordic_fixed = 0;
  int cnt_ys = 0, cnt_yv = 0, cnt_in = 0;

  dsp_engine dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .net_we(net_we), .net_data(net_data), .eng_we(eng_we), .eng_data(eng_data),
    .sync(sync), .in_valid(in_valid), .x_in(x_in),
    .y_valid(y_valid), .y(y), .ys_valid(ys_valid), .ys(ys),
    .x_valid(x_valid), .xa(xa), .xb(xb)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------- helpers
  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic coef_t cq(input real v);
    return coef_t'($rtoi(v * SC + (v < 0.0 ? -0.5 : 0.5)));
  endfunction

  function automatic real atanh_r(input real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  int fail_by [string];

  task automatic near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (absr(got - exp) > tol) begin
      failures++;
      fail_by[what]++;
      if (fail_by[what] <= 3) $display("FAIL %s: got %f expected %f (tol %f)", what, got, exp, tol);
    end
  endtask

  task automatic hard_reset();
    @(negedge clk);
    rst_n = 0;
    #2;
    rst_n = 1;
    @(negedge clk);
  endtask

  // Compare the registers of module i, as the host loaded them, with one
  // column of a published settings table: the six-switch string [s0..s5]
  // (unless skip_sw), f0, f1, r and the rotation angle theta.
  task automatic table_check(input string what, input int i, input string sw6,
                             input logic skip_sw, input real f0, input real f1,
                             input real r, input real th, input logic hyp);
    module_cfg_t m;
    logic [5:0]  got, exp;
    m = dut.mcfg[i];
    got = {m.sw.s0, m.sw.s1, m.sw.s2, m.sw.s3, m.sw.s4, m.sw.s5};
    for (int b = 0; b < 6; b++) exp[5-b] = (sw6[b] == "1");
    if (!skip_sw) begin
      checks++;
      if (got !== exp) begin
        failures++; $display("FAIL %s M%0d switches %b, table %s", what, i, got, sw6);
      end
    end
    near({what, " f0"}, real'(m.f0) / SC, f0, 0.0003);
    near({what, " f1"}, real'(m.f1) / SC, f1, 0.0003);
    near({what, " r"},  real'(m.r) / SC, r, 0.0003);
    near({what, " c"},  real'(m.c) / SC, hyp ? ($exp(th) + $exp(-th)) / 2.0 : $cos(th), 0.0005);
    near({what, " s"},  real'(m.s) / SC, hyp ? ($exp(th) - $exp(-th)) / 2.0 : $sin(th), 0.0005);
  endtask

  // CORDIC direction word for the multiplier-kernel rotation [[c s][-s c]]
  // by th, i.e. a counter-clockwise turn by -th: at iteration i turn by
  // +/-atan(2^-i) towards the remaining angle (bit 1 = counter-clockwise).
  function automatic mu_t mu_for(input real th);
    mu_t m;
    real z;
    z = -th;
    for (int i = 0; i < CORDIC_W; i++) begin
      m[i] = (z >= 0.0);
      z -= (m[i] ? 1.0 : -1.0) * $atan(2.0 ** (-i));
    end
    return m;
  endfunction

  // sw is written as in the settings table: "[s0 s1 s2 s3 s4 s5 s6]"
  task automatic load(input int idx, input logic [6:0] sw, input real f0, input real f1,
                      input real r, input real th, input logic hyp,
                      input kernel_e kern = KERNEL_MULT, input cordic_mode_e cm = CORDIC_ROTATE,
                      input logic muh = 0, input mu_t mu = '0);
    module_cfg_t m;
    m = '0;
    m.sw.s0 = sw[6]; m.sw.s1 = sw[5]; m.sw.s2 = sw[4]; m.sw.s3 = sw[3];
    m.sw.s4 = sw[2]; m.sw.s5 = sw[1]; m.sw.s6 = sw[0];
    m.f0 = cq(f0); m.f1 = cq(f1); m.r = cq(r);
    if (hyp) begin
      m.c = cq(($exp(th) + $exp(-th)) / 2.0);
      m.s = cq(($exp(th) - $exp(-th)) / 2.0);
    end else begin
      m.c = cq($cos(th));
      m.s = cq($sin(th));
    end
    m.hyp = hyp; m.kernel = kern; m.cmode = cm; m.mu_host = muh; m.mu = mu;
    cfg_we = 1; cfg_addr = 8'(idx); cfg_data = m;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic set_net(input net_type_e t, input int n, input logic mr,
                         input in_mode_e im, input int blk);
    net_data = '0;
    net_data.ntype = t; net_data.order = 8'(n); net_data.multirate = mr;
    eng_data.in_mode = im; eng_data.blk_len = 8'(blk);
    net_we = 1; eng_we = 1;
    @(negedge clk);
    net_we = 0; eng_we = 0;
    sync = 1;
    @(negedge clk);
    sync = 0;
  endtask

  // mechanism counters, taken from the engine's own state at every array step
  always @(posedge clk) begin
    if (rst_n && dut.pe_en) begin
      if (dut.clr) cnt_blocks++;
      for (int i = 0; i < P; i++) begin
        if (dut.mcfg[i].kernel == KERNEL_CORDIC && dut.mcfg[i].cmode == CORDIC_VECTOR
            && dut.mcfg[i].sw.s4) cnt_cordic_vec++;
        if (dut.mcfg[i].kernel == KERNEL_CORDIC && dut.mcfg[i].cmode == CORDIC_ROTATE
            && dut.mcfg[i].mu_host) cnt_cordic_fixed++;
        if (dut.mcfg[i].sw.s6) cnt_direct++;
        if (dut.mcfg[i].sw.s0 && !dut.mcfg[i].sw.s1) cnt_swap++;
      end
    end
  end

  // output capture (outputs are stable between rising edges)
  sample_t yq0 [$], yq1 [$], yq2 [$], ysq [$];
  always @(negedge clk) begin
    if (rst_n) begin
      if (y_valid) begin
        yq0.push_back(y[0]); yq1.push_back(y[1]); yq2.push_back(y[2]);
        cnt_yv++;
        if (int'(dut.ncfg.ntype) < 10) cnt_type[int'(dut.ncfg.ntype)]++;
        if (dut.ecfg.in_mode != IN_DIRECT) cnt_mr_steps++;
      end
      if (ys_valid) begin
        ysq.push_back(ys);
        cnt_ys++;
      end
    end
  end

  task automatic clear_queues();
    yq0.delete(); yq1.delete(); yq2.delete(); ysq.delete();
  endtask

  task automatic send(input sample_t v);
    in_valid = 1; x_in = v;
    @(negedge clk);
    #1;                       // let the output monitor of this edge run first
    in_valid = 0;
    cnt_in++;
  endtask

  task automatic idle(input int n);
    in_valid = 0;
    repeat (n) @(negedge clk);
  endtask

  // ----------------------------------------------------------- watchdog
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // polynomial helpers for the lattice FIR (host side)
  typedef real poly_t [0:15];

  // lattice with sections 1 - k z^-1 style (|k| < 1): F_m = F_{m-1} - k z^-1 G_{m-1}
  task automatic lattice_to_poly(input real ks [], input int n, output poly_t f);
    poly_t g, nf, ng;
    for (int i = 0; i < 16; i++) begin f[i] = 0.0; g[i] = 0.0; end
    f[0] = 1.0; g[0] = 1.0;
    for (int m = 0; m < n; m++) begin
      for (int i = 0; i < 16; i++) begin
        nf[i] = f[i] - ks[m] * (i > 0 ? g[i-1] : 0.0);
        ng[i] = -ks[m] * f[i] + (i > 0 ? g[i-1] : 0.0);
      end
      f = nf; g = ng;
    end
  endtask

  // step-down recursion: monic polynomial of degree n -> reflection coefficients
  task automatic poly_to_lattice(input poly_t a, input int n, output real ks [16], output logic ok);
    poly_t f, g, nf;
    real k;
    f = a; ok = 1;
    for (int m = n; m >= 1; m--) begin
      for (int i = 0; i <= m; i++) g[i] = f[m-i];
      k = -f[m];
      ks[m-1] = k;
      if (absr(k) >= 0.95) ok = 0;
      for (int i = 0; i < 16; i++) nf[i] = 0.0;
      for (int i = 0; i < m; i++) nf[i] = (f[i] + k * g[i]) / (1.0 - k * k);
      f = nf;
    end
  endtask

  // ================================================================ main
  initial begin
    cfg_data = '0; net_data = '0; eng_data = '0; x_in = 0;
    for (int i = 0; i < 10; i++) cnt_type[i] = 0;
    hard_reset();
    phase_fir();
    phase_iir();
    phase_transforms();
    phase_mr_dct();
    phase_mr_fir(0);
    phase_mr_fir(1);
    phase_mr_iir_table();
    phase_mr_iir();
    phase_qmf();
    phase_qrd();

    // every mechanism must have happened
    for (int t = 1; t <= 9; t++) begin
      checks++;
      $display("mechanism network type %0d steps     : %0d", t, cnt_type[t]);
      if (cnt_type[t] == 0) begin
        failures++; $display("FAIL network type %0d never used", t);
      end
    end
    begin
      int m [string];
      m["multirate steps"] = cnt_mr_steps;
      m["|k|>1 input swap"] = cnt_swap;
      m["block clears"] = cnt_blocks;
      m["CORDIC angle accumulation"] = cnt_cordic_vec;
      m["CORDIC host-angle rotation"] = cnt_cordic_fixed;
      m["direct data path"] = cnt_direct;
      m["full-rate multirate outputs"] = cnt_ys;
      m["checked DCT blocks"] = dt_seen[5];
      m["checked MLT blocks"] = dt_seen[6];
      m["checked DFT blocks"] = dt_seen[7];
      m["checked DHT blocks"] = dt_seen[8];
      m["checked IDCT blocks"] = dt_seen[9];
      m["checked DST-IV blocks"] = dt_seen[10];
      foreach (m[k]) begin
        checks++;
        $display("mechanism %-28s : %0d", k, m[k]);
        if (m[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dt_seen [11] = '{default: 0};

  // ================================================== A. FIR lattice (Type I)
  // The order-9 example H(z) = 1 - 0.8843 z^-1 - 0.1327 z^-2 - 1.1219 z^-3
  // + 0.5328 z^-4 - 0.8882 z^-5 + 0.1038 z^-6 - 0.3786 z^-7 + 0.2195 z^-8
  // - 0.1094 z^-9 has the PARCOR set below, two of them with |k| > 1.  Every
  // section must compute x_out = x_in - k x'_in(n-1), x'_out = -k x_in + x'_in(n-1).
  // A |k| > 1 section gets its inputs swapped (s0 s1 = 10), and the delay has
  // to stay with x', which after the swap runs in the upper branch (s2 = 1).
  task automatic phase_fir();
    real ks [9] = '{-0.4472, -0.6917, -0.5865, -4.1573, 1.1595, 0.2655, 0.2942, -0.1243, 0.1094};
    real h [10] = '{1.0, -0.8843, -0.1327, -1.1219, 0.5328, -0.8882, 0.1038, -0.3786, 0.2195, -0.1094};
    real fm [9], gm [9], bd [9], nf, ng, k, th, g, xv, tol;
    int  ns, n0;
    hard_reset();
    for (int i = 0; i < 9; i++) begin
      k = ks[i];
      if (absr(k) < 1.0) begin
        g = $sqrt(1.0 - k * k); th = atanh_r(-k);
        load(i, (i == 0) ? 7'b0001000 : 7'b0101000, g, g, 1.0, th, 1);
      end else begin
        g = (k > 0.0 ? -1.0 : 1.0) * $sqrt(k * k - 1.0); th = atanh_r(-1.0 / k);
        load(i, 7'b1010000, g, g, 1.0, th, 1);
      end
    end
    // the published FIR settings; its switch string for |k| > 1 (100100) is
    // the one this host deliberately does not use
    begin
      string tsw [9] = '{"000100", "010100", "010100", "100100", "100100",
                         "010100", "010100", "010100", "010100"};
      real tf [9]  = '{0.8944, 0.7222, 0.8100, 4.0352, -0.5870, 0.9641, 0.9557, 0.9922, 0.9940};
      real tth [9] = '{0.4812, 0.8512, 0.6723, 0.2454, -1.3027, -0.2720, -0.3032, 0.1249, -0.1098};
      for (int i = 0; i < 9; i++)
        table_check("FIR table", i, tsw[i], absr(ks[i]) > 1.0, tf[i], tf[i], 1.0, tth[i], 1);
    end
    set_net(NET_I, 9, 0, IN_DIRECT, 0);
    clear_queues();
    for (int i = 0; i < 9; i++) begin fm[i] = 0; gm[i] = 0; bd[i] = 0; end
    ns = 300;
    for (int n = 0; n < ns; n++) begin
      xv = real'($urandom_range(0, 4000)) - 2000.0;
      send(sample_t'($rtoi(xv)));
      // reference: one step of every section, last section first
      for (int i = 8; i >= 0; i--) begin
        real a_in, b_in;
        a_in = (i == 0) ? xv : fm[i-1];
        b_in = (i == 0) ? xv : gm[i-1];
        k = ks[i];
        nf = a_in - k * bd[i];  ng = -k * a_in + bd[i];
        bd[i] = b_in;
        fm[i] = nf; gm[i] = ng;
      end
      checks++;
      if (yq0.size() != n + 1) begin   // one output per input sample, every clock
        failures++; $display("FIR: output count %0d after %0d samples", yq0.size(), n + 1);
      end else begin
        tol = 0.002 * absr(fm[8]) + 40.0;
        near("FIR y(n)", real'(yq0[n]), fm[8], tol);
      end
    end
    // impulse response against the direct-form coefficients: flush, then an
    // impulse of 10000; h(j) shows up 8 steps after the impulse's own step
    for (int n = 0; n < 12; n++) send(0);
    n0 = yq0.size();
    send(10000);
    for (int n = 0; n < 20; n++) send(0);
    for (int j = 0; j < 12; j++)
      near("FIR impulse response", real'(yq0[n0 + 8 + j]), (j < 10) ? 10000.0 * h[j] : 0.0, 12.0);
  endtask

  // ======================================================== B. IIR (Type III)
  task automatic phase_iir();
    // the example's sections: c = 1, A(z) = (d' + e' z^-1) / (1 + a z^-1 + b z^-2)
    real dd [5] = '{-0.2122, 0.1500, -0.8000, -1.2728, 0.0};
    real ee [5] = '{0.2175, -0.2025, -0.6400, -0.8100, -0.6400};
    real aa [5] = '{-0.9192, -0.7500, 0.8000, 1.2728, 0.0};
    real bb [5] = '{0.4225, 0.5625, 0.6400, 0.8100, 0.6400};
    real u1 [5], u2 [5], w1 [5], w2 [5], hist [$];
    real r, th, k0, k1, u, w, v, xv;
    hard_reset();
    for (int i = 0; i < 5; i++) begin
      r  = $sqrt(bb[i]);
      th = $acos(-aa[i] / (2.0 * r));                 // complex pole pair r e^{+-j th}
      k0 = -ee[i] / (r * r);                          // matches the z^-1 term of the numerator
      k1 = (dd[i] / r - k0 * $cos(th)) / $sin(th);
      load(2*i,     7'b0000000, 1.0, 0.0, 1.0, 0.0, 0);   // c_i
      load(2*i + 1, 7'b0011110, k0, k1, r, th, 0);        // A_i(z)
    end
    begin   // the published IIR settings
      real tf0 [10] = '{1, -0.5148, 1, 0.3600, 1, 1, 1, 1, 1, 1};
      real tf1 [10] = '{0, 0.0531, 0, 0.0231, 0, -0.5774, 0, -1, 0, 0};
      real tr [10]  = '{1, 0.65, 1, 0.75, 1, 0.8, 1, 0.9, 1, 0.8};
      real tth [10] = '{0, 0.7854, 0, 1.0472, 0, 2.0944, 0, 2.3562, 0, 1.5708};
      for (int i = 0; i < 10; i++)
        table_check("IIR table", i, (i % 2 == 0) ? "000000" : "001111", 0,
                    tf0[i], tf1[i], tr[i], tth[i], 0);
    end
    set_net(NET_III, 10, 0, IN_DIRECT, 0);
    clear_queues();
    for (int i = 0; i < 5; i++) begin u1[i] = 0; u2[i] = 0; w1[i] = 0; w2[i] = 0; end
    for (int n = 0; n < 400; n++) begin
      xv = real'($urandom_range(0, 4000)) - 2000.0;
      send(sample_t'($rtoi(xv)));
      // reference: cascade of H_i = 1 + z^-1 A_i, visible 4 steps later
      u = xv;
      for (int i = 0; i < 5; i++) begin
        w = dd[i] * u1[i] + ee[i] * u2[i] - aa[i] * w1[i] - bb[i] * w2[i];
        v = u + w;
        u2[i] = u1[i]; u1[i] = u; w2[i] = w1[i]; w1[i] = w;
        u = v;
      end
      hist.push_back(u);
      if (n >= 4) near("IIR y(n)", real'(yq0[n]), hist[n-4], 0.003 * absr(hist[n-4]) + 30.0);
    end
    checks++;
    if (yq0.size() != 400) begin failures++; $display("IIR: %0d outputs", yq0.size()); end
  endtask

  // ====================================== C. transforms (Types V, VI, VII, VIII)
  task automatic dt_load(input int t, input int nn, input int mods, input logic mr);
    real beta, om, eta, ll, ck;
    int  l;
    for (int k = 0; k < mods; k++) begin
      case (t)
        5: begin  // DCT
          ll = real'(nn); om = real'(k) * PI / (2.0 * ll); eta = 0.0;
          beta = (k == 0) ? $sqrt(1.0 / ll) : $sqrt(2.0 / ll);
        end
        9, 10: begin  // IDCT (eta = -omega), DST-IV (eta = 0); beta = c_1
          ll = real'(nn); om = PI / (2.0 * ll) * (real'(k) + 0.5);
          eta = (t == 9) ? -om : 0.0; beta = $sqrt(2.0 / ll);
        end
        6: begin  // MLT
          ll = 2.0 * real'(nn); om = PI * real'(k) / (2.0 * real'(nn));
          eta = PI / 2.0 * (real'(k) + 0.5); beta = 1.0 / $sqrt(2.0 * real'(nn));
        end
        default: begin  // DFT, DHT
          ll = real'(nn); om = -real'(k) * PI / ll; eta = -om; beta = 1.0 / $sqrt(ll);
        end
      endcase
      if (!mr) begin
        load(k, 7'b0000110, beta * $cos((2.0 * ll + 1.0) * om + eta),
             beta * $sin((2.0 * ll + 1.0) * om + eta), 1.0, 2.0 * om, 0);
      end else begin
        for (l = 0; l < 2; l++)
          load(2*k + l, 7'b0000110,
               beta * $cos((2.0 * ll + 2.0 * real'(l) + 1.0) * om + eta),
               beta * $sin((2.0 * ll + 2.0 * real'(l) + 1.0) * om + eta), 1.0, 4.0 * om, 0);
      end
    end
  endtask

  function automatic real xcs(input int t, input int nn, input int k, input sample_t xs [],
                              input logic sine);
    real beta, om, eta, ll, acc;
    case (t)
      5: begin
        ll = real'(nn); om = real'(k) * PI / (2.0 * ll); eta = 0.0;
        beta = (k == 0) ? $sqrt(1.0 / ll) : $sqrt(2.0 / ll);
      end
      9, 10: begin
        ll = real'(nn); om = PI / (2.0 * ll) * (real'(k) + 0.5);
        eta = (t == 9) ? -om : 0.0; beta = $sqrt(2.0 / ll);
      end
      6: begin
        ll = 2.0 * real'(nn); om = PI * real'(k) / (2.0 * real'(nn));
        eta = PI / 2.0 * (real'(k) + 0.5); beta = 1.0 / $sqrt(2.0 * real'(nn));
      end
      default: begin
        ll = real'(nn); om = -real'(k) * PI / ll; eta = -om; beta = 1.0 / $sqrt(ll);
      end
    endcase
    acc = 0.0;
    for (int n = 0; n < int'(ll); n++)
      acc += beta * (sine ? $sin(real'(2*n+1) * om + eta) : $cos(real'(2*n+1) * om + eta))
             * real'(xs[n]);
    return acc;
  endfunction

  task automatic run_blocks(input int t, input int nn, input int len, input int nblk,
                            input logic mr);
    sample_t xs [];
    real e, tol, sumabs;
    int  wait_clk;
    xs = new[len];
    for (int b = 0; b < nblk; b++) begin
      sumabs = 0.0;
      for (int n = 0; n < len; n++) begin
        xs[n] = sample_t'($urandom_range(0, 8000)) - sample_t'(4000);
        sumabs += absr(real'(xs[n]));
      end
      // samples back to back, one per clock
      for (int n = 0; n < len; n++) begin
        in_valid = 1; x_in = xs[n]; cnt_in++;
        @(negedge clk);
        checks++;
        if (x_valid !== (n == len - 1)) begin
          failures++; $display("FAIL x_valid timing, type %0d sample %0d", t, n);
        end
      end
      dt_seen[t]++;
      tol = 0.002 * sumabs + 16.0;
      for (int k = 0; k < nn; k++) begin
        case (t)
          5: near("DCT", real'(xa[k]), xcs(5, nn, k, xs, 0), tol);
          6: begin
            int sgn;
            sgn = (k % 4 == 0 || k % 4 == 3) ? 1 : -1;   // -s_k
            e = real'(sgn) * (xcs(6, nn, k + 1, xs, 0) + xcs(6, nn, k, xs, 1));
            near("MLT", real'(xa[k]), e, tol);
          end
          7: begin
            near("DFT re", real'(xa[k]), xcs(7, nn, k, xs, 0), tol);
            near("DFT im", real'(xb[k]), xcs(7, nn, k, xs, 1), tol);
          end
          9: begin  // host adds (c_0 - c_1) x(0); reference = the IDCT sum itself
            e = 0.0;
            for (int n = 0; n < nn; n++)
              e += (n == 0 ? $sqrt(1.0 / real'(nn)) : $sqrt(2.0 / real'(nn)))
                   * $cos(PI * real'(n) * real'(2*k + 1) / (2.0 * real'(nn))) * real'(xs[n]);
            near("IDCT", real'(xa[k])
                 + ($sqrt(1.0 / real'(nn)) - $sqrt(2.0 / real'(nn))) * real'(xs[0]), e, tol);
          end
          10: near("DST-IV", real'(xb[k]), xcs(10, nn, k, xs, 1), tol);
          default: near("DHT", real'(xa[k]),
                        xcs(8, nn, k, xs, 0) + xcs(8, nn, k, xs, 1), tol);
        endcase
      end
    end
    in_valid = 0;
  endtask

  task automatic phase_transforms();
    hard_reset();
    dt_load(5, 8, 8, 0);
    begin   // the published 8-point DCT settings
      real tf0 [8] = '{0.3536, -0.4904, 0.4619, -0.4157, 0.3536, -0.2778, 0.1913, -0.0975};
      real tf1 [8] = '{0, -0.0975, 0.1913, -0.2778, 0.3536, -0.4157, 0.4619, -0.4904};
      for (int i = 0; i < 8; i++)
        table_check("DCT table", i, "000011", 0, tf0[i], tf1[i], 1.0, 0.3927 * real'(i), 0);
    end
    set_net(NET_V, 8, 0, IN_DIRECT, 8);
    run_blocks(5, 8, 8, 3, 0);
    dt_load(7, 8, 8, 0);
    set_net(NET_VII, 8, 0, IN_DIRECT, 8);
    run_blocks(7, 8, 8, 2, 0);
    set_net(NET_VIII, 8, 0, IN_DIRECT, 8);
    run_blocks(8, 8, 8, 2, 0);
    // IDCT: X_C plus the host's correction (c_0 - c_1) x(0), read from the
    // Type V outputs; DST-IV: X_S, read from the imaginary outputs of Type VII
    dt_load(9, 8, 8, 0);
    set_net(NET_V, 8, 0, IN_DIRECT, 8);
    run_blocks(9, 8, 8, 2, 0);
    dt_load(10, 8, 8, 0);
    set_net(NET_VII, 8, 0, IN_DIRECT, 8);
    run_blocks(10, 8, 8, 2, 0);
    dt_load(6, 4, 5, 0);                 // MLT N = 4 uses modules 0..4 (C_4 is needed)
    set_net(NET_VI, 4, 0, IN_DIRECT, 8);
    run_blocks(6, 4, 8, 2, 0);
  endtask

  // ====================== D. multirate 6-point DCT, 4-point DCT, 4-point DHT
  task automatic phase_mr_dct();
    int steps0;
    hard_reset();
    dt_load(5, 6, 6, 1);
    set_net(NET_V, 6, 1, IN_BLOCK, 3);
    steps0 = cnt_mr_steps;
    run_blocks(5, 6, 6, 3, 1);
    idle(2);
    checks++;
    if (cnt_mr_steps - steps0 != 9) begin   // 18 samples -> 9 array steps
      failures++; $display("FAIL multirate DCT: %0d steps for 18 samples", cnt_mr_steps - steps0);
    end
    // multirate 4-point DCT on eight modules; the loaded scaling factors
    // must be the ones of the published settings table for this case
    hard_reset();
    dt_load(5, 4, 4, 1);
    begin
      real pf0 [8] = '{0.5, 0.5, -0.6533, -0.2706, 0.5, -0.5, -0.2706, 0.6533};
      real pf1 [8] = '{0.0, 0.0, -0.2706, -0.6533, 0.5, 0.5, -0.6533, 0.2706};
      for (int i = 0; i < 8; i++) begin
        near("multirate DCT f0", real'(dut.mcfg[i].f0) / SC, pf0[i], 0.0002);
        near("multirate DCT f1", real'(dut.mcfg[i].f1) / SC, pf1[i], 0.0002);
      end
    end
    set_net(NET_V, 4, 1, IN_BLOCK, 2);
    run_blocks(5, 4, 4, 3, 1);
    // multirate 4-point DHT on eight modules
    hard_reset();
    dt_load(8, 4, 4, 1);
    set_net(NET_VIII, 4, 1, IN_BLOCK, 2);
    run_blocks(8, 4, 4, 3, 1);
  endtask

  // ================================================ E. multirate FIR (Type II)
  // One lattice section on module idx: PARCOR k, extra gain lead (the
  // subfilter's leading coefficient); |k| > 1 as in phase A.
  task automatic load_section(input int idx, input real k, input logic first, input real lead);
    real g;
    if (absr(k) < 1.0) begin
      g = $sqrt(1.0 - k * k) * lead;
      load(idx, first ? 7'b0001000 : 7'b0101000, g, g, 1.0, atanh_r(-k), 1);
    end else begin
      g = (k > 0.0 ? -1.0 : 1.0) * $sqrt(k * k - 1.0) * lead;
      load(idx, 7'b1010000, g, g, 1.0, atanh_r(-1.0 / k), 1);
    end
  endtask

  // Subfilters H0, H1 (order 4) and H^ = H0 + H1 of H(z) = H0(z^2) + z^-1 H1(z^2).
  // published = 1: the polyphase parts of the order-9 example, whose
  // H^ has two sections with |k| > 1 (k = 1.08, -84.1); published = 0: random
  // lattices with |k| < 1.
  task automatic phase_mr_fir(input logic published);
    real k0s [16], k1s [16], khs [16];
    real e0 [5] = '{1.0, -0.1327, 0.5328, 0.1038, 0.2195};
    real e1 [5] = '{-0.8843, -1.1219, -0.8882, -0.3786, -0.1094};
    poly_t h0, h1, hh, hn, hfull;
    logic ok;
    real xs [$], yr;
    int  nsamp, lat, base;
    ok = 0;
    while (!ok) begin
      if (published) begin
        for (int i = 0; i < 16; i++) begin
          h0[i] = (i <= 4) ? e0[i] : 0.0;
          h1[i] = (i <= 4) ? e1[i] : 0.0;
        end
        ok = 1;
      end else begin
        for (int i = 0; i < 4; i++) begin
          k0s[i] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
          k1s[i] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
        end
        lattice_to_poly(k0s, 4, h0);
        lattice_to_poly(k1s, 4, h1);
      end
      for (int i = 0; i < 16; i++) hh[i] = h0[i] + h1[i];
      for (int i = 0; i < 16; i++) hn[i] = hh[i] / hh[0];
      poly_to_lattice(hn, 4, khs, ok);
      if (published) begin
        ok = 1;
        for (int i = 0; i < 16; i++) hn[i] = h1[i] / h1[0];
        poly_to_lattice(hn, 4, k1s, ok);
        poly_to_lattice(h0, 4, k0s, ok);
        ok = 1;
      end
    end
    for (int i = 0; i < 16; i++) hfull[i] = 0.0;
    for (int i = 0; i <= 4; i++) begin
      hfull[2*i] = h0[i];
      if (2*i + 1 < 16) hfull[2*i+1] = h1[i];
    end
    hard_reset();
    // mapping R~_i -> M_3i (H0), R^_i -> M_3i+1 (H^), R-_i -> M_3i+2 (H1).
    // The leading coefficient is applied in the last section: H^ of the example
    // starts with 0.1157, and scaling the integer samples down by that much
    // before the gain-84 section would amplify their rounding error past the
    // check's tolerance.
    for (int i = 0; i < 4; i++) begin
      load_section(3*i,     k0s[i], i == 0, (i == 3) ? h0[0] : 1.0);
      load_section(3*i + 1, khs[i], i == 0, (i == 3) ? hh[0] : 1.0);
      load_section(3*i + 2, k1s[i], i == 0, (i == 3) ? h1[0] : 1.0);
    end
    set_net(NET_II, 8, 0, IN_FFA, 0);
    clear_queues();
    nsamp = 400;
    for (int n = 0; n < nsamp; n++) begin
      xs.push_back(real'($urandom_range(0, 4000)) - 2000.0);
      send(sample_t'($rtoi(xs[n])));
    end
    idle(12);
    // the serial output is the filtered input delayed by 2 (stages - 1) + 1 samples
    lat = 7;
    checks++;
    if (ysq.size() < nsamp - lat) begin
      failures++; $display("FAIL multirate FIR: only %0d outputs", ysq.size());
    end else begin
      for (int j = 0; j + lat < ysq.size() && j < nsamp; j++) begin
        yr = 0.0;
        for (int i = 0; i < 10; i++) if (j - i >= 0) yr += hfull[i] * xs[j-i];
        near("multirate FIR y(n)", real'(ysq[j + lat]), yr, 0.002 * absr(yr) + 30.0);
      end
    end
    checks++;
    if (yq0.size() != nsamp / 2) begin   // one array step per two samples
      failures++; $display("FAIL multirate FIR: %0d array steps for %0d samples", yq0.size(), nsamp);
    end
  endtask

  // The multirate IIR once more, now with the module settings as the
  // published settings table prints them, checked against the full-rate
  // filter H'(z) itself.  There the first section of every
  // subfilter has c = 0 and A(z) holding the whole first-order factor, which
  // adds one step of delay to all three subfilters alike.  The printed pair
  // for the second H1' section (c = 0 and k0 = -0.5266, k1 = 2.3668) likewise
  // realizes z^-1 (1 + 0.0940 z^-1)/D2(z), which delays H1' alone and
  // breaks the fast-FIR combination.  That pair is replaced by c = 1 and
  // A(z) = (0.0941 - 0.1785 z^-1)/D2(z), the same factor without the delay.
  task automatic phase_mr_iir_table();
    real tf0 [12] = '{0, -2.0706, 0, -1.1526, 0, -0.6991, 1, 0.7742, 2.4192, 2.0129, 0, -0.5266};
    real tf1 [12] = '{0, 0.2303, 0, 0.7602, 0, 1.6195, 0, 0.3163, 0, 0.6021, 0, 2.3668};
    real tr [12]  = '{1, 0.81, 1, 0.81, 1, 0.81, 1, 0.4225, 1, 0.4225, 1, 0.4225};
    real tth [12] = '{0, 2.0943, 0, 2.0943, 0, 2.0943, 0, 1.5709, 0, 1.5709, 0, 1.5709};
    real nb [3] = '{1.0, -0.4, 0.16};
    real na [5] = '{1.0, -1.8192, 2.0598, -1.1248, 0.3422};
    real xs [$], yr [$], y;
    int  lat;
    hard_reset();
    for (int i = 0; i < 12; i++)
      load(i, (i % 2 == 0) ? 7'b0000000 : 7'b0011110, tf0[i], tf1[i], tr[i], tth[i], 0);
    begin
      real r, th, k0, k1;
      r = $sqrt(0.1785); th = $acos(0.0001 / (2.0 * r));
      k0 = 0.1785 / (r * r); k1 = (0.0941 / r - k0 * $cos(th)) / $sin(th);
      load(10, 7'b0000000, 1.0, 0.0, 1.0, 0.0, 0);
      load(11, 7'b0011110, k0, k1, r, th, 0);
    end
    set_net(NET_IV, 4, 0, IN_FFA, 0);
    clear_queues();
    for (int n = 0; n < 400; n++) begin
      xs.push_back(real'($urandom_range(0, 2000)) - 1000.0);
      send(sample_t'($rtoi(xs[n])));
      y = 0.0;
      for (int i = 0; i < 3; i++) if (n - i >= 0) y += nb[i] * xs[n-i];
      for (int i = 1; i < 5; i++) if (n - i >= 0) y -= na[i] * yr[n-i];
      yr.push_back(y);
    end
    idle(12);
    // latency: 3 samples as in phase F, plus one step (2 samples) for the
    // delay built into the first sections
    lat = 5;
    checks++;
    if (ysq.size() < 400 - lat) begin
      failures++; $display("FAIL table multirate IIR: only %0d outputs", ysq.size());
    end else begin
      for (int j = 0; j + lat < ysq.size() && j < 400; j++)
        near("table multirate IIR y(n)", real'(ysq[j + lat]), yr[j], 0.002 * absr(yr[j]) + 20.0);
    end
  endtask

  // ================================================ F. multirate IIR (Type IV)
  task automatic phase_mr_iir();
    // the published cascades, each subfilter as two sections c + z^-1 (d' + e' z^-1)/(1 + a z^-1 + b z^-2)
    // [subfilter][section]: subfilter 0 = H0', 1 = H^', 2 = H1'
    real cc [3][2], dd [3][2], ee [3][2], aa [3][2], bb [3][2];
    real u1 [4][2], u2 [4][2], w1 [4][2], w2 [4][2], h1o_prev;
    real r, th, k0, k1, xv, u, w, v, yr;
    real xs [$], p0 [$], p1 [$];
    int  nsamp, lat;
    // H0' = (1 + 1.3585 z^-1)/D1 * (1 + z^-1 (0.1336 - 0.1382 z^-1)/D2)
    cc[0][0] = 1.0;    dd[0][0] = 1.3585 - 0.8099; ee[0][0] = -0.6561;
    cc[0][1] = 1.0;    dd[0][1] = 0.1336;          ee[0][1] = -0.1382;
    // H^' = (1 + 0.7562 z^-1)/D1 * (2.4192 + z^-1 (0.2543 - 0.3593 z^-1)/D2)
    cc[1][0] = 1.0;    dd[1][0] = 0.7562 - 0.8099; ee[1][0] = -0.6561;
    cc[1][1] = 2.4192; dd[1][1] = 0.2543;          ee[1][1] = -0.3593;
    // H1' = (1.4192 + 0.4587 z^-1)/D1 * (1 + 0.0940 z^-1)/D2'
    cc[2][0] = 1.4192; dd[2][0] = 0.4587 - 0.8099 * 1.4192; ee[2][0] = -0.6561 * 1.4192;
    cc[2][1] = 1.0;    dd[2][1] = 0.0940 + 0.0001;          ee[2][1] = -0.1785;
    for (int s = 0; s < 3; s++) begin
      aa[s][0] = 0.8099; bb[s][0] = 0.6561;
      aa[s][1] = (s == 2) ? -0.0001 : 0.0001; bb[s][1] = 0.1785;
    end
    hard_reset();
    // stage i of subfilter s: c on M_{6i+2s}, A on M_{6i+2s+1}
    for (int i = 0; i < 2; i++) begin
      for (int s = 0; s < 3; s++) begin
        r  = $sqrt(bb[s][i]);
        th = $acos(-aa[s][i] / (2.0 * r));
        k0 = -ee[s][i] / (r * r);
        k1 = (dd[s][i] / r - k0 * $cos(th)) / $sin(th);
        load(6*i + 2*s,     7'b0000000, cc[s][i], 0.0, 1.0, 0.0, 0);
        load(6*i + 2*s + 1, 7'b0011110, k0, k1, r, th, 0);
      end
    end
    set_net(NET_IV, 4, 0, IN_FFA, 0);
    clear_queues();
    nsamp = 400;
    h1o_prev = 0.0;
    for (int s = 0; s < 4; s++) for (int i = 0; i < 2; i++) begin
      u1[s][i] = 0; u2[s][i] = 0; w1[s][i] = 0; w2[s][i] = 0;
    end
    for (int n = 0; n < nsamp; n++) begin
      xs.push_back(real'($urandom_range(0, 2000)) - 1000.0);
      send(sample_t'($rtoi(xs[n])));
    end
    idle(12);
    // reference: polyphase form in the half-rate domain with the printed cascades,
    //   y(2m)   = H0'(x_e)(m) + H1'(x_o)(m-1)
    //   y(2m+1) = H0'(x_o)(m) + H1'(x_e)(m)
    // with x_e(m) = x(2m), x_o(m) = x(2m+1); four filter instances:
    // 0 = H0' on x_e, 1 = H0' on x_o, 2 = H1' on x_e, 3 = H1' on x_o
    for (int m = 0; m < nsamp / 2; m++) begin
      real hv [4];
      for (int inst = 0; inst < 4; inst++) begin
        int s;
        s = (inst < 2) ? 0 : 2;
        u = (inst % 2 == 0) ? xs[2*m] : xs[2*m+1];
        for (int i = 0; i < 2; i++) begin
          w = dd[s][i] * u1[inst][i] + ee[s][i] * u2[inst][i]
              - aa[s][i] * w1[inst][i] - bb[s][i] * w2[inst][i];
          v = cc[s][i] * u + w;
          u2[inst][i] = u1[inst][i]; u1[inst][i] = u; w2[inst][i] = w1[inst][i]; w1[inst][i] = w;
          u = v;
        end
        hv[inst] = u;
      end
      p0.push_back(hv[0] + h1o_prev);
      p1.push_back(hv[1] + hv[2]);
      h1o_prev = hv[3];
    end
    lat = 3;
    checks++;
    if (ysq.size() < nsamp - lat) begin
      failures++; $display("FAIL multirate IIR: only %0d outputs", ysq.size());
    end else begin
      for (int j = 0; j + lat < ysq.size() && j < nsamp; j++) begin
        yr = (j % 2 == 0) ? p0[j/2] : p1[j/2];
        near("multirate IIR y(n)", real'(ysq[j + lat]), yr, 0.004 * absr(yr) + 20.0);
      end
    end
  endtask

  // ====================================================== G. QMF analysis bank
  task automatic phase_qmf();
    real th [10] = '{-1.2022, 0.6993, -0.4465, 0.3051, -0.2146, 0.1511, -0.1043, 0.0690,
                     -0.0426, 0.0311};
    real ein, eout, xv, xs [$], ys [$];
    sample_t v0 [$], v1 [$];
    int  dly;
    // analysis bank: sections in order, the first without delay
    hard_reset();
    for (int i = 0; i < 10; i++)
      load(i, (i == 0) ? 7'b0100000 : 7'b0101000, 1.0, 1.0, 1.0, th[i], 0);
    for (int i = 0; i < 10; i++)   // the published QMF settings
      table_check("QMF table", i, (i == 0) ? "010000" : "010100", 0, 1.0, 1.0, 1.0, th[i], 0);
    set_net(NET_I, 10, 0, IN_POLY, 0);
    clear_queues();
    ein = 0.0; eout = 0.0;
    for (int n = 0; n < 200; n++) begin
      xv = (n < 160) ? real'($urandom_range(0, 8000)) - 4000.0 : 0.0;
      xs.push_back(xv);
      ein += xv * xv;
      send(sample_t'($rtoi(xv)));
    end
    idle(4);
    foreach (yq0[i]) eout += real'(yq0[i]) * real'(yq0[i]) + real'(yq1[i]) * real'(yq1[i]);
    near("QMF energy ratio", eout / ein, 1.0, 0.002);
    checks++;
    if (yq0.size() != 100) begin
      failures++; $display("FAIL QMF: %0d output pairs for 200 samples", yq0.size());
    end
    v0 = yq0; v1 = yq1;
    // the same analysis bank on the CORDIC kernel, each angle loaded as a
    // fixed direction word: same subbands within rounding
    hard_reset();
    for (int i = 0; i < 10; i++)
      load(i, (i == 0) ? 7'b0100000 : 7'b0101000, 1.0, 1.0, 1.0, 0.0, 0,
           KERNEL_CORDIC, CORDIC_ROTATE, 1, mu_for(th[i]));
    set_net(NET_I, 10, 0, IN_POLY, 0);
    clear_queues();
    foreach (xs[n]) send(sample_t'($rtoi(xs[n])));
    idle(4);
    checks++;
    if (yq0.size() != v0.size()) begin
      failures++; $display("FAIL QMF on CORDIC: %0d output pairs", yq0.size());
    end else begin
      foreach (v0[k]) begin
        near("QMF CORDIC v0", real'(yq0[k]), real'(v0[k]), 0.001 * absr(real'(v0[k])) + 12.0);
        near("QMF CORDIC v1", real'(yq1[k]), real'(v1[k]), 0.001 * absr(real'(v1[k])) + 12.0);
      end
    end

    // synthesis bank: the same angles in reverse order, the first section
    // without delay, v1 on the upper input and v0 on the lower one (sent as a
    // pair v1(k), v0(k)); y(2k) = -out(k), y(2k+1) = out'(k)
    hard_reset();
    for (int i = 0; i < 10; i++)
      load(i, (i == 0) ? 7'b0100000 : 7'b0101000, 1.0, 1.0, 1.0, th[9 - i], 0);
    set_net(NET_I, 10, 0, IN_BLOCK, 0);
    clear_queues();
    foreach (v0[k]) begin
      send(v1[k]);
      send(v0[k]);
    end
    idle(4);
    foreach (yq0[k]) begin
      ys.push_back(-real'(yq0[k]));
      ys.push_back(real'(yq1[k]));
    end
    // perfect reconstruction: y(n) = x(n - 2N + 1) apart from the pipeline
    // latency of both banks (N - 1 steps each, 2 samples per step)
    dly = 19 + 36;
    for (int n = 0; n + dly < ys.size(); n++)
      near("QMF reconstruction", ys[n + dly], xs[n], 40.0);
  endtask

  // ========================================================== H. QRD-LSL (Type IX)
  task automatic phase_qrd();
    // real-valued model, module m: out (state or energy), outp (lower output), ang
    real mo [8], mp [8], ma [8], dl [8], no [8], np [8], na [8];
    real xv, ai, bi, ang_in, tol;
    hard_reset();
    for (int i = 0; i < 2; i++) begin
      load(4*i,     7'b0100101, 0.0, 1.0, 1.0, 0.0, 0, KERNEL_CORDIC, CORDIC_VECTOR);
      load(4*i + 1, 7'b0101101, 0.0, 1.0, 1.0, 0.0, 0, KERNEL_CORDIC, CORDIC_VECTOR);
      load(4*i + 2, 7'b0100100, 0.0, 1.0, 1.0, 0.0, 0, KERNEL_CORDIC, CORDIC_ROTATE);
      load(4*i + 3, 7'b0100100, 0.0, 1.0, 1.0, 0.0, 0, KERNEL_CORDIC, CORDIC_ROTATE);
    end
    set_net(NET_IX, 2, 0, IN_DIRECT, 0);
    clear_queues();
    for (int m = 0; m < 8; m++) begin mo[m] = 0; mp[m] = 0; ma[m] = 0; dl[m] = 0; end
    for (int n = 0; n < 120; n++) begin
      // AR(1)-like input so the prediction errors shrink
      xv = real'($urandom_range(0, 2000)) - 1000.0 + ((n > 0) ? 0.8 * real'(x_in) : 0.0);
      send(sample_t'($rtoi(xv)));
      for (int m = 0; m < 8; m++) begin
        bi = (m < 2) ? xv : mp[m-2];               // in'_m
        if (m % 4 == 0 || m % 4 == 1) begin         // angle computer
          if (m % 4 == 1) begin ai = dl[m]; dl[m] = bi; bi = ai; end   // s3: delayed input
          na[m] = $atan2(bi, mo[m]);
          no[m] = $sqrt(mo[m] * mo[m] + bi * bi);
          np[m] = bi;                                // direct path
        end else begin                               // rotator, angle of the partner
          ang_in = (m % 4 == 2) ? ma[m-1] : ma[m-3];
          no[m] = mo[m] * $cos(ang_in) + bi * $sin(ang_in);
          np[m] = -mo[m] * $sin(ang_in) + bi * $cos(ang_in);
          na[m] = ang_in;
        end
      end
      mo = no; mp = np; ma = na;
      // the first 3N steps are the start-up transient: the energies are still
      // near zero, the angles ill-conditioned and the exact errors are zero
      if (n >= 6) begin
        tol = 0.01 * absr(mp[6]) + 0.002 * mo[4] + 24.0;
        near("QRD-LSL f(n)", real'(yq0[n]), mp[6], tol);
        tol = 0.01 * absr(mp[7]) + 0.002 * mo[5] + 24.0;
        near("QRD-LSL b(n)", real'(yq1[n]), mp[7], tol);
      end
      // keep the model on the hardware's state to avoid drift of the energies
      mo[0] = real'(dut.g_pe[0].u_pe.out_i); mo[1] = real'(dut.g_pe[1].u_pe.out_i);
      mo[4] = real'(dut.g_pe[4].u_pe.out_i); mo[5] = real'(dut.g_pe[5].u_pe.out_i);
    end
  endtask

endmodule
