// Self-checking testbench of cordic_processor.
// Angle accumulation mode: random vectors with x >= 0 must come out as
// (|v|, ~0), checked against sqrt in real arithmetic.  Vector rotation mode:
// the mu word produced by annihilating a reference vector u is used to rotate
// a second vector w; the result must equal w rotated by -atan2(u_y, u_x),
// worked out with real trigonometry.  Tolerance: 0.1 % of the magnitude plus
// 4 LSB (finite iteration count and truncation).
module tb_cordic_processor;
  import dsp_pkg::*;

  cordic_mode_e mode;
  sample_t      xi, yi, xo, yo;
  mu_t          mi, mo;
  int           checks = 0, failures = 0;

  cordic_processor dut (
    .mode(mode), .x_in(xi), .y_in(yi), .mu_in(mi),
    .x_out(xo), .y_out(yo), .mu_out(mo)
  );

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic expect_near(input string what, input real got, input real exp, input real mag);
    checks++;
    if (absr(got - exp) > 0.001 * mag + 4.0) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ux, uy, wx, wy, mag, ang, ex, ey;
    mu_t mu_u;
    mi = '0;
    for (int t = 0; t < 1000; t++) begin
      ux = real'($urandom_range(0, 200000));
      uy = real'($urandom_range(0, 400000)) - 200000.0;
      if (t == 0) begin ux = 0.0; uy = 50000.0; end  // vector on the y axis
      // angle accumulation
      mode = CORDIC_VECTOR; xi = sample_t'($rtoi(ux)); yi = sample_t'($rtoi(uy));
      #1;
      mag = $sqrt(ux*ux + uy*uy);
      expect_near("vector |u|", real'(xo), mag, mag);
      expect_near("vector y->0", real'(yo), 0.0, mag);
      mu_u = mo;
      // rotation by the same angle
      wx = real'($urandom_range(0, 400000)) - 200000.0;
      wy = real'($urandom_range(0, 400000)) - 200000.0;
      mode = CORDIC_ROTATE; xi = sample_t'($rtoi(wx)); yi = sample_t'($rtoi(wy)); mi = mu_u;
      #1;
      ang = -$atan2(uy, ux);
      ex  = wx * $cos(ang) - wy * $sin(ang);
      ey  = wx * $sin(ang) + wy * $cos(ang);
      mag = $sqrt(wx*wx + wy*wy);
      expect_near("rotate x", real'(xo), ex, mag);
      expect_near("rotate y", real'(yo), ey, mag);
      checks++;
      if (mo !== mu_u) begin
        failures++;
        $display("FAIL mu_out does not repeat mu_in in rotation mode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
