// Self-checking testbench of rotation_circuit.
// Drives random vectors and coefficients in both the circular and the
// hyperbolic form, plus exact angles (0, 90 degrees, a real cosh/sinh pair),
// and compares against the rotation worked out in real arithmetic, allowing
// one LSB for rounding.  The circuit is combinational: each check samples the
// outputs 1 ns after the inputs change.
module tb_rotation_circuit;
  import dsp_pkg::*;

  sample_t a, b, y0, y1;
  coef_t   c, s;
  logic    hyp;
  int      checks = 0, failures = 0;

  rotation_circuit dut (.a(a), .b(b), .c(c), .s(s), .hyp(hyp), .y0(y0), .y1(y1));

  localparam real SC = real'(1 << CFRAC);

  task automatic check(input string what);
    real cr, sr, e0, e1;
    #1;
    cr = real'(c) / SC;
    sr = real'(s) / SC;
    e0 = cr * real'(a) + sr * real'(b);
    e1 = (hyp ? sr : -sr) * real'(a) + cr * real'(b);
    checks += 2;
    if ((real'(y0) - e0) > 1.01 || (e0 - real'(y0)) > 1.01) begin
      failures++;
      $display("FAIL %s y0=%0d expected %f", what, y0, e0);
    end
    if ((real'(y1) - e1) > 1.01 || (e1 - real'(y1)) > 1.01) begin
      failures++;
      $display("FAIL %s y1=%0d expected %f", what, y1, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // quarter turn, circular: (a, b) -> (b, -a)
    a = 1000; b = 250; c = 0; s = coef_t'(1 << CFRAC); hyp = 0;
    check("quarter turn");
    if (y0 !== 250 || y1 !== -1000) begin
      failures++;
      $display("FAIL quarter turn exact: %0d %0d", y0, y1);
    end
    checks++;
    // theta = 0.4812 hyperbolic (first FIR lattice section of the design example)
    a = 4096; b = -2048; hyp = 1;
    c = coef_t'($rtoi($cosh(0.4812) * SC));
    s = coef_t'($rtoi($sinh(0.4812) * SC));
    check("hyperbolic");
    for (int i = 0; i < 2000; i++) begin
      a   = sample_t'($urandom_range(0, 1 << 20)) - sample_t'(1 << 19);
      b   = sample_t'($urandom_range(0, 1 << 20)) - sample_t'(1 << 19);
      c   = coef_t'($urandom_range(0, 1 << 19)) - coef_t'(1 << 18);
      s   = coef_t'($urandom_range(0, 1 << 19)) - coef_t'(1 << 18);
      hyp = 1'($urandom_range(0, 1));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
