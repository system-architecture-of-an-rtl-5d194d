// Self-checking testbench of upsampling_circuit.
// Random subfilter outputs y[0..2] are presented with y_valid every second
// clock (the rate at which the array steps in multirate mode).  The serial
// output must deliver y[2] + y[1] on the clock after y_valid and y[0] + y[1]
// on the clock after that, with ys_valid high on exactly those clocks, i.e.
// one output sample per clock, the full sample rate.
module tb_upsampling_circuit;
  import dsp_pkg::*;

  logic    clk = 0, rst_n = 1, y_valid = 0;
  sample_t y [3];
  logic    ys_valid;
  sample_t ys;
  int      checks = 0, failures = 0;

  upsampling_circuit dut (
    .clk(clk), .rst_n(rst_n), .y_valid(y_valid), .y(y), .ys_valid(ys_valid), .ys(ys)
  );

  always #5 clk = ~clk;

  task automatic eq(input string what, input sample_t got, input sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t e_first, e_second;
    int      outs;
    y[0] = 0; y[1] = 0; y[2] = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    @(negedge clk);
    eq("idle valid", sample_t'(ys_valid), 0);
    outs = 0;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 3; k++) y[k] = sample_t'($urandom_range(0, 100000)) - sample_t'(50000);
      e_first  = y[2] + y[1];
      e_second = y[0] + y[1];
      y_valid = 1;
      @(negedge clk);
      y_valid = 0;
      y[0] = 0; y[1] = 0; y[2] = 0;
      eq("first valid", sample_t'(ys_valid), 1);
      eq("y(2k-1)", ys, e_first);
      outs += int'(ys_valid);
      @(negedge clk);
      eq("second valid", sample_t'(ys_valid), 1);
      eq("y(2k)", ys, e_second);
      outs += int'(ys_valid);
    end
    @(negedge clk);
    eq("drained", sample_t'(ys_valid), 0);
    eq("outputs", sample_t'(outs), 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
