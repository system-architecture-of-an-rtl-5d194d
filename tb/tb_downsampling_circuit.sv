// Self-checking testbench of downsampling_circuit.
// A known ramp-free random stream x(n) is sent one sample per clock (with
// idle clocks mixed in).  At every step the three streams are compared with
// their definitions in terms of x: IN_FFA x_0 = x(2k) - x(2k-1),
// x_1 = x(2k-1), x_2 = x(2k-2) - x(2k-1); IN_POLY x(2k), -x(2k-1); IN_BLOCK
// x(2k), x(2k+1).  It also checks that the array steps exactly once per two
// input samples, that IN_DIRECT passes x on all three streams, and that sync
// restarts the pairing.
module tb_downsampling_circuit;
  import dsp_pkg::*;

  logic     clk = 0, rst_n = 1, sync = 0, in_valid = 0;
  in_mode_e mode;
  sample_t  x_in, xs [3];
  logic     step;
  int       checks = 0, failures = 0;

  downsampling_circuit dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .sync(sync),
    .in_valid(in_valid), .x_in(x_in), .step(step), .xs(xs)
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
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist [0:1023];

  initial begin
    int steps, k;
    mode = IN_DIRECT; x_in = 0;
    #2 rst_n = 0;
    #2 rst_n = 1;
    for (int mi = 0; mi < 4; mi++) begin
      mode = in_mode_e'(mi);
      @(negedge clk);
      sync = 1;                       // start pairing on the next sample
      steps = 0;
      for (int n = 0; n < 200; n++) begin
        hist[n] = sample_t'($urandom_range(0, 100000)) - sample_t'(50000);
        if ($urandom_range(0, 3) == 0) begin   // idle clock
          in_valid = 0;
          @(negedge clk);
          sync = 0;
        end
        in_valid = 1;
        x_in = hist[n];
        #1;
        if (mode == IN_DIRECT) begin
          eq("direct x0", xs[0], hist[n]);
          eq("direct x2", xs[2], hist[n]);
        end else begin
          checks++;
          if (step !== (n % 2 == 1)) begin
            failures++;
            $display("FAIL step at sample %0d mode %0d", n, mi);
          end
          if (step) begin
            steps++;
            k = n / 2;  // pair k holds x(2k), x(2k+1)
            case (mode)
              IN_FFA: begin
                eq("ffa x0", xs[0], hist[2*k] - (k > 0 ? hist[2*k-1] : sample_t'(0)));
                eq("ffa x1", xs[1], (k > 0 ? hist[2*k-1] : sample_t'(0)));
                eq("ffa x2", xs[2], (k > 0 ? hist[2*k-2] : sample_t'(0))
                                     - (k > 0 ? hist[2*k-1] : sample_t'(0)));
              end
              IN_POLY: begin
                eq("poly x0", xs[0], hist[2*k]);
                eq("poly x1", xs[1], (k > 0 ? -hist[2*k-1] : sample_t'(0)));
              end
              default: begin
                eq("block even", xs[0], hist[2*k]);
                eq("block odd", xs[1], hist[2*k+1]);
              end
            endcase
          end
        end
        @(negedge clk);
        sync = 0;
        in_valid = 0;
      end
      if (mode != IN_DIRECT) eq("steps per 200 samples", sample_t'(steps), 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
