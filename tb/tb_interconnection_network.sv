// Self-checking testbench of interconnection_network (P = 12).
// For every network type and several orders N, random module outputs and
// host streams are applied and each module input and each network output is
// compared with the rule of the settings table, written out here index by
// index: cascades (Types I, II), pairwise sums (Types III, IV), transform
// combination functions with and without the multirate even/odd summation
// (Types V-VIII, including the MLT sign pattern -s_i), and the QRD-LSL lower
// cascade with its mu exchange (Type IX).  Purely combinational: each check
// samples 1 ns after the inputs change.
module tb_interconnection_network;
  import dsp_pkg::*;

  localparam int P = 12;

  net_cfg_t cfg;
  sample_t  x [3];
  sample_t  outs [P], outs_p [P], ins [P], ins_p [P], y [3], xa [P], xb [P];
  mu_t      mu_outs [P], mu_ins [P];
  int       checks = 0, failures = 0;

  interconnection_network #(.P(P)) dut (
    .cfg(cfg), .x(x), .outs(outs), .outs_p(outs_p), .mu_outs(mu_outs),
    .ins(ins), .ins_p(ins_p), .mu_ins(mu_ins), .y(y), .xa(xa), .xb(xb)
  );

  task automatic eq(input string what, input int idx, input sample_t got, input sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s[%0d]: got %0d expected %0d (type %0d N %0d)", what, idx, got, exp,
               cfg.ntype, cfg.order);
    end
  endtask

  task automatic randomize_inputs();
    for (int i = 0; i < P; i++) begin
      outs[i]    = sample_t'($urandom_range(0, 200000)) - sample_t'(100000);
      outs_p[i]  = sample_t'($urandom_range(0, 200000)) - sample_t'(100000);
      mu_outs[i] = mu_t'($urandom);
    end
    for (int k = 0; k < 3; k++) x[k] = sample_t'($urandom_range(0, 200000)) - sample_t'(100000);
    #1;
  endtask

  function automatic int msign(input int i);  // -s_i of the MLT
    int s;
    if (i % 2 == 0) s = (((i + 2) / 2) % 2 == 0) ? 1 : -1;
    else            s = (((i - 1) / 2) % 2 == 0) ? 1 : -1;
    return -s;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t c [P+1], s [P];
    cfg = '0;
    for (int rep = 0; rep < 20; rep++) begin
      // Type I, N = 9 (the FIR design example)
      cfg.ntype = NET_I; cfg.order = 9; cfg.multirate = 0; randomize_inputs();
      eq("I in", 0, ins[0], x[0]);
      eq("I in'", 0, ins_p[0], x[1]);
      for (int m = 0; m <= 7; m++) begin
        eq("I in", m + 1, ins[m+1], outs[m]);
        eq("I in'", m + 1, ins_p[m+1], outs_p[m]);
      end
      eq("I y", 0, y[0], outs[8]);
      eq("I y'", 1, y[1], outs_p[8]);

      // Type II, N = 6 (nine modules)
      cfg.ntype = NET_II; cfg.order = 6; randomize_inputs();
      for (int i = 0; i < 3; i++) eq("II in", i, ins[i], x[i]);
      for (int m = 0; m <= 5; m++) begin
        eq("II in", m + 3, ins[m+3], outs[m]);
        eq("II in'", m + 3, ins_p[m+3], outs_p[m]);
      end
      for (int i = 0; i < 3; i++) eq("II y", i, y[i], outs[6+i]);

      // Type III, N = 10
      cfg.ntype = NET_III; cfg.order = 10; randomize_inputs();
      eq("III in", 0, ins[0], x[0]);
      eq("III in", 1, ins[1], x[0]);
      for (int m = 0; m <= 7; m++)
        eq("III in", m + 2, ins[m+2], outs[2*(m/2)] + outs[2*(m/2)+1]);
      eq("III y", 0, y[0], outs[9] + outs[8]);

      // Type IV, N = 4 (twelve modules)
      cfg.ntype = NET_IV; cfg.order = 4; randomize_inputs();
      for (int i = 0; i < 6; i++) eq("IV in", i, ins[i], x[i/2]);
      for (int m = 0; m <= 5; m++)
        eq("IV in", m + 6, ins[m+6], outs[2*(m/2)] + outs[2*(m/2)+1]);
      for (int i = 0; i < 3; i++) eq("IV y", i, y[i], outs[7+2*i] + outs[6+2*i]);

      // Types V..VIII, plain and multirate
      for (int mr = 0; mr < 2; mr++) begin
        for (int t = 5; t <= 8; t++) begin
          cfg.ntype = net_type_e'(t); cfg.order = 8; cfg.multirate = 1'(mr); randomize_inputs();
          for (int i = 0; i < P; i++) begin
            eq("DT in", i, ins[i], (mr == 1 && i % 2 == 1) ? x[1] : x[0]);
            eq("DT in'", i, ins_p[i], (mr == 1 && i % 2 == 1) ? x[1] : x[0]);
          end
          for (int k = 0; k <= P; k++) c[k] = 0;
          for (int k = 0; k < P; k++) begin
            if (mr == 1) begin
              c[k] = (2*k   < P ? outs[2*k]     : sample_t'(0)) + (2*k+1 < P ? outs[2*k+1]   : sample_t'(0));
              s[k] = (2*k   < P ? outs_p[2*k]   : sample_t'(0)) + (2*k+1 < P ? outs_p[2*k+1] : sample_t'(0));
            end else begin
              c[k] = outs[k];
              s[k] = outs_p[k];
            end
          end
          for (int k = 0; k < P; k++) begin
            case (t)
              5: eq("DCT", k, xa[k], c[k]);
              6: eq("MLT", k, xa[k], sample_t'(msign(k)) * (c[k+1] + s[k]));
              7: begin eq("DFT re", k, xa[k], c[k]); eq("DFT im", k, xb[k], s[k]); end
              default: eq("DHT", k, xa[k], c[k] + s[k]);
            endcase
          end
        end
      end
      cfg.multirate = 0;

      // Type IX, N = 2 (eight modules)
      cfg.ntype = NET_IX; cfg.order = 2; randomize_inputs();
      eq("IX in'", 0, ins_p[0], x[0]);
      eq("IX in'", 1, ins_p[1], x[0]);
      for (int m = 0; m <= 5; m++) eq("IX in'", m + 2, ins_p[m+2], outs_p[m]);
      for (int m = 0; m <= 4; m += 4) begin
        checks += 2;
        if (mu_ins[m+3] !== mu_outs[m] || mu_ins[m+2] !== mu_outs[m+1]) begin
          failures++;
          $display("FAIL IX mu exchange at %0d", m);
        end
      end
      eq("IX f", 0, y[0], outs_p[6]);
      eq("IX b", 1, y[1], outs_p[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
