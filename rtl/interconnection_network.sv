// Reconfigurable interconnection network of the DSP engine.
//
// Connects the outputs of the P programmable modules to their inputs and to
// the engine outputs according to the nine network settings:
//   Type I    FIR/QMF cascade: in_0 = x, in_{m+1} = out_m, in'_{m+1} = out'_m,
//             y = out_{N-1}; in'_0 = x_1 and y[1] = out'_{N-1} carry the second
//             polyphase input and the second subband of a QMF analysis bank
//   Type II   multirate FIR: in_i = x_i (i<3), in_{m+3} = out_m, in'_{m+3} = out'_m,
//             y_i = out_{3N/2-3+i}
//   Type III  IIR: in_0 = in_1 = x, in_{m+2} = out_{2[m/2]} + out_{2[m/2]+1},
//             y = out_{N-1} + out_{N-2}
//   Type IV   multirate IIR: in_i = x_{[i/2]} (i<6),
//             in_{m+6} = out_{2[m/2]} + out_{2[m/2]+1}, y_i = out_{3N-5+2i} + out_{3N-6+2i}
//   Type V    DCT/IDCT: X(i) = C_i (a DST-IV, X(i) = S_i, is read from Type VII)
//   Type VI   MLT:      X(i) = -s_i (C_{i+1} + S_i)
//   Type VII  DFT:      Re X(i) = C_i, Im X(i) = S_i
//   Type VIII DHT:      X(i) = C_i + S_i
//   Type IX   QRD-LSL:  in'_0 = in'_1 = x, in'_{m+2} = out'_m, and for m = 0 mod 4
//             mu_in(m+3) = mu_out(m), mu_in(m+2) = mu_out(m+1);
//             f = out'_{4N-2}, b = out'_{4N-1}
// For the transform types every module receives x on both inputs and
// C_i = out_i, S_i = out'_i.  With multirate set (multirate DT), module 2k
// gets the even stream x_0 and module 2k+1 the odd stream x_1, and the
// summation circuit forms C_k = out_{2k} + out_{2k+1}, S_k = out'_{2k} + out'_{2k+1}
// before the combination function.
//
// The routing rules are those of the architecture's settings table.  This
// design's choices: modules beyond the programmed order stay wired by the same
// rule (their outputs are simply not used); indices outside the array read
// zero; in_i of the QRD-LSL type and the in'_i not named by a rule carry the
// same value as in_i; an MLT needs module N for C_N, so N <= P-1 there.
// mu_ins is driven only inside the QRD-LSL groups of four (the only function
// that passes rotations between modules); the mu_ins of the angle computers
// and every mu_ins outside Type IX are zero, so those output bits are
// constant by design.
//
// Purely combinational.  Outputs: y[0..2] (filter outputs; y[0], y[1] are
// f(n), b(n) for QRD-LSL) and xa/xb (transform coefficients; xb is the
// imaginary part for the DFT and zero otherwise).
module interconnection_network
  import dsp_pkg::*;
#(
  parameter int P = 12
) (
  input  net_cfg_t cfg,
  input  sample_t  x      [3],   // host streams (x, or x_0..x_2 in multirate)
  input  sample_t  outs   [P],   // out_i
  input  sample_t  outs_p [P],   // out'_i
  input  mu_t      mu_outs[P],
  output sample_t  ins    [P],   // in_i
  output sample_t  ins_p  [P],   // in'_i
  output mu_t      mu_ins [P],
  output sample_t  y      [3],
  output sample_t  xa     [P],
  output sample_t  xb     [P]
);

  function automatic sample_t o(input int idx);
    return (idx >= 0 && idx < P) ? outs[idx] : sample_t'(0);
  endfunction

  function automatic sample_t op(input int idx);
    return (idx >= 0 && idx < P) ? outs_p[idx] : sample_t'(0);
  endfunction

  sample_t cc [P+1];  // C_k, with C_P = 0
  sample_t ss [P];    // S_k
  int      n;

  always_comb begin
    n = int'(cfg.order);
    for (int i = 0; i < P; i++) begin
      ins[i]    = '0;
      ins_p[i]  = '0;
      mu_ins[i] = '0;
      xa[i]     = '0;
      xb[i]     = '0;
    end
    for (int k = 0; k < 3; k++) y[k] = '0;
    for (int k = 0; k <= P; k++) cc[k] = '0;
    for (int k = 0; k < P; k++) ss[k] = '0;

    unique case (cfg.ntype)
      NET_I: begin
        for (int i = 0; i < P; i++) begin
          ins[i]   = (i == 0) ? x[0] : o(i-1);
          ins_p[i] = (i == 0) ? x[1] : op(i-1);
        end
        y[0] = o(n-1);
        y[1] = op(n-1);
      end
      NET_II: begin
        for (int i = 0; i < P; i++) begin
          ins[i]   = (i < 3) ? x[i] : o(i-3);
          ins_p[i] = (i < 3) ? x[i] : op(i-3);
        end
        for (int k = 0; k < 3; k++) y[k] = o((3*n)/2 - 3 + k);
      end
      NET_III: begin
        for (int i = 0; i < P; i++) begin
          ins[i]   = (i < 2) ? x[0] : o(2*((i-2)/2)) + o(2*((i-2)/2) + 1);
          ins_p[i] = ins[i];
        end
        y[0] = o(n-1) + o(n-2);
      end
      NET_IV: begin
        for (int i = 0; i < P; i++) begin
          ins[i]   = (i < 6) ? x[i/2] : o(2*((i-6)/2)) + o(2*((i-6)/2) + 1);
          ins_p[i] = ins[i];
        end
        for (int k = 0; k < 3; k++) y[k] = o(3*n - 5 + 2*k) + o(3*n - 6 + 2*k);
      end
      NET_IX: begin
        for (int i = 0; i < P; i++) begin
          ins_p[i] = (i < 2) ? x[0] : op(i-2);
          ins[i]   = ins_p[i];
        end
        for (int m = 0; m + 3 < P; m += 4) begin
          mu_ins[m+3] = mu_outs[m];
          mu_ins[m+2] = mu_outs[m+1];
        end
        y[0] = op(4*n - 2);
        y[1] = op(4*n - 1);
      end
      default: begin  // transform types V..VIII
        for (int i = 0; i < P; i++) begin
          ins[i]   = (cfg.multirate && i[0]) ? x[1] : x[0];
          ins_p[i] = ins[i];
        end
        for (int k = 0; k < P; k++) begin
          if (cfg.multirate) begin
            cc[k] = o(2*k) + o(2*k + 1);
            ss[k] = op(2*k) + op(2*k + 1);
          end else begin
            cc[k] = o(k);
            ss[k] = op(k);
          end
        end
        for (int k = 0; k < P; k++) begin
          unique case (cfg.ntype)
            NET_VI:   xa[k] = (k % 4 == 0 || k % 4 == 3) ? (cc[k+1] + ss[k])
                                                         : -(cc[k+1] + ss[k]);
            NET_VII: begin
              xa[k] = cc[k];
              xb[k] = ss[k];
            end
            NET_VIII: xa[k] = cc[k] + ss[k];
            default:  xa[k] = cc[k];
          endcase
        end
      end
    endcase
  end

endmodule
