// tb_cn_unit: one check node (row 3) against the exhaustive-search Min-Sum
// reference. Inputs are random posteriors and stored messages, including
// cases where R exceeds Q_n (clamped to 0), large values that saturate, and
// consistent cases built from a codeword, where the row's own codeword
// symbols must come out with cost 0. A second instance checks the optional
// normalized (3/4) plus offset (2) correction.
module tb_cn_unit;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int ROWSEL = 3;
  qvec_t qn [DC];
  mvec_t r_old [DC], r_new [DC], r_nms [DC];
  int checks = 0, failures = 0;

  cn_unit #(.ROW(ROWSEL)) dut (.qn(qn), .r_old(r_old), .r_new(r_new));
  // the same row with normalization 3/4 and offset 2 enabled
  cn_unit #(.ROW(ROWSEL), .ALPHA_NUM(3), .ALPHA_DEN(4), .BETA(2)) dut_nms (
    .qn(qn), .r_old(r_old), .r_new(r_nms));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t q [DCC];
    vec_t r [DCC];
    vec_t o [DCC];
    vec_t on [DCC];
    for (int t = 0; t < 60; t++) begin
      automatic int mode = t % 3;
      for (int k = 0; k < DC; k++)
        for (int a = 0; a < Q; a++) begin
          case (mode)
            0: begin q[k][a] = int'($urandom % 1024); r[k][a] = int'($urandom % 256); end
            1: begin q[k][a] = int'($urandom % 64);   r[k][a] = int'($urandom % 16); end
            default: begin r[k][a] = int'($urandom % 256); q[k][a] = r[k][a] + int'($urandom % 600); end
          endcase
        end
      if (t % 5 == 4) begin
        // posterior favouring a valid codeword's symbols of this row
        int info [16];
        int cw [32];
        for (int n = 0; n < 16; n++) info[n] = int'($urandom % 16);
        encode(info, cw);
        for (int k = 0; k < DC; k++)
          for (int a = 0; a < Q; a++) begin
            r[k][a] = 0;
            q[k][a] = (a == cw[rcol(ROWSEL * 4 + k)]) ? 0 : 20 + int'($urandom % 40);
          end
      end
      for (int k = 0; k < DC; k++)
        for (int a = 0; a < Q; a++) begin
          qn[k][a]    = QN_W'(q[k][a]);
          r_old[k][a] = MSG_W'(r[k][a]);
        end
      #1;
      ref_cn(ROWSEL, q, r, o);
      ref_cn(ROWSEL, q, r, on, 3, 4, 2);
      for (int k = 0; k < DC; k++)
        for (int a = 0; a < Q; a++) begin
          checks++;
          if (int'(r_nms[k][a]) != on[k][a]) begin
            failures++;
            if (failures < 10) $display("FAIL corrected t=%0d k=%0d a=%0d got %0d exp %0d", t, k, a, r_nms[k][a], on[k][a]);
          end
        end
      for (int k = 0; k < DC; k++)
        for (int a = 0; a < Q; a++) begin
          checks++;
          if (int'(r_new[k][a]) != o[k][a]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d k=%0d a=%0d got %0d exp %0d", t, k, a, r_new[k][a], o[k][a]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
