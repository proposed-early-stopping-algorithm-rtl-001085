// tb_cn_array: all 16 check nodes with random posteriors and messages,
// each row compared with the exhaustive-search reference (checks the
// sparse column/coefficient routing of every edge).
module tb_cn_array;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  qvec_t qn [N];
  mvec_t r_old [NE], r_new [NE];
  int checks = 0, failures = 0;

  cn_array dut (.qn(qn), .r_old(r_old), .r_new(r_new));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t q [NN];
    vec_t r [NEE];
    for (int t = 0; t < 6; t++) begin
      for (int n = 0; n < N; n++)
        for (int a = 0; a < Q; a++) q[n][a] = int'($urandom % ((t % 2) ? 100 : 1024));
      for (int e = 0; e < NE; e++)
        for (int a = 0; a < Q; a++) r[e][a] = int'($urandom % ((t % 2) ? 30 : 256));
      for (int n = 0; n < N; n++) for (int a = 0; a < Q; a++) qn[n][a] = QN_W'(q[n][a]);
      for (int e = 0; e < NE; e++) for (int a = 0; a < Q; a++) r_old[e][a] = MSG_W'(r[e][a]);
      #1;
      for (int m = 0; m < M; m++) begin
        vec_t qr [DCC];
        vec_t rr [DCC];
        vec_t o [DCC];
        for (int k = 0; k < DCC; k++) begin
          qr[k] = q[rcol(m * 4 + k)];
          rr[k] = r[m * 4 + k];
        end
        ref_cn(m, qr, rr, o);
        for (int k = 0; k < DCC; k++)
          for (int a = 0; a < Q; a++) begin
            checks++;
            if (int'(r_new[m * 4 + k][a]) != o[k][a]) begin
              failures++;
              if (failures < 10) $display("FAIL row %0d edge %0d a=%0d", m, k, a);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
