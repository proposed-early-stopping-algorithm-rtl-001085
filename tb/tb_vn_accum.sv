// tb_vn_accum: random channel costs and edge messages; every posterior
// Q_n(a) must equal L_n(a) plus the messages of the edges in column n,
// including the weight-3 and weight-1 columns and values near the top.
module tb_vn_accum;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  lvec_t l [N];
  mvec_t r [NE];
  qvec_t qn [N];
  int checks = 0, failures = 0;

  vn_accum dut (.l(l), .r(r), .qn(qn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t lv [NN];
    vec_t rv [NEE];
    vec_t qv [NN];
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < N; n++)
        for (int a = 0; a < Q; a++) begin
          lv[n][a] = (t % 3 == 0) ? 124 : int'($urandom % 125);
          l[n][a]  = L_W'(lv[n][a]);
        end
      for (int e = 0; e < NE; e++)
        for (int a = 0; a < Q; a++) begin
          rv[e][a] = (t % 3 == 0) ? 255 : int'($urandom % 256);
          r[e][a]  = MSG_W'(rv[e][a]);
        end
      #1;
      ref_vn(lv, rv, qv);
      for (int n = 0; n < N; n++)
        for (int a = 0; a < Q; a++) begin
          checks++;
          if (int'(qn[n][a]) != qv[n][a]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d a=%0d got %0d exp %0d", n, a, qn[n][a], qv[n][a]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
