// tb_hard_syndrome: posteriors built around valid codewords (syndrome_ok
// must be 1, hard decision must return the codeword), around codewords with
// one or more symbols changed (syndrome_ok must be 0), and random ones with
// ties; the hard decision is compared with the reference argmin (lowest
// value wins ties) and syndrome_ok with the reference parity check.
module tb_hard_syndrome;
  import gf16_pkg::*;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  qvec_t qn [N];
  sym_t  hard [N];
  gf_t   syndrome [M];
  logic  syndrome_ok;
  int checks = 0, failures = 0;

  hard_syndrome dut (.qn(qn), .hard(hard), .syndrome(syndrome), .syndrome_ok(syndrome_ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t qv [NN];
    int   c [NN];
    int   info [KK];
    int   cw [NN];
    int   nvalid = 0;
    for (int t = 0; t < 300; t++) begin
      automatic int mode = t % 3;
      for (int n = 0; n < KK; n++) info[n] = int'($urandom % 16);
      encode(info, cw);
      if (mode == 1) begin
        automatic int pos = int'($urandom % 32);
        cw[pos] = cw[pos] ^ (1 + int'($urandom % 15));
      end
      for (int n = 0; n < N; n++)
        for (int a = 0; a < Q; a++) begin
          if (mode == 2) qv[n][a] = int'($urandom % 8);       // many ties
          else qv[n][a] = (a == cw[n]) ? int'($urandom % 3) : 3 + int'($urandom % 1000);
          qn[n][a] = QN_W'(qv[n][a]);
        end
      #1;
      ref_hard(qv, c);
      for (int n = 0; n < N; n++) begin
        checks++;
        if (int'(hard[n]) != c[n]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d hard[%0d]=%0d exp %0d", t, n, hard[n], c[n]);
        end
      end
      checks++;
      if (int'(syndrome_ok) != ref_syndrome_ok(c)) begin
        failures++;
        $display("FAIL t=%0d syndrome_ok=%0d", t, syndrome_ok);
      end
      if (mode == 0) begin
        nvalid++;
        checks++;
        if (!syndrome_ok) failures++;
      end
      if (mode == 1) begin
        checks++;
        if (syndrome_ok) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
