// hard_syndrome: the "hard decision & syndrome" block.
// Hard decision: for every symbol the value a of lowest posterior cost Q_n(a)
// (the most reliable symbol); ties go to the smaller value of a.
// Syndrome: for every check m, s_m = XOR over its edges of h_{m,n} * c_n in
// GF(16), each product formed by a gf16_mul look-up-table multiplier;
// syndrome_ok is high when every s_m is zero, i.e. H c^T = 0.
// Combinational.
module hard_syndrome
  import gf16_pkg::*;
  import nbldpc_pkg::*;
(
  input  qvec_t qn   [N],
  output sym_t  hard [N],
  output gf_t   syndrome [M],
  output logic  syndrome_ok
);
  always_comb begin
    for (int n = 0; n < N; n++) begin
      logic [QN_W-1:0] best;
      best    = qn[n][0];
      hard[n] = '0;
      for (int a = 1; a < Q; a++)
        if (qn[n][a] < best) begin
          best    = qn[n][a];
          hard[n] = sym_t'(a);
        end
    end
  end

  gf_t prod [NE];
  for (genvar e = 0; e < NE; e++) begin : g_edge
    gf16_mul u_mul (
      .a(edge_coef(e)),
      .b(hard[edge_col(e)]),
      .p(prod[e])
    );
  end

  always_comb begin
    syndrome_ok = 1'b1;
    for (int m = 0; m < M; m++) begin
      syndrome[m] = '0;
      for (int k = 0; k < DC; k++) syndrome[m] ^= prod[m * DC + k];
      if (syndrome[m] != '0) syndrome_ok = 1'b0;
    end
  end
endmodule
