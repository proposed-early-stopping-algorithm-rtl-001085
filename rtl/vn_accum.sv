// vn_accum: the "variable-node accumulation" block.
// For every symbol n: Q_n(a) = L_n(a) + sum of R_{m->n}(a) over the edges
// of column n of H, for all 16 values a. The edge-to-column map comes from
// the sparse H description in nbldpc_pkg. QN_W is wide enough that the sum
// cannot overflow for column weights up to DV_MAX; it still saturates at
// 2^QN_W-1 as a guard. The extrinsic (leave-one-out) sums are obtained in the
// check nodes as Q_n - R_{m->n}. Combinational.
module vn_accum
  import nbldpc_pkg::*;
(
  input  lvec_t l  [N],
  input  mvec_t r  [NE],
  output qvec_t qn [N]
);
  logic [QN_W:0] acc [N][Q];

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int a = 0; a < Q; a++) acc[n][a] = (QN_W+1)'(l[n][a]);
    // walk the edges once, adding each message to its column's sum
    for (int e = 0; e < NE; e++)
      for (int a = 0; a < Q; a++)
        acc[edge_col(e)][a] = acc[edge_col(e)][a] + (QN_W+1)'(r[e][a]);
    for (int n = 0; n < N; n++)
      for (int a = 0; a < Q; a++)
        qn[n][a] = acc[n][a][QN_W] ? '1 : acc[n][a][QN_W-1:0];
  end
endmodule
