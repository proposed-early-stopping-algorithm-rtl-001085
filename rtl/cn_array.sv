// cn_array: the "Min-Sum check-node update" block: all M check nodes of the
// parity-check matrix updated in parallel, one cn_unit per row.
// The sparse description of H (column and coefficient per edge, edge
// e = m*DC + k) in nbldpc_pkg decides which posterior vectors each row reads;
// the R messages are indexed by edge, so row m owns edges m*DC .. m*DC+DC-1.
// Processing every row at once so that a whole iteration fits in one clock
// cycle is this design's choice. Combinational.
module cn_array
  import nbldpc_pkg::*;
#(
  parameter int unsigned ALPHA_NUM = 1,   // normalization, see cn_unit
  parameter int unsigned ALPHA_DEN = 1,
  parameter int unsigned BETA      = 0    // offset, see cn_unit
) (
  input  qvec_t qn    [N],
  input  mvec_t r_old [NE],
  output mvec_t r_new [NE]
);
  for (genvar m = 0; m < M; m++) begin : g_row
    qvec_t q_row [DC];
    mvec_t ro_row [DC];
    mvec_t rn_row [DC];
    for (genvar k = 0; k < DC; k++) begin : g_edge
      assign q_row[k]  = qn[edge_col(m * DC + k)];
      assign ro_row[k] = r_old[m * DC + k];
      assign r_new[m * DC + k] = rn_row[k];
    end
    cn_unit #(.ROW(m), .ALPHA_NUM(ALPHA_NUM), .ALPHA_DEN(ALPHA_DEN), .BETA(BETA)) u_cn (
      .qn   (q_row),
      .r_old(ro_row),
      .r_new(rn_row)
    );
  end
endmodule
