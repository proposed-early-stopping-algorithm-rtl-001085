// cn_unit: Min-Sum update of one check node (row ROW of H), combinational.
//
// For each of its DC edges k (column n_k, coefficient h_k) the unit
//  1. forms the extrinsic variable-to-check message
//       Q_k(a) = Q_{n_k}(a) - R_old_k(a)
//     (the posterior minus what this check contributed last iteration),
//     subtracts its minimum so the best symbol costs 0 and saturates it to
//     MSG_W bits;
//  2. re-indexes it by the edge's contribution beta = h_k * a to the parity
//     sum: P_k(beta) = Q_k(h_k^-1 * beta);
//  3. combines the other edges with a min-plus convolution over GF(16)
//     addition (XOR):  (X (*) Y)(g) = min over b of X(b) + Y(b ^ g),
//     using forward partial results F_k = P_0 (*) ... (*) P_k and backward
//     ones B_k = P_k (*) ... (*) P_(DC-1), so the result for edge k is
//     F_(k-1) (*) B_(k+1): 3*(DC-2) convolutions in total;
//  4. maps back: R_new_k(a) = that result at beta = h_k * a, because the
//     check is satisfied when h_k * a equals the XOR of the other terms.
// By default this is the plain Min-Sum rule (no normalization or offset, i.e.
// alpha=1, beta=0), the specified baseline. The normalized and offset
// variants are available through ALPHA_NUM/ALPHA_DEN and BETA; here they act
// on costs (the cost is scaled down, then reduced by BETA and clipped at 0),
// which is how both corrections temper over-confident messages in this
// representation - that reading is this design's. The forward/backward
// organization, the
// cost-domain arithmetic and the saturating widths are this design's choices.
// All sums saturate at 2^MSG_W-1, which keeps the result equal to the
// saturated exact minimum. Latency: none (one iteration per clock cycle).
module cn_unit
  import gf16_pkg::*;
  import nbldpc_pkg::*;
#(
  parameter int unsigned ROW       = 0,
  // optional corrections, both off by default (plain Min-Sum):
  // normalized Min-Sum scales every output by ALPHA_NUM/ALPHA_DEN (<= 1),
  // offset Min-Sum then subtracts BETA and clips at 0
  parameter int unsigned ALPHA_NUM = 1,
  parameter int unsigned ALPHA_DEN = 1,
  parameter int unsigned BETA      = 0
) (
  input  qvec_t qn    [DC],   // posterior of the DC columns of this row
  input  mvec_t r_old [DC],   // stored R of this row's edges
  output mvec_t r_new [DC]
);
  // min-plus convolution over GF(16) addition
  function automatic mvec_t conv(input mvec_t xa, input mvec_t xb);
    mvec_t res;
    for (int g = 0; g < Q; g++) begin
      logic [MSG_W-1:0] best = MSG_MAX;
      for (int b = 0; b < Q; b++) begin
        logic [MSG_W-1:0] s = sat_add(xa[b], xb[b ^ g]);
        if (s < best) best = s;
      end
      res[g] = best;
    end
    return res;
  endfunction

  mvec_t qe [DC];   // normalized extrinsic messages
  mvec_t pe [DC];   // permuted by coefficient
  mvec_t fw [DC];   // forward partial convolutions
  mvec_t bw [DC];   // backward partial convolutions
  mvec_t rp [DC];   // results in the permuted domain

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      logic [QN_W-1:0] d [Q];
      logic [QN_W-1:0] mn;
      mn = '1;
      for (int a = 0; a < Q; a++) begin
        d[a] = (qn[k][a] >= QN_W'(r_old[k][a])) ? qn[k][a] - QN_W'(r_old[k][a]) : '0;
        if (d[a] < mn) mn = d[a];
      end
      for (int a = 0; a < Q; a++) begin
        logic [QN_W-1:0] v;
        v = d[a] - mn;
        qe[k][a] = (v > QN_W'(MSG_MAX)) ? MSG_MAX : v[MSG_W-1:0];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      gf_t h;
      h = edge_coef(ROW * DC + k);
      for (int a = 0; a < Q; a++) pe[k][gf_mul(h, gf_t'(a))] = qe[k][a];
    end
  end

  always_comb begin
    // fw[DC-1] and bw[0] (the full-row convolution) are never needed
    fw[0]    = pe[0];
    fw[DC-1] = '0;
    for (int k = 1; k < DC - 1; k++) fw[k] = conv(fw[k-1], pe[k]);
    bw[DC-1] = pe[DC-1];
    bw[0]    = '0;
    for (int k = DC - 2; k >= 1; k--) bw[k] = conv(bw[k+1], pe[k]);
    rp[0]    = bw[1];
    rp[DC-1] = fw[DC-2];
    for (int k = 1; k < DC - 1; k++) rp[k] = conv(fw[k-1], bw[k+1]);
  end

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      gf_t h;
      h = edge_coef(ROW * DC + k);
      for (int a = 0; a < Q; a++) begin
        logic [MSG_W-1:0] v;
        logic [MSG_W-1:0] sc;
        v  = rp[k][gf_mul(h, gf_t'(a))];
        sc = MSG_W'((32'(v) * ALPHA_NUM) / ALPHA_DEN);
        r_new[k][a] = (32'(sc) > BETA) ? MSG_W'(32'(sc) - BETA) : '0;
      end
    end
  end
endmodule
