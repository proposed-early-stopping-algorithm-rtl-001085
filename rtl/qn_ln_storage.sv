// qn_ln_storage: the "Q_n, L_n storage" of the decoding core.
// Holds, for all N symbols, the channel costs L_n (written once per frame
// from the mapper) and the posterior costs Q_n (set to L_n at frame
// initialization, then rewritten at the end of every iteration by the
// variable-node accumulation). Q_n is QN_W bits wide so that it never
// saturates; the check nodes can then recover the extrinsic message exactly
// as Q_n - R_{m->n}. Register based, one write per edge, outputs read
// directly. Priority when several controls are high: init over qn_we.
module qn_ln_storage
  import nbldpc_pkg::*;
(
  input  logic  clk,
  input  logic  l_we,
  input  lvec_t l_in  [N],
  input  logic  init,
  input  logic  qn_we,
  input  qvec_t qn_in [N],
  output lvec_t l_out [N],
  output qvec_t qn_out[N]
);
  always_ff @(posedge clk) begin
    if (l_we) l_out <= l_in;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      for (int n = 0; n < N; n++)
        for (int a = 0; a < Q; a++)
          qn_out[n][a] <= QN_W'(l_out[n][a]);
    end else if (qn_we) begin
      qn_out <= qn_in;
    end
  end
endmodule
