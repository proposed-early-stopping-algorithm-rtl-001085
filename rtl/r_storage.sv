// r_storage: the "R_{m->n} storage" of the decoding core.
// One 16-entry message per Tanner-graph edge (NE = 64 edges, MSG_W bits per
// entry). clear sets every message to zero at the start of a frame, so the
// first iteration's extrinsic messages equal the channel costs; we stores the
// check-node outputs at the end of each iteration. Register based; clear has
// priority over we. The outputs are the stored values (one-cycle write latency).
module r_storage
  import nbldpc_pkg::*;
(
  input  logic  clk,
  input  logic  clear,
  input  logic  we,
  input  mvec_t r_in  [NE],
  output mvec_t r_out [NE]
);
  always_ff @(posedge clk) begin
    if (clear) begin
      for (int e = 0; e < NE; e++) r_out[e] <= '0;
    end else if (we) begin
      r_out <= r_in;
    end
  end
endmodule
