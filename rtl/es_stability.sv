// es_stability: hard-decision stability detector of the early-stopping logic.
// Two full-frame history buffers (as specified), hard_out_prev and hard_out_prev2 (N symbols
// of 4 bits each, 2 x 128 flip-flops), hold the hard decisions of the two
// previous iterations. Comparators flag, for the current iteration's hard
// decision:
//   hard_same_1 : hard == hard_out_prev                 (stable for 1 iteration)
//   hard_same_2 : hard == hard_out_prev == hard_out_prev2 (stable for 2)
// A flag only rises once the buffers it compares with have been filled in the
// current frame (hist_cnt counts them, saturating at 2) - a design choice so
// that stale data from the previous frame never stops a decode.
// clear (frame start) empties the history; shift (end of each iteration)
// pushes hard into hard_out_prev and hard_out_prev into hard_out_prev2.
// The flags are combinational from hard and the registered history.
module es_stability
  import nbldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic shift,
  input  sym_t hard [N],
  output logic hard_same_1,
  output logic hard_same_2
);
  sym_t       hard_out_prev  [N];
  sym_t       hard_out_prev2 [N];
  logic [1:0] hist_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      hist_cnt <= '0;
    end else if (shift) begin
      hist_cnt <= (hist_cnt == 2'd2) ? 2'd2 : hist_cnt + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      hard_out_prev  <= hard;
      hard_out_prev2 <= hard_out_prev;
    end
  end

  logic eq1, eq12;
  always_comb begin
    eq1  = 1'b1;
    eq12 = 1'b1;
    for (int n = 0; n < N; n++) begin
      if (hard[n] != hard_out_prev[n])           eq1  = 1'b0;
      if (hard_out_prev[n] != hard_out_prev2[n]) eq12 = 1'b0;
    end
    hard_same_1 = (hist_cnt >= 2'd1) && eq1;
    hard_same_2 = (hist_cnt == 2'd2) && eq1 && eq12;
  end
endmodule
