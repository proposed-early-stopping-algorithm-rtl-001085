// nbldpc_decoder: Min-Sum decoder for a (32,16) non-binary LDPC code over
// GF(16) with early-stopping loop control.
//
// Data flow (one frame):
//   llr_mapper     received samples -> channel costs L_n(a)
//   qn_ln_storage  L_n, and the posterior Q_n (starts as L_n)
//   cn_array       16 check nodes: extrinsic Q_n - R, Min-Sum update -> R_new
//   r_storage      R_{m->n} of the 64 edges (starts at 0)
//   vn_accum       Q_n = L_n + sum of R_new of column n (written back)
//   hard_syndrome  hard decision c_n = argmin Q_n, syndrome H c^T
//   es_stability   hard decision history, 1- and 2-iteration stability flags
//   es_stop_rule   stop = syndrome_ok | stable2 | (fast_en & i>=I_MIN & stable1)
//                  | i==I_MAX, in that priority
//   ctrl_fsm       load / map / init / iterate / done sequencing, i and i_stop
// An iteration (check-node update, variable-node accumulation, hard decision,
// syndrome and stability check, stop decision) completes in one clock cycle,
// so a frame that stops after n iterations raises done 6+n cycles after start
// (60 + 10n ns at 100 MHz). The decoded word, i_stop, the stop reason and the
// syndrome flag are latched on the edge that ends the last iteration and stay
// valid until the next frame's last iteration.
//
// Interface: start (one cycle, with y valid) is accepted when busy is low;
// fast_en (the FAST_EN configuration bit) is sampled with start. done pulses
// one cycle. Synchronous active-low reset rst_n.
module nbldpc_decoder
  import gf16_pkg::*;
  import nbldpc_pkg::*;
#(
  parameter int unsigned I_MAX     = 18,
  parameter int unsigned I_MIN     = 6,
  // Min-Sum corrections, off in the baseline configuration (alpha=1, beta=0)
  parameter int unsigned ALPHA_NUM = 1,
  parameter int unsigned ALPHA_DEN = 1,
  parameter int unsigned BETA      = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         fast_en,
  input  sample_t      y [NBITS],
  output logic         busy,
  output logic         done,
  output sym_t         dec [N],
  output iter_t        iters,
  output stop_reason_t reason,
  output logic         syndrome_ok
);
  logic  load, l_we, init, iter_en, stop;
  iter_t i;
  logic  fast_en_q;

  lvec_t l_map [N];
  lvec_t l_st  [N];
  qvec_t qn_st [N];
  qvec_t qn_new[N];
  mvec_t r_st  [NE];
  mvec_t r_new [NE];
  sym_t  hard  [N];
  gf_t   synd  [M];
  logic  synd_ok, same1, same2;
  stop_reason_t why;

  always_ff @(posedge clk) begin
    if (!rst_n)    fast_en_q <= 1'b0;
    else if (load) fast_en_q <= fast_en;
  end

  llr_mapper u_map (
    .clk  (clk),
    .load (load),
    .y    (y),
    .l_out(l_map)
  );

  qn_ln_storage u_qn (
    .clk   (clk),
    .l_we  (l_we),
    .l_in  (l_map),
    .init  (init),
    .qn_we (iter_en),
    .qn_in (qn_new),
    .l_out (l_st),
    .qn_out(qn_st)
  );

  cn_array #(.ALPHA_NUM(ALPHA_NUM), .ALPHA_DEN(ALPHA_DEN), .BETA(BETA)) u_cn (
    .qn   (qn_st),
    .r_old(r_st),
    .r_new(r_new)
  );

  r_storage u_r (
    .clk  (clk),
    .clear(init),
    .we   (iter_en),
    .r_in (r_new),
    .r_out(r_st)
  );

  vn_accum u_vn (
    .l (l_st),
    .r (r_new),
    .qn(qn_new)
  );

  hard_syndrome u_hd (
    .qn         (qn_new),
    .hard       (hard),
    .syndrome   (synd),
    .syndrome_ok(synd_ok)
  );

  es_stability u_stab (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (init),
    .shift      (iter_en),
    .hard       (hard),
    .hard_same_1(same1),
    .hard_same_2(same2)
  );

  es_stop_rule #(.I_MAX(I_MAX), .I_MIN(I_MIN)) u_rule (
    .i          (i),
    .syndrome_ok(synd_ok),
    .hard_same_1(same1),
    .hard_same_2(same2),
    .fast_en    (fast_en_q),
    .stop       (stop),
    .reason     (why)
  );

  ctrl_fsm u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .stop   (stop),
    .busy   (busy),
    .load   (load),
    .l_we   (l_we),
    .init   (init),
    .iter_en(iter_en),
    .i      (i),
    .i_stop (iters),
    .done   (done)
  );

  // result register, latched with i_stop on the edge that ends the decode
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) dec[n] <= '0;
      reason      <= STOP_NONE;
      syndrome_ok <= 1'b0;
    end else if (iter_en && stop) begin
      dec         <= hard;
      reason      <= why;
      syndrome_ok <= synd_ok;
    end
  end

  // the per-check syndrome is only needed as a whole
  logic unused_synd;
  always_comb begin
    unused_synd = 1'b0;
    for (int m = 0; m < M; m++) unused_synd |= |synd[m];
  end
endmodule
