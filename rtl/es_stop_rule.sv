// es_stop_rule: the "fast early-stop" decision, evaluated at the end of every
// iteration i (1-based) with the priority order of the proposed rule:
//   1. syndrome_ok                                  -> STOP_SYNDROME
//   2. hard_same_2 (unchanged for two iterations)   -> STOP_STABLE2
//   3. fast_en and i >= I_MIN and hard_same_1       -> STOP_FAST
//   4. i == I_MAX (forced stop)                     -> STOP_MAX
//   otherwise continue                              -> STOP_NONE
// I_MAX = 18 and I_MIN = 6 are the specified values. Layers 1 and 2 work
// whether or not fast_en is set; the 1-iteration criterion only after I_MIN
// iterations. The reason code is an extra output of this design for
// measurement. Purely combinational.
module es_stop_rule
  import nbldpc_pkg::*;
#(
  parameter int unsigned I_MAX = 18,
  parameter int unsigned I_MIN = 6
) (
  input  iter_t        i,
  input  logic         syndrome_ok,
  input  logic         hard_same_1,
  input  logic         hard_same_2,
  input  logic         fast_en,
  output logic         stop,
  output stop_reason_t reason
);
  always_comb begin
    if (syndrome_ok)                                           reason = STOP_SYNDROME;
    else if (hard_same_2)                                      reason = STOP_STABLE2;
    else if (fast_en && (32'(i) >= I_MIN) && hard_same_1)      reason = STOP_FAST;
    else if (32'(i) >= I_MAX)                                  reason = STOP_MAX;
    else                                                       reason = STOP_NONE;
    stop = (reason != STOP_NONE);
  end
endmodule
