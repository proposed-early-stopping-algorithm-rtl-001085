// ctrl_fsm: central control FSM and loop counter of the decoder.
// States and what the datapath does in each:
//   IDLE     wait for start; the cycle start is high, load captures the samples
//   LOAD     mapper: bit signs and magnitudes
//   MAP1     mapper: half-symbol partial costs
//   MAP2     l_we: L_n written into the Q_n/L_n storage
//   INIT     init: Q_n <- L_n, R <- 0, stability history cleared, i <- 1
//   ITERATE  iter_en: one complete iteration per cycle (check nodes, variable
//            nodes, hard decision, syndrome/stability check, stop decision).
//            When stop is high, i_stop <- i on that same edge and the FSM
//            goes to DONE; otherwise i <- i+1.
//   DONE     result output; done pulses high in the cycle after DONE
// Timing: with start high in cycle 0 and n iterations, done is high in cycle
// 6+n, i.e. 60 + 10n ns at 100 MHz, the specified latency model. The state
// list follows the specified load / iterate / check / output structure and the
// ITERATE -> DONE transition; the split of the six fixed cycles is this
// design's choice. start is ignored when not IDLE. Synchronous active-low reset.
module ctrl_fsm
  import nbldpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  stop,
  output logic  busy,
  output logic  load,
  output logic  l_we,
  output logic  init,
  output logic  iter_en,
  output iter_t i,
  output iter_t i_stop,
  output logic  done
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_MAP1, S_MAP2, S_INIT, S_ITERATE, S_DONE
  } state_t;

  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      i      <= '0;
      i_stop <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:    if (start) state <= S_LOAD;
        S_LOAD:    state <= S_MAP1;
        S_MAP1:    state <= S_MAP2;
        S_MAP2:    state <= S_INIT;
        S_INIT: begin
          i     <= iter_t'(1);
          state <= S_ITERATE;
        end
        S_ITERATE: begin
          if (stop) begin
            i_stop <= i;
            state  <= S_DONE;
          end else begin
            i <= i + iter_t'(1);
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default:   state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign load    = (state == S_IDLE) && start;
  assign l_we    = (state == S_MAP2);
  assign init    = (state == S_INIT);
  assign iter_en = (state == S_ITERATE);
endmodule
