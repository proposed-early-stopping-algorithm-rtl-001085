# Min-Sum NB-LDPC (32,16) decoder over GF(16) with early stopping

An iterative decoder for a short non-binary LDPC code. Each symbol is an
element of GF(16), so it carries 4 bits. A frame has 32 symbols (128 code
bits) and carries 16 information symbols (64 bits), so the rate is 1/2. The
decoder runs the Min-Sum message-passing algorithm. It spends one clock cycle
per iteration and stops the loop as soon as one more iteration is unlikely to
change the result.

The stopping rule is the main idea. A fixed-iteration decoder always pays for
the worst case (here 18 iterations). This one checks three conditions at the
end of every iteration, in priority order:

1. **Syndrome zero.** The hard decision satisfies every parity check. This is
   the strongest sign of convergence.
2. **Stable for two iterations.** The hard decision of the whole frame is the
   same as in each of the two previous iterations.
3. **Fast mode.** The configuration bit `fast_en` is set, at least
   `I_MIN = 6` iterations have run, and the hard decision equals the previous
   one. The `I_MIN` threshold keeps the early, oscillating iterations from
   ending a frame too soon.

If none of them holds by iteration `I_MAX = 18`, the decoder stops anyway.
The iteration at which it stopped (`i_stop`) is latched on the same clock edge
that ends the loop. A frame that stops after `n` iterations therefore
completes `6 + n` cycles after `start`, which is 60 + 10n ns at 100 MHz.

## Block diagram

```
 y[128] ──► llr_mapper ──► qn_ln_storage (L_n, Q_n) ──► cn_array (16 × cn_unit) ──► r_storage (R per edge)
                                  ▲        │                   │                          │
                                  │        └──────────┐        ▼ R_new                    │ R_old
                                  │                   ▼                                   │
                                  └──── Q_n ◄──── vn_accum ◄───┘        (R_old back to cn_array)
                                                      │ Q_n
                                                      ▼
                                               hard_syndrome ──► es_stability ──► es_stop_rule ──► ctrl_fsm
                                               (c_n, H·c = 0?)   (same_1, same_2)  (stop, reason)   (i, i_stop, enables)
```

All of these are in `rtl/`, one module per file. `nbldpc_decoder` is the top.
The shared definitions are in two packages. `gf16_pkg` holds the field tables.
`nbldpc_pkg` holds the code, the word widths, the types and the
stop-reason enum.

## The code and how it is stored

The field is GF(16) with the polynomial x^4 + x + 1. Symbols use polynomial
basis: bit k is the coefficient of x^k. Multiplication goes through log and
antilog look-up tables (`gf16_mul`, `gf16_pkg::gf_mul`). Both tables are
computed from the polynomial when the design is elaborated.

The parity-check matrix H (16 × 32) is never stored as a dense matrix. Only
its 64 edges exist, each as a column index and a GF(16) coefficient, given by
the functions `edge_col(e)` and `edge_coef(e)` in `nbldpc_pkg`. Edge `e`
belongs to row `e / 4`. Every row has exactly 4 edges (check-node degree
d_c = 4):

| edge k of row m | column                           | kind            |
|-----------------|----------------------------------|-----------------|
| 0               | m                                | information     |
| 1               | (m + 5) mod 16                   | information     |
| 2               | 16 + m                           | parity p_m      |
| 3               | 15 + m (m > 0); 8 (m = 0)        | parity p_(m-1)  |

The coefficient of edge k in row m is h = α^((3m + 4k + 1) mod 15), where
α = x.

This matrix is this design's own choice: the specification fixes only N, K,
the field and the row degree. The matrix was chosen for three properties:

- It has no 4-cycles.
- Its parity part is lower bidiagonal, so H has full rank (K = 16 exactly).
- A codeword can be encoded by back-substitution. Row m gives p_m from the
  information symbols and p_(m-1).

Column weights are 2, except column 8 (weight 3) and column 31 (weight 1).
To use another code, change `edge_col`, `edge_coef`, `DC` and `DV_MAX`. The
datapath is generated from these functions. The testbenches' reference
package (`tb/tb_ref_pkg.sv`) restates the same matrix and must be changed
with it.

## Messages as costs

The algorithm is usually written with reliabilities, where a larger value is
more likely and the hard decision is an argmax. Here every message is stored
as a non-negative cost instead: the negated log-likelihood, shifted so that
the best symbol costs 0. This is the same algorithm. The check-node rule
becomes "minimum of sums" and the hard decision becomes an argmin.

The **channel cost** L_n(a) is computed by `llr_mapper`. BPSK sends bit b as
1 − 2b. Sample 4n + j carries bit j of symbol n. The cost of candidate a is
the sum of |y| over the bits where a disagrees with the sign of the received
sample. The factor 2/σ² is left out because Min-Sum does not depend on a
common scale. The only effect of the scale is where values saturate.

| quantity                       | width   | range / rule                    |
|--------------------------------|---------|---------------------------------|
| channel sample y               | 6 bits  | signed, −32..31                 |
| bit reliability \|y\|          | 5 bits  | clipped to 31                   |
| channel cost L_n(a)            | 7 bits  | ≤ 4·31 = 124                    |
| extrinsic Q_{n→m}, R_{m→n}     | 8 bits  | saturate at 255                 |
| posterior Q_n(a)               | 10 bits | 124 + 3·255 < 1024, never saturates |

## One iteration in one cycle

State between iterations is held in registers:

- the channel costs L_n and the posteriors Q_n (`qn_ln_storage`);
- the check-to-variable messages R of every edge (`r_storage`);
- the last two hard decisions (`es_stability`);
- the counter i (`ctrl_fsm`).

During an `ITERATE` cycle, the following all happen in combinational logic:

1. **Extrinsic messages.** Inside each `cn_unit`,
   Q_{n→m}(a) = Q_n(a) − R_{m→n}(a). This is the posterior without this
   check's own contribution from the last iteration. The result is exact
   because Q_n never saturates. The unit then subtracts the minimum, so the
   best symbol costs 0, and saturates the result to 8 bits.
2. **Check-node update** (`cn_array`, 16 `cn_unit`s).
   - For row m with edges k = 0..3, the check is satisfied when
     XOR_k h_k·c_k = 0. So the message to edge k at value a is the cheapest
     way for the other three edges to sum to h_k·a.
   - Each edge's message is first re-indexed by β = h_k·a.
   - The other edges are then combined with a min-plus convolution over XOR:
     (X ⊛ Y)(g) = min_b X(b) + Y(b ⊕ g).
   - Forward partials P0⊛P1 and backward partials P2⊛P3 give all four
     outputs with 6 convolutions: R0 = P1⊛(P2⊛P3), R1 = P0⊛(P2⊛P3),
     R2 = (P0⊛P1)⊛P3, R3 = (P0⊛P1)⊛P2.
   - Each output is mapped back with a = h_k⁻¹·β.
   - Saturating every partial sum at 255 gives the same result as taking the
     exact minimum and saturating it once. The testbench checks this against
     an exhaustive search.
   - By default, no normalization factor and no offset is applied (plain
     Min-Sum). See the `ALPHA_*` and `BETA` parameters below.
3. **Variable-node accumulation** (`vn_accum`).
   Q_n(a) = L_n(a) + Σ R_new over the edges of column n.
4. **Hard decision and syndrome** (`hard_syndrome`).
   - c_n = argmin_a Q_n(a). A tie goes to the smaller a.
   - s_m = XOR_k h·c over the row, using 64 `gf16_mul` look-ups.
   - `syndrome_ok` = all s_m are 0.
5. **Stability flags** (`es_stability`).
   - The buffers `hard_out_prev` and `hard_out_prev2` are 2 × 32 symbols,
     256 flip-flops in all.
   - `hard_same_1` = (c == prev).
   - `hard_same_2` = (c == prev == prev2).
   - A flag only counts history written in the current frame.
6. **Stop decision** (`es_stop_rule`). The priority rule above, with a reason
   code: 1 syndrome, 2 stable2, 3 fast, 4 max.

On the clock edge, R_new goes into `r_storage` and Q_n goes into
`qn_ln_storage`. The hard decision is pushed into the history and i is
incremented. If `stop` is high, `i_stop ← i` instead, the decoded word, the
reason and the syndrome flag are latched into the output registers, and the
FSM leaves `ITERATE`.

When a frame starts, R = 0 and Q_n = L_n. The first extrinsic messages are
therefore the channel costs.

The long combinational path (check node, then variable node, then argmin,
then syndrome, then stop) is the cost of meeting one cycle per iteration.
The logic is also large: fully parallel, 96 convolutions of 256 saturating
additions each. A smaller or faster implementation would serialize the rows
or pipeline the iteration. Either change breaks the 6 + n cycle budget.

## Control and timing

`ctrl_fsm` states, with `start` high in cycle 0:

| cycle      | state    | action                                                      |
|------------|----------|-------------------------------------------------------------|
| 0          | IDLE     | `start` seen: samples captured, `fast_en` sampled           |
| 1          | LOAD     | mapper: bit signs and magnitudes registered                 |
| 2          | MAP1     | mapper: costs of the two 2-bit halves of each symbol        |
| 3          | MAP2     | L_n = sum of the half costs, written to storage             |
| 4          | INIT     | Q_n ← L_n, R ← 0, history cleared, i ← 1                    |
| 4+1 … 4+n  | ITERATE  | iteration i in cycle 4+i; at the stop edge i_stop ← i       |
| 5+n        | DONE     | result output                                               |
| 6+n        | IDLE     | `done` high for one cycle; a new `start` is accepted        |

The specification only fixes the total latency: 60 + 10n ns at a 100 MHz
clock, so 6 fixed cycles plus one per iteration. The split of the six fixed
cycles shown above is this design's choice.

Frames can follow each other with no gap: `start` may be raised again in the
cycle where `done` is high. One frame then takes 6 + n cycles. At 100 MHz and
n = 18 that is 128 code bits every 240 ns, or 533 Mbit/s. With early
stopping, n is usually much smaller.

## Interface of `nbldpc_decoder`

| port          | dir | type                        | meaning                                              |
|---------------|-----|-----------------------------|------------------------------------------------------|
| `clk`         | in  | logic                       | clock                                                |
| `rst_n`       | in  | logic                       | synchronous reset, active low                        |
| `start`       | in  | logic                       | start a frame; `y` and `fast_en` valid this cycle; ignored while `busy` |
| `fast_en`     | in  | logic                       | enables stop rule 3 for this frame                   |
| `y`           | in  | `sample_t [128]`            | signed 6-bit samples; bit j of symbol n is `y[4n+j]` |
| `busy`        | out | logic                       | frame in progress                                    |
| `done`        | out | logic                       | one-cycle pulse: outputs below are valid             |
| `dec`         | out | `sym_t [32]`                | decoded symbols (information = `dec[0..15]`)         |
| `iters`       | out | `iter_t` (5 bits)           | iterations run, i_stop                               |
| `reason`      | out | `stop_reason_t`             | which rule ended the frame                           |
| `syndrome_ok` | out | logic                       | `dec` satisfies all parity checks                    |

Parameters:

- `I_MAX` (default 18) and `I_MIN` (default 6) set the stop rule.
- `ALPHA_NUM`/`ALPHA_DEN` (default 1/1) and `BETA` (default 0) are optional
  check-node corrections. Normalized Min-Sum scales every check-node output
  cost by α = `ALPHA_NUM`/`ALPHA_DEN`. Offset Min-Sum then subtracts `BETA`
  and clips at 0. Both temper over-confident messages. The defaults give
  plain Min-Sum, which is the intended configuration.

The outputs hold until the last iteration of the next frame.

## What is specified and what is this design's own

These points follow the specification:

- the code size (32,16) over GF(16);
- the field polynomial;
- sparse storage of H;
- Min-Sum without normalization or offset in the default configuration,
  with normalized and offset corrections as options;
- the block structure: mapper, Q/L storage, check-node update, R storage,
  variable-node accumulation, hard decision and syndrome, early-stop logic,
  control FSM;
- the stop rule, its priorities, I_MAX = 18 and I_MIN = 6;
- latching i_stop on the stopping edge;
- the 256-flip-flop history of two hard decisions;
- the 6 + n cycle latency.

These are this design's own choices:

- the parity-check matrix and its coefficients;
- all word widths and the saturation rules;
- the cost-domain representation;
- the channel metric and the bit-to-sample order;
- the forward/backward organization of the check node;
- reading "stable over two iterations" as equal to both stored decisions;
- ignoring history from the previous frame;
- tie breaking;
- the FSM state split;
- the `reason` output;
- registers rather than block RAM.

Known departures:

- **Iteration block label.** One flow description calls the check-node step
  an "extended trellis Min-Max" update, while the text describes Min-Sum.
  Min-Sum is implemented.
- **Resource counts.** The published counts (about 20k LUTs, 7.6k flip-flops
  and 12 block RAMs on a Zynq UltraScale+, 250 MHz target) describe an
  architecture whose memory organization is not given. This fully parallel
  design is much larger and has a long path. It has not been placed or timed
  on any FPGA.
- **Error rates.** Because the matrix differs, BER/FER and average iteration
  counts differ from the published curve. The published curve reaches FER
  about 0.12 and 7.44 average iterations at Eb/N0 = 6 dB. With this matrix
  and the test channel below, frames at 6 dB almost always decode in one
  iteration (see the sweep below). The latency model is the same in both:
  6 + n cycles. For example, 7.44 iterations give 134.4 ns at 100 MHz.
- **Encoder and channel.** No encoder or channel hardware is included. The
  testbenches encode and add noise in behavioural code.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=F`. The reference models in
`tb/tb_ref_pkg.sv` are written independently of the RTL:

- GF multiplication by shift-and-xor;
- check nodes by exhaustive search over the 16³ configurations of the other
  three edges;
- the whole decoder as a plain loop with the same widths and stop rule;
- a systematic encoder;
- a Box-Muller AWGN channel with 6-bit quantization.

Build and run a testbench, for example the end-to-end one, from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_nbldpc_decoder \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/gf16_pkg.sv rtl/nbldpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_nbldpc_decoder.sv
./obj_dir/Vtb_nbldpc_decoder +verilator+rand+reset+2
```

`tb_nbldpc_decoder` uses the default parameters. It decodes about 560 frames:

- noiseless frames, which must decode in one iteration;
- confident random non-codewords;
- codewords with symbol 31 inverted, which make the decoder lock onto a
  stable wrong word;
- AWGN frames at 8, 6, 4, 3, 2, 1, 0 and −2 dB, with `fast_en` alternating.

For every frame it checks against the reference decoder:

- the decoded word;
- `iters`;
- `reason`;
- `syndrome_ok`;
- that the latency is exactly 6 + `iters` cycles.

It fails unless each of the four stop rules ended at least one frame. It
also prints FER and average iterations per Eb/N0 point. With the default
seed, the stop counts are syndrome 267, stable2 2, fast 2 and max 144, and
the results are:

| Eb/N0 (dB) | 8   | 6   | 4    | 3    | 2    | 1     | 0     | −2  |
|------------|-----|-----|------|------|------|-------|-------|-----|
| FER        | 0   | 0   | 0.06 | 0.01 | 0.15 | 0.44  | 0.80  | 1   |
| avg iter.  | 1.0 | 1.0 | 1.9  | 2.8  | 6.5  | 10.7  | 15.6  | 18  |

The noise here has σ² = 1/(2·R·Eb/N0) per BPSK bit, and the samples are
quantized at 8 steps per unit amplitude. These are small frame counts, meant
to exercise the mechanisms rather than to measure error rates.

The whole run takes a few seconds. The decoder's size makes the Verilator
build the slow part.

`tb_ber_sweep` is an error-rate sweep over Eb/N0 = 5.0 … 8.0 dB in 0.5 dB
steps, with 20,000 frames per point and `fast_en` set. It runs the RTL only.
Per frame it checks the 6 + n latency and that a frame flagged
`syndrome_ok` really is a codeword. It prints BER over the information bits,
FER, average iterations and average latency at 100 MHz. With the default
seed:

| Eb/N0 (dB)        | 5.0     | 5.5  | 6.0  | 6.5  | 7.0  | 7.5  | 8.0  |
|-------------------|---------|------|------|------|------|------|------|
| BER               | 7.0e-6  | 0    | 0    | 0    | 0    | 0    | 0    |
| FER               | 1e-4    | 0    | 0    | 0    | 0    | 0    | 0    |
| avg iterations    | 1.19    | 1.09 | 1.04 | 1.01 | 1.01 | 1.00 | 1.00 |
| avg latency (ns)  | 71.9    | 70.9 | 70.4 | 70.1 | 70.1 | 70.0 | 70.0 |

It takes under a minute in Verilator.

## How far to trust it

- **Bit-exact to the reference.** Every module is checked against reference
  code that does not share its arithmetic. The whole decoder is bit-exact to
  the reference loop on every simulated frame.
- **Faults are caught.** Each testbench was also run against a deliberately
  broken copy of its module, and each one detected the fault.
- **Not checked:** timing closure, FPGA resource use, and error-rate curves
  over large frame counts.
