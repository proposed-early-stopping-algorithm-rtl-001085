// nbldpc_pkg: code, word-width and type definitions shared by the decoder.
//
// Code: non-binary LDPC (N=32, K=16) over GF(16), M = 16 parity checks, rate
// 1/2, 4 bits per symbol (64 information bits, 128 code bits). These numbers
// are the design's specification. The parity-check matrix is kept in sparse
// form: only the column and the GF(16) coefficient of each of the M*DC edges.
// The concrete matrix below is this design's own choice (row weight DC = 4,
// no 4-cycles, dual-diagonal parity part so that encoding is a simple
// back-substitution):
//   row m, edge 0: column m                      (information symbol)
//   row m, edge 1: column (m+5) mod 16           (information symbol)
//   row m, edge 2: column 16+m                   (parity symbol p_m)
//   row m, edge 3: column 15+m for m>0           (parity symbol p_(m-1))
//                  column 8    for m=0
//   coefficient h(m,k) = alpha^((3m + 4k + 1) mod 15)
// Column weights are 2, except column 8 (weight 3) and column 31 (weight 1).
// Edge e = m*DC + k.
//
// Message representation: all reliabilities are kept as non-negative costs
// (negated log-likelihoods normalized so the best symbol is 0); Min-Sum then
// takes minima of sums, and the hard decision is the symbol of lowest cost,
// which equals the argmax of the reliability form.
package nbldpc_pkg;
  import gf16_pkg::*;

  localparam int unsigned N      = 32;           // code length in symbols
  localparam int unsigned K      = 16;           // information symbols
  localparam int unsigned M      = N - K;        // check nodes
  localparam int unsigned Q      = GF_Q;         // 16
  localparam int unsigned BITS   = GF_M;         // bits per symbol
  localparam int unsigned NBITS  = N * BITS;     // 128 channel samples
  localparam int unsigned DC     = 4;            // check-node degree
  localparam int unsigned NE     = M * DC;       // edges of the Tanner graph
  localparam int unsigned DV_MAX = 3;            // largest column weight

  // fixed-point widths (design choices)
  localparam int unsigned Y_W    = 6;            // channel sample, signed
  localparam int unsigned MAG_W  = 5;            // |y| clipped to 31
  localparam int unsigned L_W    = 7;            // channel symbol cost, <= 4*31
  localparam int unsigned MSG_W  = 8;            // Q_{n->m} and R_{m->n}
  localparam int unsigned QN_W   = 10;           // posterior, L + DV_MAX*255 < 1024
  localparam int unsigned IT_W   = 5;            // iteration counter

  localparam logic [MSG_W-1:0] MSG_MAX = '1;

  typedef logic [BITS-1:0]              sym_t;
  typedef logic signed [Y_W-1:0]        sample_t;
  typedef logic [Q-1:0][L_W-1:0]        lvec_t;   // L_n(a), a = 0..15
  typedef logic [Q-1:0][MSG_W-1:0]      mvec_t;   // message over GF(16)
  typedef logic [Q-1:0][QN_W-1:0]       qvec_t;   // posterior Q_n(a)
  typedef logic [IT_W-1:0]              iter_t;

  typedef enum logic [2:0] {
    STOP_NONE     = 3'd0,
    STOP_SYNDROME = 3'd1,   // Layer 1: all parity checks satisfied
    STOP_STABLE2  = 3'd2,   // Layer 2: hard decision unchanged for 2 iterations
    STOP_FAST     = 3'd3,   // Layer 3: FAST_EN, i >= i_min, unchanged for 1 iteration
    STOP_MAX      = 3'd4    // forced: i = I_max
  } stop_reason_t;

  function automatic int unsigned edge_col(input int unsigned e);
    int unsigned m = e / DC;
    int unsigned k = e % DC;
    case (k)
      0:       return m;
      1:       return (m + 5) % K;
      2:       return K + m;
      default: return (m == 0) ? 8 : K + m - 1;
    endcase
  endfunction

  function automatic gf_t edge_coef(input int unsigned e);
    int unsigned m = e / DC;
    int unsigned k = e % DC;
    return gf_pow(3 * m + 4 * k + 1);
  endfunction

  // saturating addition of two non-negative message values
  function automatic logic [MSG_W-1:0] sat_add(input logic [MSG_W-1:0] a,
                                               input logic [MSG_W-1:0] b);
    logic [MSG_W:0] s = {1'b0, a} + {1'b0, b};
    return s[MSG_W] ? MSG_MAX : s[MSG_W-1:0];
  endfunction

endpackage
