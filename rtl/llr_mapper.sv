// llr_mapper: the "LLR / symbol mapper" in front of the decoding core.
// Turns the N*4 received BPSK samples of a frame into, for each of the N
// symbols, the 16 channel costs L_n(a), a in GF(16).
//
// Channel model: bit b is sent as 1-2b; sample 4n+j carries bit j of symbol
// n. The bit decision is the sign of y and its reliability is |y| (clipped to
// 2^MAG_W-1). The cost of candidate symbol a is the sum of the reliabilities
// of the bits where a disagrees with the bit decisions, so the most likely
// symbol costs 0. (This is the usual max-log symbol metric; the constant
// factor 2/sigma^2 is dropped because Min-Sum is scale invariant.)
//
// Pipeline (design choice, part of the fixed frame overhead):
//   edge 1: load=1 captures y into the input register
//   edge 2: bit sign and magnitude registered
//   edge 3: partial costs of the two 2-bit halves of each symbol registered
// l_out is then valid combinationally (low-half cost + high-half cost) and is
// written into the L storage by the controller on the following edge.
module llr_mapper
  import nbldpc_pkg::*;
(
  input  logic    clk,
  input  logic    load,
  input  sample_t y     [NBITS],
  output lvec_t   l_out [N]
);
  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  sample_t               y_q   [NBITS];
  logic                  hb_q  [NBITS];   // hard bit: 1 when y < 0
  logic [MAG_W-1:0]      mag_q [NBITS];
  // half costs: index n*2+h, h = 0 for bits 1:0, h = 1 for bits 3:2
  logic [3:0][MAG_W:0]   half_q [2*N];

  always_ff @(posedge clk) begin
    if (load) y_q <= y;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NBITS; k++) begin
      logic [Y_W:0] a;
      hb_q[k]  <= y_q[k][Y_W-1];
      a        = y_q[k][Y_W-1] ? -{y_q[k][Y_W-1], y_q[k]} : {1'b0, y_q[k]};
      mag_q[k] <= (a > (Y_W+1)'(MAG_MAX)) ? MAG_MAX : a[MAG_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    for (int h = 0; h < 2 * N; h++) begin
      for (int v = 0; v < 4; v++) begin
        logic [MAG_W:0] c;
        c = '0;
        for (int j = 0; j < 2; j++)
          if (v[j] != hb_q[2*h + j]) c = c + (MAG_W+1)'(mag_q[2*h + j]);
        half_q[h][v] <= c;
      end
    end
  end

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int a = 0; a < Q; a++)
        l_out[n][a] = L_W'(half_q[2*n][a % 4]) + L_W'(half_q[2*n+1][a / 4]);
  end
endmodule
