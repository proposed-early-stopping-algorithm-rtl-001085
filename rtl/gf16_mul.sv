// gf16_mul: combinational GF(16) multiplier made of look-up tables.
// p = a * b over GF(16) with field polynomial x^4 + x + 1. Both operands are
// turned into exponents with a 16-entry log table, the exponents are added
// modulo 15 and the 15-entry antilog table gives the product; a zero
// operand forces a zero product. Using tables rather than a shift-and-xor
// network follows the decoder's "lookup tables for GF(16)" principle; the
// table layout is this design's choice. Purely combinational, no latency.
module gf16_mul
  import gf16_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);
  logic [4:0] lsum;     // log a + log b, 0..28
  logic [3:0] lmod;     // reduced modulo 15

  always_comb begin
    lsum = {1'b0, GF_LOG[a]} + {1'b0, GF_LOG[b]};
    lmod = (lsum >= 5'd15) ? 4'(lsum - 5'd15) : lsum[3:0];
    p    = (a == '0 || b == '0) ? '0 : GF_EXP[lmod];
  end
endmodule
