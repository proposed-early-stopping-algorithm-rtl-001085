// gf16_pkg: arithmetic in GF(16) built on the primitive polynomial
// p(x) = x^4 + x + 1, the field polynomial the decoder is specified with.
// Elements are 4-bit vectors in polynomial basis (bit k = coefficient of x^k);
// alpha = 4'b0010 is primitive. The antilog (exp) and log tables are computed
// by constant functions at elaboration, so they become small ROMs/LUTs in
// hardware. gf_mul/gf_inv are table look-ups used where a multiplier by a
// constant coefficient is needed (the coefficient then folds into wiring).
package gf16_pkg;

  localparam int unsigned GF_M = 4;            // bits per symbol
  localparam int unsigned GF_Q = 1 << GF_M;     // field size, 16
  localparam logic [GF_M-1:0] GF_POLY_LOW = 4'b0011; // x + 1 (x^4 is implied)

  typedef logic [GF_M-1:0] gf_t;
  typedef gf_t exp_tab_t [GF_Q-1];  // alpha^k, k = 0..14
  typedef logic [3:0] log_tab_t [GF_Q];  // log_alpha(a); entry 0 unused

  function automatic exp_tab_t make_exp_tab();
    exp_tab_t t;
    gf_t v = 4'b0001;
    for (int k = 0; k < GF_Q - 1; k++) begin
      t[k] = v;
      // multiply by alpha: shift, reduce by p(x) when x^4 appears
      v = v[GF_M-1] ? ({v[GF_M-2:0], 1'b0} ^ GF_POLY_LOW) : {v[GF_M-2:0], 1'b0};
    end
    return t;
  endfunction

  localparam exp_tab_t GF_EXP = make_exp_tab();

  function automatic log_tab_t make_log_tab();
    log_tab_t t;
    t[0] = '0;
    for (int k = 0; k < GF_Q - 1; k++) t[GF_EXP[k]] = 4'(k);
    return t;
  endfunction

  localparam log_tab_t GF_LOG = make_log_tab();

  // alpha^k for any non-negative k
  function automatic gf_t gf_pow(input int unsigned k);
    return GF_EXP[k % (GF_Q - 1)];
  endfunction

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    if (a == '0 || b == '0) return '0;
    return GF_EXP[(int'(GF_LOG[a]) + int'(GF_LOG[b])) % (GF_Q - 1)];
  endfunction

  // multiplicative inverse; gf_inv(0) is defined as 0
  function automatic gf_t gf_inv(input gf_t a);
    if (a == '0) return '0;
    return GF_EXP[(GF_Q - 1 - int'(GF_LOG[a])) % (GF_Q - 1)];
  endfunction

endpackage
