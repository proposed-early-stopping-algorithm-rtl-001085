// tb_ref_pkg: independent reference model used by the testbenches.
// GF(16) arithmetic is done by shift-and-xor polynomial multiplication
// modulo x^4 + x + 1 (not by the log/antilog tables of the design), the
// check-node update by exhaustive search over the other symbols of a row
// (not by forward/backward convolution), and the whole decoder as a plain
// loop following the iteration and stop rules. Also holds the systematic
// encoder of the code, a Gaussian noise source and the channel quantizer.
package tb_ref_pkg;

  localparam int NN = 32, KK = 16, MM = 16, QQ = 16, DCC = 4, NEE = 64;
  localparam int MSGMAX = 255, QNMAX = 1023;

  typedef int vec_t [QQ];

  function automatic int rmul(input int a, input int b);
    int p = 0;
    int x = a;
    for (int k = 0; k < 4; k++) begin
      if (b[k]) p ^= x;
      x = x << 1;
      if (x & 16) x ^= 5'b10011;
    end
    return p & 15;
  endfunction

  function automatic int rinv(input int a);
    for (int b = 1; b < 16; b++) if (rmul(a, b) == 1) return b;
    return 0;
  endfunction

  function automatic int rpow(input int k);
    int v = 1;
    for (int j = 0; j < k % 15; j++) v = rmul(v, 2);
    return v;
  endfunction

  // the code's sparse parity-check matrix, edge e = m*4 + k
  function automatic int rcol(input int e);
    int m = e / 4, k = e % 4;
    if (k == 0) return m;
    if (k == 1) return (m + 5) % 16;
    if (k == 2) return 16 + m;
    return (m == 0) ? 8 : 15 + m;
  endfunction

  function automatic int rcoef(input int e);
    return rpow(3 * (e / 4) + 4 * (e % 4) + 1);
  endfunction

  // systematic encoder: info in columns 0..15, parity p_m in column 16+m,
  // solved row by row (row m holds p_m and, for m>0, p_(m-1))
  function automatic void encode(input int info [KK], output int cw [NN]);
    for (int n = 0; n < KK; n++) cw[n] = info[n];
    for (int m = 0; m < MM; m++) begin
      int s = 0;
      for (int k = 0; k < DCC; k++)
        if (k != 2) s ^= rmul(rcoef(m * 4 + k), cw[rcol(m * 4 + k)]);
      cw[16 + m] = rmul(s, rinv(rcoef(m * 4 + 2)));
    end
  endfunction

  function automatic int ref_syndrome_ok(input int c [NN]);
    for (int m = 0; m < MM; m++) begin
      int s = 0;
      for (int k = 0; k < DCC; k++) s ^= rmul(rcoef(m * 4 + k), c[rcol(m * 4 + k)]);
      if (s != 0) return 0;
    end
    return 1;
  endfunction

  // channel symbol costs from 128 signed samples (bit j of symbol n is
  // sample 4n+j, bit 1 sent as negative)
  function automatic void ref_map(input int y [128], output vec_t l [NN]);
    for (int n = 0; n < NN; n++)
      for (int a = 0; a < QQ; a++) begin
        l[n][a] = 0;
        for (int j = 0; j < 4; j++) begin
          int yy = y[4 * n + j];
          int hb = (yy < 0) ? 1 : 0;
          int mg = (yy < 0) ? -yy : yy;
          if (mg > 31) mg = 31;
          if (((a >> j) & 1) != hb) l[n][a] += mg;
        end
      end
  endfunction

  // one check node by exhaustive search; qn in row order, r_old per edge
  function automatic void ref_cn(input int row, input vec_t qn [DCC], input vec_t r_old [DCC],
                                 output vec_t r_new [DCC],
                                 input int anum = 1, input int aden = 1, input int beta = 0);
    vec_t qe [DCC];
    int   h [DCC];
    for (int k = 0; k < DCC; k++) begin
      int mn = 1 << 30;
      h[k] = rcoef(row * 4 + k);
      for (int a = 0; a < QQ; a++) begin
        qe[k][a] = qn[k][a] - r_old[k][a];
        if (qe[k][a] < 0) qe[k][a] = 0;
        if (qe[k][a] < mn) mn = qe[k][a];
      end
      for (int a = 0; a < QQ; a++) begin
        qe[k][a] -= mn;
        if (qe[k][a] > MSGMAX) qe[k][a] = MSGMAX;
      end
    end
    for (int k = 0; k < DCC; k++) begin
      int o [3];
      int hx [3][QQ];
      int hinv [QQ];
      int t = 0;
      int hi = rinv(h[k]);
      for (int j = 0; j < DCC; j++) if (j != k) o[t++] = j;
      for (int x = 0; x < QQ; x++) begin
        for (int j = 0; j < 3; j++) hx[j][x] = rmul(h[o[j]], x);
        hinv[x] = rmul(hi, x);
      end
      for (int a = 0; a < QQ; a++) r_new[k][a] = 1 << 30;
      for (int x0 = 0; x0 < QQ; x0++)
        for (int x1 = 0; x1 < QQ; x1++)
          for (int x2 = 0; x2 < QQ; x2++) begin
            int a = hinv[hx[0][x0] ^ hx[1][x1] ^ hx[2][x2]];
            int c = qe[o[0]][x0] + qe[o[1]][x1] + qe[o[2]][x2];
            if (c < r_new[k][a]) r_new[k][a] = c;
          end
      for (int a = 0; a < QQ; a++) begin
        if (r_new[k][a] > MSGMAX) r_new[k][a] = MSGMAX;
        r_new[k][a] = (r_new[k][a] * anum) / aden - beta;
        if (r_new[k][a] < 0) r_new[k][a] = 0;
      end
    end
  endfunction

  function automatic void ref_vn(input vec_t l [NN], input vec_t r [NEE], output vec_t qn [NN]);
    for (int n = 0; n < NN; n++)
      for (int a = 0; a < QQ; a++) begin
        qn[n][a] = l[n][a];
        for (int e = 0; e < NEE; e++) if (rcol(e) == n) qn[n][a] += r[e][a];
        if (qn[n][a] > QNMAX) qn[n][a] = QNMAX;
      end
  endfunction

  function automatic void ref_hard(input vec_t qn [NN], output int c [NN]);
    for (int n = 0; n < NN; n++) begin
      c[n] = 0;
      for (int a = 1; a < QQ; a++) if (qn[n][a] < qn[n][c[n]]) c[n] = a;
    end
  endfunction

  // whole decoder; reason codes: 1 syndrome, 2 stable2, 3 fast, 4 max
  function automatic void ref_decode(input int y [128], input int fast_en,
                                     input int imax, input int imin,
                                     output int dec [NN], output int iters,
                                     output int reason, output int sok);
    vec_t l [NN];
    vec_t qn [NN];
    vec_t r [NEE];
    vec_t rn [NEE];
    int   c [NN];
    int   p1 [NN];
    int   p2 [NN];
    ref_map(y, l);
    qn = l;
    for (int e = 0; e < NEE; e++) for (int a = 0; a < QQ; a++) r[e][a] = 0;
    for (int i = 1; i <= imax; i++) begin
      int same1, same2;
      for (int m = 0; m < MM; m++) begin
        vec_t qrow [DCC];
        vec_t rrow [DCC];
        vec_t nrow [DCC];
        for (int k = 0; k < DCC; k++) begin
          qrow[k] = qn[rcol(m * 4 + k)];
          rrow[k] = r[m * 4 + k];
        end
        ref_cn(m, qrow, rrow, nrow);
        for (int k = 0; k < DCC; k++) rn[m * 4 + k] = nrow[k];
      end
      r = rn;
      ref_vn(l, r, qn);
      ref_hard(qn, c);
      sok = ref_syndrome_ok(c);
      same1 = (i >= 2) ? 1 : 0;
      same2 = (i >= 3) ? 1 : 0;
      for (int n = 0; n < NN; n++) begin
        if (c[n] != p1[n]) begin same1 = 0; same2 = 0; end
        if (p1[n] != p2[n]) same2 = 0;
      end
      reason = 0;
      if (sok != 0) reason = 1;
      else if (same2 != 0) reason = 2;
      else if (fast_en != 0 && i >= imin && same1 != 0) reason = 3;
      else if (i >= imax) reason = 4;
      p2 = p1;
      p1 = c;
      if (reason != 0) begin
        dec = c;
        iters = i;
        return;
      end
    end
  endfunction

  // standard normal deviate (Box-Muller)
  function automatic real gauss();
    real u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    real u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK over AWGN at the given Eb/N0 (dB, rate 1/2), quantized with
  // `scale` steps per unit amplitude into 6-bit two's complement
  function automatic void channel(input int cw [NN], input real ebn0_db, input real scale,
                                  output int y [128]);
    real sigma = $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, ebn0_db / 10.0)));
    for (int n = 0; n < NN; n++)
      for (int j = 0; j < 4; j++) begin
        real x = ((cw[n] >> j) & 1) ? -1.0 : 1.0;
        real v = (x + sigma * gauss()) * scale;
        int  q = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
        if (q > 31) q = 31;
        if (q < -32) q = -32;
        y[4 * n + j] = q;
      end
  endfunction

endpackage
