// tb_nbldpc_decoder: end-to-end test of the decoder at its default
// parameters (I_MAX = 18, I_MIN = 6). Random information words are encoded,
// sent as BPSK over an AWGN channel at several Eb/N0 points (plus noiseless
// and very noisy frames), quantized to 6-bit samples and decoded, with
// FAST_EN both off and on. For every frame it checks
//  - decoded word, iteration count, stop reason and syndrome flag against the
//    bit-exact reference decoder (exhaustive-search check nodes);
//  - latency: done exactly 6 + i_stop cycles after start (60 + 10n ns at
//    100 MHz);
//  - syndrome_ok really means H c^T = 0, and a noiseless frame decodes to the
//    sent word in one iteration.
// It counts how often each stop mechanism ended a frame (syndrome, 2-iteration
// stability, fast 1-iteration stability, forced stop at I_MAX) and fails if
// any never occurred; it also starts frames back to back in the done cycle.
// Prints FER and average iterations per Eb/N0 point.
module tb_nbldpc_decoder;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  logic         start = 0, fast_en = 0;
  sample_t      y [NBITS];
  logic         busy, done, sok;
  sym_t         dec [N];
  iter_t        iters;
  stop_reason_t reason;
  int checks = 0, failures = 0;
  int mech [5];
  int cycle = 0;

  nbldpc_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .fast_en(fast_en), .y(y),
                      .busy(busy), .done(done), .dec(dec), .iters(iters), .reason(reason),
                      .syndrome_ok(sok));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // decode one frame; returns with the clock just after the done cycle's negedge
  task automatic run_frame(input int cw [NN], input int yv [128], input int fe,
                           input int noiseless, output int ferr, output int nit);
    int rdec [NN];
    int rit, rreason, rsok, t0, lat;
    for (int k = 0; k < 128; k++) y[k] = sample_t'(yv[k]);
    fast_en = fe[0];
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    fast_en = ~fast_en;     // sampled with start only
    for (int k = 0; k < 128; k++) y[k] = sample_t'($urandom);   // captured already
    while (!done) @(negedge clk);
    lat = cycle - t0;
    ref_decode(yv, fe, 18, 6, rdec, rit, rreason, rsok);
    chk(int'(iters) == rit, $sformatf("iterations %0d exp %0d", iters, rit));
    chk(int'(reason) == rreason, $sformatf("reason %0d exp %0d", reason, rreason));
    chk(int'(sok) == rsok, "syndrome flag");
    chk(lat == 6 + int'(iters), $sformatf("latency %0d for %0d iterations", lat, iters));
    ferr = 0;
    begin
      int d [NN];
      for (int n = 0; n < N; n++) begin
        d[n] = int'(dec[n]);
        if (d[n] != rdec[n]) begin
          chk(0, $sformatf("decoded symbol %0d", n));
        end
        if (d[n] != cw[n]) ferr = 1;
      end
      checks++;
      if (d != rdec) failures++;
      if (sok) chk(ref_syndrome_ok(d) == 1, "syndrome_ok but H c != 0");
    end
    if (noiseless) chk(ferr == 0 && iters == 1, "noiseless frame");
    if (int'(reason) < 5) mech[int'(reason)]++;
    nit = int'(iters);
  endtask

  initial begin
    real snrs [8] = '{8.0, 6.0, 4.0, 3.0, 2.0, 1.0, 0.0, -2.0};
    int  info [KK];
    int  cw [NN];
    int  yv [128];
    int  ferr, nit;
    for (int r = 0; r < 5; r++) mech[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // noiseless frames, started back to back
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < KK; n++) info[n] = int'($urandom % 16);
      encode(info, cw);
      for (int n = 0; n < NN; n++)
        for (int j = 0; j < 4; j++) yv[4 * n + j] = ((cw[n] >> j) & 1) ? -8 : 8;
      run_frame(cw, yv, f % 2, 1, ferr, nit);
    end
    // confident frames of a random word that is not a codeword: the decoder
    // can lock onto a wrong, unchanging hard decision
    for (int f = 0; f < 24; f++) begin
      for (int n = 0; n < NN; n++) cw[n] = int'($urandom % 16);
      for (int n = 0; n < NN; n++)
        for (int j = 0; j < 4; j++)
          yv[4 * n + j] = (((cw[n] >> j) & 1) ? -1 : 1) * ((f % 3 == 0) ? 31 : 4 + int'($urandom % 28));
      run_frame(cw, yv, f % 2, 0, ferr, nit);
    end
    // a confident codeword whose weight-1 column (symbol 31) is received with
    // all four bits inverted: check 15 alone cannot outvote the channel, so
    // the decoder settles on a wrong word that never changes
    for (int f = 0; f < 4; f++) begin
      for (int n = 0; n < KK; n++) info[n] = int'($urandom % 16);
      encode(info, cw);
      for (int n = 0; n < NN; n++)
        for (int j = 0; j < 4; j++)
          yv[4 * n + j] = ((((cw[n] ^ ((n == 31) ? 15 : 0)) >> j) & 1) ? -31 : 31);
      run_frame(cw, yv, f % 2, 0, ferr, nit);
    end
    for (int s = 0; s < 8; s++) begin
      automatic int fr = 0, fe_cnt = 0, it_sum = 0;
      for (int f = 0; f < ((snrs[s] < 3.5 && snrs[s] > -1.0) ? 80 : 16); f++) begin
        for (int n = 0; n < KK; n++) info[n] = int'($urandom % 16);
        encode(info, cw);
        channel(cw, snrs[s], 8.0, yv);
        run_frame(cw, yv, f % 2, 0, ferr, nit);
        fr++;
        fe_cnt += ferr;
        it_sum += nit;
        if (f % 4 == 3) repeat ($urandom % 3) @(negedge clk);
      end
      $display("Eb/N0 %4.1f dB: frames %0d FER %0.3f avg iterations %0.2f", snrs[s], fr,
               real'(fe_cnt) / real'(fr), real'(it_sum) / real'(fr));
    end
    $display("stops: syndrome=%0d stable2=%0d fast=%0d max=%0d",
             mech[1], mech[2], mech[3], mech[4]);
    for (int r = 1; r < 5; r++) chk(mech[r] > 0, $sformatf("stop mechanism %0d never occurred", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
