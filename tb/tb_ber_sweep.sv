// tb_ber_sweep: error-rate and iteration-count sweep of the decoder at its
// default parameters with FAST_EN set, over Eb/N0 = 5.0 .. 8.0 dB in 0.5 dB
// steps (rate-1/2 BPSK over AWGN, 8 quantization steps per unit amplitude).
// Each point decodes FRAMES random codewords. Per frame it checks that done
// comes exactly 6 + iters cycles after start, that iters is within
// 1..I_MAX, and that a frame flagged syndrome_ok really satisfies every
// parity check (verified with the independent reference arithmetic). It
// prints, per point, BER over the information bits, FER, average
// iterations and average latency in ns for a 100 MHz clock (10 ns cycles).
module tb_ber_sweep;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int FRAMES = 20000;
  logic         clk = 0, rst_n = 0;
  logic         start = 0;
  sample_t      y [NBITS];
  logic         busy, done, sok;
  sym_t         dec [N];
  iter_t        iters;
  stop_reason_t reason;
  int checks = 0, failures = 0;
  int cycle = 0;

  nbldpc_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .fast_en(1'b1), .y(y),
                      .busy(busy), .done(done), .dec(dec), .iters(iters), .reason(reason),
                      .syndrome_ok(sok));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (7 * FRAMES * 30) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int info [KK];
    int cw [NN];
    int yv [128];
    int d [NN];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 7; s++) begin
      automatic real ebn0 = 5.0 + 0.5 * real'(s);
      automatic longint bit_err = 0;
      automatic int fr_err = 0, it_sum = 0, lat_sum = 0;
      for (int f = 0; f < FRAMES; f++) begin
        automatic int t0;
        automatic int ferr = 0;
        for (int n = 0; n < KK; n++) info[n] = int'($urandom % 16);
        encode(info, cw);
        channel(cw, ebn0, 8.0, yv);
        for (int k = 0; k < 128; k++) y[k] = sample_t'(yv[k]);
        start = 1;
        t0 = cycle;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        checks++;
        if (cycle - t0 != 6 + int'(iters) || iters == 0 || int'(iters) > 18) begin
          failures++;
          $display("FAIL latency %0d for %0d iterations", cycle - t0, iters);
        end
        for (int n = 0; n < NN; n++) d[n] = int'(dec[n]);
        checks++;
        if (sok && ref_syndrome_ok(d) == 0) begin
          failures++;
          $display("FAIL syndrome_ok on a non-codeword");
        end
        for (int n = 0; n < KK; n++)
          if (d[n] != cw[n]) begin
            ferr = 1;
            bit_err += longint'($countones(4'(d[n] ^ cw[n])));
          end
        fr_err += ferr;
        it_sum += int'(iters);
        lat_sum += cycle - t0;
      end
      $display("Eb/N0 %3.1f dB: BER %.3e FER %.4f avg iterations %5.2f avg latency %6.1f ns",
               ebn0, real'(bit_err) / real'(FRAMES * 64), real'(fr_err) / real'(FRAMES),
               real'(it_sum) / real'(FRAMES), 10.0 * real'(lat_sum) / real'(FRAMES));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
