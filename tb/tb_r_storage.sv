// tb_r_storage: random clear / write / hold sequence on the edge-message
// store, compared with a model after every edge; clear has priority.
module tb_r_storage;
  import nbldpc_pkg::*;
  logic  clk = 0;
  logic  clear, we;
  mvec_t r_in [NE], r_out [NE], r_exp [NE];
  int checks = 0, failures = 0;

  r_storage dut (.clk(clk), .clear(clear), .we(we), .r_in(r_in), .r_out(r_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      automatic int op = $urandom % 4;
      @(negedge clk);
      for (int e = 0; e < NE; e++)
        for (int a = 0; a < Q; a++) r_in[e][a] = MSG_W'($urandom);
      clear = (t == 0) || (op == 0) || (op == 3);
      we    = (op == 1) || (op == 3);
      @(posedge clk);
      if (clear) for (int e = 0; e < NE; e++) r_exp[e] = '0;
      else if (we) r_exp = r_in;
      #1;
      for (int e = 0; e < NE; e++) begin
        checks++;
        if (r_out[e] != r_exp[e]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d edge %0d", t, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
