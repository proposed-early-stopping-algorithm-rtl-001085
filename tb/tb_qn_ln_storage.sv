// tb_qn_ln_storage: writes L_n, initializes Q_n from it, rewrites Q_n,
// and checks that each register holds when its enable is low and that init
// wins over qn_we.
module tb_qn_ln_storage;
  import nbldpc_pkg::*;
  logic  clk = 0;
  logic  l_we, init, qn_we;
  lvec_t l_in [N], l_out [N], l_exp [N];
  qvec_t qn_in [N], qn_out [N], q_exp [N];
  int checks = 0, failures = 0;

  qn_ln_storage dut (.clk(clk), .l_we(l_we), .l_in(l_in), .init(init), .qn_we(qn_we),
                     .qn_in(qn_in), .l_out(l_out), .qn_out(qn_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rnd();
    for (int n = 0; n < N; n++)
      for (int a = 0; a < Q; a++) begin
        l_in[n][a]  = L_W'($urandom);
        qn_in[n][a] = QN_W'($urandom);
      end
  endtask

  task automatic check_all();
    for (int n = 0; n < N; n++) begin
      checks++;
      if (l_out[n] != l_exp[n] || qn_out[n] != q_exp[n]) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d", n);
      end
    end
  endtask

  initial begin
    l_we = 0; init = 0; qn_we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int op = $urandom % 5;
      @(negedge clk);
      rnd();
      l_we  = (op == 0);
      init  = (op == 1) || (op == 4);
      qn_we = (op == 2) || (op == 4);
      if (t < 2) begin l_we = 1; init = (t == 1); qn_we = 0; end
      @(posedge clk);
      if (init) begin
        for (int n = 0; n < N; n++)
          for (int a = 0; a < Q; a++) q_exp[n][a] = QN_W'(l_exp[n][a]);
      end else if (qn_we) q_exp = qn_in;
      if (l_we) l_exp = l_in;
      #1;
      if (t >= 2) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
