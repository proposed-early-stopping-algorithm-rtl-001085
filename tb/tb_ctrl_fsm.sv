// tb_ctrl_fsm: runs frames whose stop arrives after n = 1..18 iterations
// and checks the enable sequence (load, three cycles later l_we, then init,
// then n cycles of iter_en), the counter i = 1..n during ITERATE, the latched
// i_stop, the start-to-done latency of 6+n cycles, that start is ignored
// while busy, and a back-to-back frame started in the cycle done is high.
module tb_ctrl_fsm;
  import nbldpc_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  start = 0, stop = 0;
  logic  busy, load, l_we, init, iter_en, done;
  iter_t i, i_stop;
  int checks = 0, failures = 0;

  ctrl_fsm dut (.clk(clk), .rst_n(rst_n), .start(start), .stop(stop), .busy(busy),
                .load(load), .l_we(l_we), .init(init), .iter_en(iter_en), .i(i),
                .i_stop(i_stop), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one frame; start is raised in the current cycle (after a negedge)
  task automatic frame(input int n);
    int cyc;
    start = 1;
    #1;
    chk(load && !busy, "load with start");
    @(negedge clk);
    start = 1;                 // must be ignored while busy
    cyc = 1;
    while (!done && cyc < 40) begin
      chk(load == 0, "no load while busy");
      chk(l_we == (cyc == 3), $sformatf("l_we at cycle %0d", cyc));
      chk(init == (cyc == 4), $sformatf("init at cycle %0d", cyc));
      chk(iter_en == (cyc >= 5 && cyc <= 4 + n), $sformatf("iter_en at cycle %0d", cyc));
      if (iter_en) begin
        chk(int'(i) == cyc - 4, "iteration counter");
        stop = (int'(i) == n);
      end else stop = $urandom % 2;   // ignored outside ITERATE
      @(negedge clk);
      start = 0;
      cyc++;
    end
    chk(cyc == 6 + n, $sformatf("latency %0d for n=%0d", cyc, n));
    chk(int'(i_stop) == n, "i_stop");
    chk(!busy, "idle with done");
    stop = 0;
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    for (int n = 1; n <= 18; n++) begin
      frame(n);
      if (n % 3 == 0) begin
        @(negedge clk);
        chk(!done, "done is a single pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
