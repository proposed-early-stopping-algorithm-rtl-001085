// tb_es_stability: drives sequences of frame hard decisions (random, equal
// to the previous one, equal for two iterations, single-symbol changes) and
// compares hard_same_1 / hard_same_2 with a model of the two history buffers,
// including the empty-history behaviour after clear.
module tb_es_stability;
  import nbldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear, shift;
  sym_t hard [N];
  logic hard_same_1, hard_same_2;
  int checks = 0, failures = 0;
  int n_s1 = 0, n_s2 = 0;

  es_stability dut (.clk(clk), .rst_n(rst_n), .clear(clear), .shift(shift), .hard(hard),
                    .hard_same_1(hard_same_1), .hard_same_2(hard_same_2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t p1 [N];
    sym_t p2 [N];
    int   cnt = 0;
    clear = 0; shift = 0;
    for (int n = 0; n < N; n++) hard[n] = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      automatic int op = $urandom % 10;
      @(negedge clk);
      clear = (op == 0);
      shift = (op != 1);
      case ($urandom % 4)
        0: for (int n = 0; n < N; n++) hard[n] = sym_t'($urandom);
        1: ;                                                   // unchanged
        2: hard[$urandom % N] = sym_t'($urandom);              // maybe one change
        default: hard = p1;
      endcase
      #1;
      begin
        logic e1, e2;
        e1 = (cnt >= 1) && (hard == p1);
        e2 = (cnt >= 2) && (hard == p1) && (p1 == p2);
        checks++;
        if (hard_same_1 != e1 || hard_same_2 != e2) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d s1=%0d/%0d s2=%0d/%0d", t, hard_same_1, e1, hard_same_2, e2);
        end
        n_s1 += int'(e1);
        n_s2 += int'(e2);
      end
      @(posedge clk);
      if (clear) cnt = 0;
      else if (shift) cnt = (cnt == 2) ? 2 : cnt + 1;
      if (shift) begin p2 = p1; p1 = hard; end
    end
    checks++;
    if (n_s1 == 0 || n_s2 == 0) failures++;
    $display("stable1=%0d stable2=%0d", n_s1, n_s2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
