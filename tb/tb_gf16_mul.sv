// tb_gf16_mul: exhaustive check of the look-up-table GF(16) multiplier
// against shift-and-xor multiplication modulo x^4 + x + 1 (all 256 pairs).
module tb_gf16_mul;
  import tb_ref_pkg::*;
  logic [3:0] a, b, p;
  int checks = 0, failures = 0;

  gf16_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(p) != rmul(i, j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, expected %0d", i, j, p, rmul(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
