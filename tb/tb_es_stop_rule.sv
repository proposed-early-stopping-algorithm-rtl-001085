// tb_es_stop_rule: exhaustive check of the stop rule over every iteration
// index and every combination of the four condition bits, with the
// specified I_MAX = 18 and I_MIN = 6, against the priority list
// syndrome > stable2 > fast (FAST_EN, i >= I_MIN, stable1) > i == I_MAX.
module tb_es_stop_rule;
  import nbldpc_pkg::*;
  iter_t        i;
  logic         sok, s1, s2, fe, stop;
  stop_reason_t reason;
  int checks = 0, failures = 0;

  es_stop_rule dut (.i(i), .syndrome_ok(sok), .hard_same_1(s1), .hard_same_2(s2),
                    .fast_en(fe), .stop(stop), .reason(reason));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 1; it <= 18; it++)
      for (int v = 0; v < 16; v++) begin
        int exp_r;
        i = iter_t'(it);
        {sok, s1, s2, fe} = 4'(v);
        #1;
        if (sok) exp_r = 1;
        else if (s2) exp_r = 2;
        else if (fe && it >= 6 && s1) exp_r = 3;
        else if (it == 18) exp_r = 4;
        else exp_r = 0;
        checks++;
        if (int'(reason) != exp_r || stop != (exp_r != 0)) begin
          failures++;
          $display("FAIL i=%0d flags=%b reason=%0d exp %0d", it, v[3:0], reason, exp_r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
