// tb_llr_mapper: random sample frames (including the clipping values -32
// and 31) are loaded; three clock edges later every L_n(a) must equal the
// reference bit-metric sum. Also checks that the captured frame is held while
// load is low.
module tb_llr_mapper;
  import nbldpc_pkg::*;
  import tb_ref_pkg::*;
  logic    clk = 0;
  logic    load;
  sample_t y [NBITS];
  lvec_t   l_out [N];
  int checks = 0, failures = 0;

  llr_mapper dut (.clk(clk), .load(load), .y(y), .l_out(l_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int yv [128]);
    vec_t l [NN];
    ref_map(yv, l);
    for (int n = 0; n < N; n++)
      for (int a = 0; a < Q; a++) begin
        checks++;
        if (int'(l_out[n][a]) != l[n][a]) begin
          failures++;
          if (failures < 10) $display("FAIL L[%0d][%0d]=%0d exp %0d", n, a, l_out[n][a], l[n][a]);
        end
      end
  endtask

  initial begin
    int yv [128];
    load = 0;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk);
      for (int k = 0; k < 128; k++) begin
        case ($urandom % 8)
          0: yv[k] = -32;
          1: yv[k] = 31;
          2: yv[k] = 0;
          default: yv[k] = int'($urandom % 64) - 32;
        endcase
        y[k] = sample_t'(yv[k]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 128; k++) y[k] = sample_t'($urandom);  // must be ignored
      repeat (2) @(negedge clk);
      compare(yv);
      repeat (3) @(negedge clk);
      compare(yv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
