// tb_abs_diff: exhaustive check of the absolute difference unit against
// a reference computed with integer arithmetic.
module tb_abs_diff;
  logic [7:0] l, r;
  logic [8:0] ad;
  int checks = 0, failures = 0;
  abs_diff dut (.l, .r, .ad);
  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b += 3) begin
        int exp_v;
        l = 8'(a); r = 8'(b); #1;
        exp_v = (a > b) ? a - b : b - a;
        checks++;
        if (int'(ad) != exp_v) begin
          failures++;
          if (failures < 5) $display("FAIL |%0d-%0d| got %0d exp %0d", a, b, ad, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
