// tb_parallel_adder: random and extreme operand sets, compared with a
// running sum computed in the testbench.
module tb_parallel_adder;
  logic [8:0]  in_vec [25];
  logic [12:0] sum;
  int checks = 0, failures = 0;
  parallel_adder dut (.in_vec, .sum);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int exp_v = 0;
      for (int k = 0; k < 25; k++) begin
        in_vec[k] = (t == 0) ? 9'd255 : (t == 1) ? 9'd0 : 9'($urandom_range(0, 255));
        exp_v += int'(in_vec[k]);
      end
      #1;
      checks++;
      if (int'(sum) != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d got %0d exp %0d", t, sum, exp_v);
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
