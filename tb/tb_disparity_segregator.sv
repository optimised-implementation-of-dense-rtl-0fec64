// tb_disparity_segregator: random SAD vectors (with forced ties and a
// single planted minimum); disp must be the lowest index of the smallest SAD,
// one clock after in_valid.
module tb_disparity_segregator;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [12:0] sad [64];
  logic out_valid;
  logic [7:0] disp;
  logic [12:0] sad_min;
  int checks = 0, failures = 0;
  disparity_segregator dut (.clk, .rst_n, .in_valid, .sad, .out_valid, .disp, .sad_min);
  always #5 clk = ~clk;
  initial begin
    int best, bi;
    for (int k = 0; k < 64; k++) sad[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 64; k++)
        sad[k] = (t % 3 == 0) ? 13'($urandom_range(100, 110)) : 13'($urandom_range(0, 8191));
      if (t % 5 == 1) sad[$urandom_range(0, 63)] = 13'd7;
      best = 1 << 20; bi = 0;
      for (int k = 0; k < 64; k++) if (int'(sad[k]) < best) begin best = int'(sad[k]); bi = k; end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(disp) != bi || int'(sad_min) != best) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d v=%0b disp %0d exp %0d min %0d exp %0d", t, out_valid, disp, bi, sad_min, best);
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
