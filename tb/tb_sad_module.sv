// tb_sad_module: random 5x5 window pairs; the registered SAD must equal the
// sum of absolute differences one clock after en, for both settings of sw,
// and must hold while en is low.
module tb_sad_module;
  logic clk = 0, rst_n = 0, en = 0, sw = 0;
  logic [7:0] in_a [25], in_b [25];
  logic [12:0] sad;
  int checks = 0, failures = 0;
  sad_module dut (.clk, .rst_n, .en, .sw, .in_a, .in_b, .sad);
  always #5 clk = ~clk;
  initial begin
    int exp_v, held;
    for (int k = 0; k < 25; k++) begin in_a[k] = 0; in_b[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      exp_v = 0;
      for (int k = 0; k < 25; k++) begin
        in_a[k] = (t == 0) ? 8'd255 : 8'($urandom);
        in_b[k] = (t == 0) ? 8'd0   : 8'($urandom);
        exp_v += (in_a[k] > in_b[k]) ? int'(in_a[k]) - int'(in_b[k]) : int'(in_b[k]) - int'(in_a[k]);
      end
      sw = t[0];
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (int'(sad) != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d got %0d exp %0d", t, sad, exp_v);
      end
      // change inputs without en: output must hold
      held = int'(sad);
      for (int k = 0; k < 25; k++) in_a[k] = 8'($urandom);
      @(negedge clk);
      checks++;
      if (int'(sad) != held) failures++;
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
