// tb_shift_tap: shifts a random byte stream with random enable gaps and
// compares every tap with a queue model of the last TAPS accepted bytes.
module tb_shift_tap;
  localparam int TAPS = 25;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] din = 0;
  logic [7:0] taps [TAPS];
  logic [7:0] model [TAPS];
  int checks = 0, failures = 0;
  shift_tap #(.TAPS(TAPS)) dut (.clk, .rst_n, .en, .din, .taps);
  always #5 clk = ~clk;
  initial begin
    for (int k = 0; k < TAPS; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (taps[k] !== model[k]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d tap %0d got %0d exp %0d", t, k, taps[k], model[k]);
        end
      end
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      if (en) begin
        for (int k = TAPS - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
