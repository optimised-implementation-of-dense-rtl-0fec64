// tb_uart: the transmitter is looped back to the receiver; random bytes must
// arrive unchanged, each frame must take 10 bit times, and a frame sent by the
// testbench with a bad stop bit must be dropped.
module tb_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, tx_start = 0, rx_valid, txd, tx_busy, rxd_tb = 1, use_tb = 0;
  logic [7:0] tx_data = 0, rx_data;
  int checks = 0, failures = 0, got [$];
  uart #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd(use_tb ? rxd_tb : txd), .rx_valid, .rx_data,
                                  .tx_start, .tx_data, .txd, .tx_busy);
  always #5 clk = ~clk;
  always @(posedge clk) if (rx_valid) got.push_back(int'(rx_data));
  initial begin
    int sent [$];
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      tx_data = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(int'(tx_data));
      tx_start = 1;
      t0 = $time;
      @(negedge clk); tx_start = 0;
      wait (!tx_busy);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 < 10 * CPB - 1 || (t1 - t0) / 10 > 10 * CPB + 2) begin
        failures++; $display("FAIL frame length %0d clocks", (t1 - t0) / 10);
      end
    end
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL got %0d bytes", got.size()); end
    for (int k = 0; k < sent.size() && k < got.size(); k++) begin
      checks++;
      if (got[k] != sent[k]) begin failures++; if (failures < 5) $display("FAIL byte %0d got %h exp %h", k, got[k], sent[k]); end
    end
    // framing error: stop bit 0
    use_tb = 1;
    got.delete();
    rxd_tb = 0; repeat (CPB) @(posedge clk);            // start
    for (int b = 0; b < 8; b++) begin rxd_tb = 1'(b); repeat (CPB) @(posedge clk); end
    rxd_tb = 0; repeat (CPB) @(posedge clk);            // bad stop
    rxd_tb = 1; repeat (3 * CPB) @(posedge clk);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL framing error accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
