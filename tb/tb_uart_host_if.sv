// tb_uart_host_if: received bytes of an 8x8 image pair must be written to
// the SRAM as packed words in the left and right banks, followed by one
// images_ready pulse; a send pulse must read the 4x4 disparity window in
// raster order (offset 2*(j*8+i)) and hand each low byte to the transmitter.
// The testbench plays the SRAM (random grants, two-clock reads) and the UART.
module tb_uart_host_if;
  import stereo_pkg::*;
  localparam int W = 8, H = 8, WIN = 5;
  logic clk = 0, rst_n = 0, rx_valid = 0, send = 0, tx_busy = 0, gnt, rvalid;
  logic [7:0] rx_data = 0, tx_data;
  logic tx_start, images_ready;
  sram_req_t req;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  uart_host_if #(.IMG_W(W), .IMG_H(H), .WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  logic [15:0] mem [4][256];   // per bank, by word offset
  logic v1 = 0, v2 = 0;
  logic [15:0] d1, d2;
  assign gnt = req.valid && ($urandom_range(0, 2) != 0);
  assign rvalid = v2;
  assign rdata = d2;
  always @(posedge clk) begin
    if (rst_n && req.valid && gnt && req.we) mem[req.bank][req.byte_off / 2] <= req.wdata;
    v1 <= rst_n && req.valid && gnt && !req.we;
    d1 <= mem[req.bank][req.byte_off / 2];
    v2 <= v1; d2 <= d1;
  end
  int n_ready = 0, tx_q [$];
  always @(posedge clk) begin
    if (rst_n && images_ready) n_ready++;
    if (rst_n && tx_start) begin
      tx_q.push_back(int'(tx_data));
      tx_busy <= 1;
      fork begin repeat (7) @(posedge clk); tx_busy <= 0; end join_none
    end
  end

  initial begin
    logic [7:0] img [2 * W * H];
    for (int b = 0; b < 4; b++) for (int k = 0; k < 256; k++) mem[b][k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 2 * W * H; k++) begin
      img[k] = 8'($urandom);
      @(negedge clk); rx_valid = 1; rx_data = img[k];
      @(negedge clk); rx_valid = 0;
      // a serial byte takes thousands of clocks, so the previous word has always
      // reached the SRAM before the next byte arrives
      while (req.valid) @(negedge clk);
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_ready != 1) begin failures++; $display("FAIL images_ready %0d", n_ready); end
    for (int k = 0; k < 2 * W * H; k += 2) begin
      int bank, off;
      bank = (k < W * H) ? 0 : 1;
      off = (k % (W * H)) / 2;
      checks++;
      if (mem[bank][off] != {img[k+1], img[k]}) begin
        failures++;
        if (failures < 5) $display("FAIL word %0d bank %0d got %h exp %h", off, bank, mem[bank][off], {img[k+1], img[k]});
      end
    end
    for (int k = 0; k < W * H; k++) mem[2][k] = 16'(k * 3 + 1);
    @(negedge clk); send = 1; @(negedge clk); send = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (tx_q.size() != (W - WIN + 1) * (H - WIN + 1)) begin failures++; $display("FAIL sent %0d bytes", tx_q.size()); end
    for (int k = 0; k < tx_q.size(); k++) begin
      int i, j;
      i = k % (W - WIN + 1); j = k / (W - WIN + 1);
      checks++;
      if (tx_q[k] != ((j * W + i) * 3 + 1) % 256) begin failures++; if (failures < 8) $display("FAIL byte %0d got %0d", k, tx_q[k]); end
    end
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
