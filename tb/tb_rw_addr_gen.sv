// tb_rw_addr_gen: walks 20 lines from a load point and checks the position,
// the SRAM byte offset y*W+x and the line-buffer address (y mod 16)*W+x at
// every step, plus end-of-line and reload.
module tb_rw_addr_gen;
  localparam int W = 320;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [9:0] x0 = 0, x;
  logic [8:0] y0 = 0, y;
  logic [19:0] src_byte;
  logic [13:0] lb_wr_addr;
  logic eol;
  int checks = 0, failures = 0;
  rw_addr_gen #(.IMG_W(W)) dut (.clk, .rst_n, .load, .x0, .y0, .step, .x, .y, .src_byte, .lb_wr_addr, .eol);
  always #5 clk = ~clk;
  task automatic expect_pos(input int ex, input int ey);
    checks++;
    if (int'(x) != ex || int'(y) != ey || int'(src_byte) != ey * W + ex ||
        int'(lb_wr_addr) != (ey % 16) * W + ex || eol != (ex == W - 2)) begin
      failures++;
      if (failures < 5) $display("FAIL exp (%0d,%0d) got (%0d,%0d) src %0d lb %0d eol %0b", ex, ey, x, y, src_byte, lb_wr_addr, eol);
    end
  endtask
  initial begin
    int ex, ey;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    expect_pos(0, 0);
    load = 1; x0 = 10'd4; y0 = 9'd13;
    @(negedge clk);
    load = 0;
    ex = 4; ey = 13;
    expect_pos(ex, ey);
    for (int t = 0; t < 20 * W / 2; t++) begin
      step = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (step) begin
        if (ex == W - 2) begin ex = 0; ey++; end else ex += 2;
      end
      step = 0;
      expect_pos(ex, ey);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
