// tb_stereo_top_full: one complete 320x240 frame with 64 disparities and a
// 5x5 window, at the core's default parameters.
//
// A random right image and a left image made of horizontally shifted copies
// of it (a different shift in each band of 40 rows, 4..54 pixels, plus a
// little noise) are written straight into the SRAM model, the frame is
// started with the start pin, and every one of the 316x236 disparities in the
// SRAM is compared with a brute-force SAD search computed here. The frame
// must finish within 1,000,000 clocks, i.e. 50 frames per second at 50 MHz.
module tb_stereo_top_full;
  localparam int W = 320, H = 240, WIN = 5, ND = 64;
  localparam int XP = W - WIN, YP = H - WIN;
  logic clk = 0, rst_n = 0, start = 0, sw = 0, uart_rxd = 1, uart_txd, busy, done;
  logic [17:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata;
  logic sram_ce_n, sram_we_n, sram_oe_n;
  int checks = 0, failures = 0;

  stereo_top dut (.clk, .rst_n, .start, .sw, .uart_rxd, .uart_txd, .sram_addr, .sram_wdata, .sram_rdata,
                  .sram_ce_n, .sram_we_n, .sram_oe_n, .busy, .done);
  sram_model #(.AW(18)) u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
                                .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n));
  always #5 clk = ~clk;

  logic [7:0] L [H][W];
  logic [7:0] R [H][W];

  function automatic int ref_disp(input int x, input int y);
    int best, bd, s;
    best = 1 << 30; bd = 0;
    for (int d = 0; d < ND; d++) begin
      s = 0;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          int a, b;
          a = int'(L[y+r][x+c]);
          b = (x + d + c < W) ? int'(R[y+r][x+d+c]) : 0;
          s += (a > b) ? a - b : b - a;
        end
      if (s < best) begin best = s; bd = d; end
    end
    return bd;
  endfunction

  initial begin
    int t0, clocks, bad, shift, hist [ND];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) R[y][x] = 8'($urandom);
    for (int y = 0; y < H; y++) begin
      shift = 4 + 10 * (y / 40);
      for (int x = 0; x < W; x++)
        L[y][x] = (x + shift < W) ? 8'(int'(R[y][x + shift]) ^ $urandom_range(0, 3)) : 8'($urandom);
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 2) begin
        u_sram.mem[(y * W + x) / 2]             = {L[y][x+1], L[y][x]};
        u_sram.mem[W * H / 2 + (y * W + x) / 2] = {R[y][x+1], R[y][x]};
      end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    @(negedge clk); start = 1; t0 = $time; @(negedge clk); start = 0;
    wait (done);
    clocks = ($time - t0) / 10;
    repeat (4) @(posedge clk);           // last write reaches the SRAM pins
    $display("frame took %0d clocks (%0.1f frames/s at 50 MHz)", clocks, 50.0e6 / clocks);
    checks++;
    if (clocks > 1000000) begin failures++; $display("FAIL frame longer than 1,000,000 clocks"); end
    bad = 0;
    for (int d = 0; d < ND; d++) hist[d] = 0;
    for (int y = 0; y <= YP; y++)
      for (int x = 0; x <= XP; x++) begin
        int e, g;
        e = ref_disp(x, y);
        g = int'(u_sram.mem[W * H + y * W + x]);
        if (g < ND) hist[g]++;
        checks++;
        if (g != e) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL (%0d,%0d) got %0d exp %0d", x, y, g, e);
        end
      end
    $display("disparities 4/14/24/34/44/54 found: %0d %0d %0d %0d %0d %0d", hist[4], hist[14], hist[24], hist[34], hist[44], hist[54]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
