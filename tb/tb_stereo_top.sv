// tb_stereo_top: end-to-end test of the stereo core at reduced size.
//
// Frame 1: the testbench acts as the host PC. It sends a left and a right
// image over the serial line, the core matches them, writes the disparity
// map to the SRAM and sends it back over the serial line. Frame 2: new images
// are written straight into the SRAM model, the frame is started with the
// start pin and sw = 1. Every disparity (in the SRAM and, for frame 1, on the
// serial line) is compared with a brute-force SAD search computed here
// (window anchored at its top-left pixel, candidate window d columns to the
// right, pixels past the right edge read as 0, ties to the smaller d).
//
// The line buffers are reduced to WIN lines, so a line can only be refilled
// after the row that used its slot is finished and the controller must stall. The test
// counts each mechanism (serial load, buffer initialisation, shift-chain
// initialisation, column feeding, SAD evaluation, line updates, stalls, zero
// fill past the edge, disparity writes, serial read-back, start pin) and
// fails if one never happened.
module tb_stereo_top;
  import stereo_pkg::*;
  localparam int W = 24, H = 22, WIN = 5, ND = 8, NL = 5, CPB = 4;
  localparam int XP = W - WIN, YP = H - WIN;
  localparam int NPOS = (XP + 1) * (YP + 1);

  logic clk = 0, rst_n = 0, start = 0, sw = 0, uart_rxd = 1, uart_txd, busy, done;
  logic [17:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata;
  logic sram_ce_n, sram_we_n, sram_oe_n;
  int checks = 0, failures = 0;

  stereo_top #(.IMG_W(W), .IMG_H(H), .WIN(WIN), .NDISP(ND), .NLINES(NL), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .start, .sw, .uart_rxd, .uart_txd, .sram_addr, .sram_wdata, .sram_rdata,
    .sram_ce_n, .sram_we_n, .sram_oe_n, .busy, .done);
  sram_model #(.AW(18), .DEPTH(4096)) u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
    .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n));

  always #5 clk = ~clk;

  logic [7:0] L [H][W];
  logic [7:0] R [H][W];
  int expd [H][W];

  // ---- event counters
  int n_load_bytes = 0, n_buf_init = 0, n_row_init = 0, n_feed = 0, n_compute = 0, n_update = 0;
  int n_stall = 0, n_zero = 0, n_dwrite = 0, n_tx = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.rx_valid) n_load_bytes++;
    if (dut.mm_init_done) n_buf_init++;
    if (dut.row_start) n_row_init++;
    if (dut.col_feed) n_feed++;
    if (dut.k_compute) n_compute++;
    if (dut.mm_update) n_update++;
    if (dut.stall) n_stall++;
    if (dut.u_smc.p1_r && !dut.u_smc.p1_in_r) n_zero++;
    if (dut.gnt[0]) n_dwrite++;
    if (dut.tx_start) n_tx++;
    if (done) n_done++;
  end

  task automatic make_images(input int shift);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) R[y][x] = 8'($urandom);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        L[y][x] = (x + shift < W) ? R[y][x + shift] : 8'($urandom);
    for (int y = 0; y <= YP; y++)
      for (int x = 0; x <= XP; x++) begin
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
        expd[y][x] = bd;
      end
  endtask

  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int k = 0; k < 8; k++) begin uart_rxd = b[k]; repeat (CPB) @(posedge clk); end
    uart_rxd = 1; repeat (CPB + 1) @(posedge clk);
  endtask

  // serial receiver for the read-back
  int rx_bytes [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin b[k] = uart_txd; repeat (CPB) @(posedge clk); end
      rx_bytes.push_back(int'(b));
    end
  end

  task automatic check_sram(input string tag);
    int bad = 0;
    for (int y = 0; y <= YP; y++)
      for (int x = 0; x <= XP; x++) begin
        checks++;
        if (int'(u_sram.mem[W * H + y * W + x]) != expd[y][x]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s (%0d,%0d) got %0d exp %0d", tag, x, y, u_sram.mem[W * H + y * W + x], expd[y][x]);
        end
      end
  endtask

  task automatic chk_event(input int n, input string name);
    checks++;
    $display("event %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
  endtask

  initial begin
    int t0, frame_clocks;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    // ------------------------------------------------ frame 1 over the UART
    make_images(3);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) send_byte(L[y][x]);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) send_byte(R[y][x]);
    wait (done);
    repeat (2) @(posedge clk);
    check_sram("frame1");
    // wait for the read-back
    wait (rx_bytes.size() == NPOS);
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (rx_bytes.size() != NPOS) begin failures++; $display("FAIL read-back %0d bytes", rx_bytes.size()); end
    for (int k = 0; k < NPOS && k < rx_bytes.size(); k++) begin
      checks++;
      if (rx_bytes[k] != expd[k / (XP + 1)][k % (XP + 1)]) begin
        failures++;
        if (failures < 10) $display("FAIL read-back %0d got %0d exp %0d", k, rx_bytes[k], expd[k / (XP + 1)][k % (XP + 1)]);
      end
    end
    // ------------------------------------------------ frame 2 by the start pin
    make_images(5);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 2) begin
        u_sram.mem[(y * W + x) / 2]             = {L[y][x+1], L[y][x]};
        u_sram.mem[W * H / 2 + (y * W + x) / 2] = {R[y][x+1], R[y][x]};
      end
    for (int k = W * H; k < 2 * W * H; k++) u_sram.mem[k] = 16'hFFFF;
    sw = 1;
    @(negedge clk); start = 1; t0 = $time; @(negedge clk); start = 0;
    wait (done);
    frame_clocks = ($time - t0) / 10;
    $display("frame 2 took %0d clocks", frame_clocks);
    repeat (2) @(posedge clk);
    check_sram("frame2");
    checks++;
    if (rx_bytes.size() != NPOS) begin failures++; $display("FAIL unexpected read-back after a start-pin frame"); end
    chk_event(n_load_bytes, "serial image bytes");
    chk_event(n_buf_init, "buffer initialisation");
    chk_event(n_row_init, "Init_Shifttap (new row)");
    chk_event(n_feed, "Feeding_Shifttap");
    chk_event(n_compute, "DISP (SAD evaluation)");
    chk_event(n_update, "line-buffer update");
    chk_event(n_stall, "stall on refill");
    chk_event(n_zero, "zero fill past edge");
    chk_event(n_dwrite, "disparity write");
    chk_event(n_tx, "serial read-back");
    checks++;
    if (n_done != 2 || n_dwrite != 2 * NPOS || n_compute != 2 * NPOS || n_buf_init != 2) begin
      failures++; $display("FAIL counts done %0d writes %0d computes %0d inits %0d", n_done, n_dwrite, n_compute, n_buf_init);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
