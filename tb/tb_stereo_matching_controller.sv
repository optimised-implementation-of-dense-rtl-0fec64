// tb_stereo_matching_controller: the controller drives the real disparity
// kernel (64 disparities, 5x5 window) on a 76x20 image. The testbench plays
// the memory-management side (initial fill, one-word updates) and both line
// buffers (one-clock read latency, slot = line mod NLINES). It checks the time spent
// in each state (Init_Shifttap 342 clocks, Feeding_Shifttap 7, DISP 2),
// every disparity write (raster order, address 2*(y*W+x), value from a
// brute-force SAD search), the refills of lines 16..19 and the done pulse.
module tb_stereo_matching_controller;
  import stereo_pkg::*;
  localparam int W = 76, H = 20, WIN = 5, ND = 64, NL = 16;
  localparam int XP = W - WIN, YP = H - WIN, RC = ND + WIN - 1;
  logic clk = 0, rst_n = 0, go = 0;
  logic mm_start, mm_update, mm_init_done = 0, mm_update_done = 0, mm_busy = 0;
  logic [9:0] mm_upd_x;
  logic [8:0] mm_upd_line;
  logic [13:0] lb_raddr_l, lb_raddr_r;
  logic [7:0] lb_rdata_l = 0, lb_rdata_r = 0;
  logic k_shift_l, k_shift_r, k_compute, k_out_valid;
  logic [7:0] k_din_l, k_din_r, k_disp;
  logic [12:0] k_sad_min;
  sram_req_t dw_req;
  logic dw_gnt;
  logic busy, done, stall, row_start, col_feed;
  int checks = 0, failures = 0;

  stereo_matching_controller #(.IMG_W(W), .IMG_H(H), .WIN(WIN), .NDISP(ND), .NLINES(NL)) dut (.*);
  disp_kernel #(.WIN(WIN), .NDISP(ND)) u_k (.clk, .rst_n, .shift_l(k_shift_l), .din_l(k_din_l),
    .shift_r(k_shift_r), .din_r(k_din_r), .sw(1'b0), .compute(k_compute), .out_valid(k_out_valid),
    .disp(k_disp), .sad_min(k_sad_min));

  always #5 clk = ~clk;

  logic [7:0] L [H][W];
  logic [7:0] R [H][W];
  logic [7:0] lbl [NL*W], lbr [NL*W];
  int expd [H][W];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // line buffers
  always @(posedge clk) begin
    lb_rdata_l <= lbl[lb_raddr_l];
    lb_rdata_r <= lbr[lb_raddr_r];
  end

  // memory-management responder
  int refills = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (!rst_n) begin
      end else if (mm_start) begin
        mm_busy <= 1;
        repeat (10) @(posedge clk);
        for (int y = 0; y < NL && y < H; y++)
          for (int x = 0; x < W; x++) begin lbl[(y % NL) * W + x] = L[y][x]; lbr[(y % NL) * W + x] = R[y][x]; end
        mm_init_done <= 1; mm_busy <= 0;
        @(posedge clk); mm_init_done <= 0;
      end else if (mm_update) begin
        int ux, ul;
        ux = int'(mm_upd_x); ul = int'(mm_upd_line);
        mm_busy <= 1;
        repeat (4) @(posedge clk);
        for (int k = 0; k < 2; k++) begin
          lbl[(ul % NL) * W + ux + k] = L[ul][ux + k];
          lbr[(ul % NL) * W + ux + k] = R[ul][ux + k];
        end
        if (ux == W - 2) refills++;
        mm_update_done <= 1; mm_busy <= 0;
        @(posedge clk); mm_update_done <= 0;
      end
    end
  end

  // disparity writes
  assign dw_gnt = dw_req.valid && ($urandom_range(0, 4) != 0);
  int nwr = 0;
  always @(posedge clk) if (rst_n && dw_req.valid && dw_gnt) begin
    int ex, ey;
    ex = nwr % (XP + 1); ey = nwr / (XP + 1);
    checks++;
    if (dw_req.bank != BANK_DISP || !dw_req.we || int'(dw_req.byte_off) != 2 * (ey * W + ex) ||
        int'(dw_req.wdata) != expd[ey][ex]) begin
      failures++;
      if (failures < 10) $display("FAIL write %0d off %0d exp %0d data %0d exp %0d", nwr, dw_req.byte_off, 2 * (ey * W + ex), dw_req.wdata, expd[ey][ex]);
    end
    nwr++;
  end

  // state durations
  int cur = -1, len = 0, n_bad_len = 0, n_init_visits = 0, n_feed_visits = 0;
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.state) != cur) begin
      if (cur == 1) begin n_init_visits++; if (len != 5 * RC + 2) begin n_bad_len++; $display("Init_Shifttap lasted %0d", len); end end
      if (cur == 2) begin n_feed_visits++; if (len != WIN + 2) begin n_bad_len++; $display("Feeding lasted %0d", len); end end
      if (cur == 3 && len != 2) begin n_bad_len++; $display("DISP lasted %0d", len); end
      cur = int'(dut.state); len = 1;
    end else len++;
  end

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      R[y][x] = 8'($urandom); end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      L[y][x] = (x + 9 < W) ? 8'(int'(R[y][x + 9]) ^ $urandom_range(0, 1)) : 8'($urandom);
    for (int k = 0; k < NL * W; k++) begin lbl[k] = 8'hEE; lbr[k] = 8'hEE; end
    for (int y = 0; y <= YP; y++) for (int x = 0; x <= XP; x++) begin
      int best, bd, s;
      best = 1 << 30; bd = 0;
      for (int d = 0; d < ND; d++) begin
        s = 0;
        for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) begin
          int a, b;
          a = int'(L[y+r][x+c]);
          b = (x + d + c < W) ? int'(R[y+r][x+d+c]) : 0;
          s += (a > b) ? a - b : b - a;
        end
        if (s < best) begin best = s; bd = d; end
      end
      expd[y][x] = bd;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    wait (done);
    repeat (5) @(posedge clk);
    chk(nwr == (XP + 1) * (YP + 1), $sformatf("write count %0d", nwr));
    chk(n_bad_len == 0, "state durations");
    chk(n_init_visits == YP + 1, $sformatf("Init_Shifttap visits %0d", n_init_visits));
    chk(n_feed_visits == XP * (YP + 1), $sformatf("Feeding visits %0d", n_feed_visits));
    chk(refills == H - NL, $sformatf("refilled lines %0d", refills));
    chk(n_done == 1, "one done pulse");
    chk(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
