// tb_mem_mgmt_fsm: the testbench plays the SRAM (random grants, two-clock
// read latency, data derived from bank and offset) and records every
// line-buffer write. It checks the initial fill of 16 lines of both images,
// the order of the states (A, WAIT_A, B, WAIT_B then C, WAIT_C, D, WAIT_D),
// the init_done and update_done pulses, and single-word updates.
module tb_mem_mgmt_fsm;
  import stereo_pkg::*;
  localparam int W = 16, H = 20;
  logic clk = 0, rst_n = 0, start = 0, update = 0;
  logic [9:0] upd_x = 0;
  logic [8:0] upd_line = 0;
  logic init_done, update_done, busy, gnt, rvalid, lb_we_l, lb_we_r;
  sram_req_t req;
  logic [15:0] rdata, lb_wdata;
  logic [15:0] rtag;
  logic [13:0] lb_waddr;
  logic [15:0] lbl [8192], lbr [8192];
  int checks = 0, failures = 0, n_init_done = 0, n_upd_done = 0;
  // two-stage return pipe
  logic v1 = 0, v2 = 0;
  logic [15:0] d1, d2, t1, t2;

  mem_mgmt_fsm #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .start, .update, .upd_x, .upd_line,
    .init_done, .update_done, .busy, .req, .gnt, .rvalid, .rdata, .rtag,
    .lb_we_l, .lb_we_r, .lb_waddr, .lb_wdata);

  function automatic logic [15:0] f(input int bank, input int byte_off);
    return 16'(bank * 7919 + (byte_off / 2) * 31 + 5);
  endfunction

  always #5 clk = ~clk;
  assign gnt = req.valid && ($urandom_range(0, 2) != 0);
  assign rvalid = v2;
  assign rdata = d2;
  assign rtag = t2;
  always @(posedge clk) begin
    v1 <= rst_n && req.valid && gnt && !req.we;
    d1 <= f(int'(req.bank), int'(req.byte_off));
    t1 <= req.tag;
    v2 <= v1; d2 <= d1; t2 <= t1;
    if (lb_we_l) lbl[lb_waddr >> 1] <= lb_wdata;
    if (lb_we_r) lbr[lb_waddr >> 1] <= lb_wdata;
    if (rst_n && init_done) n_init_done++;
    if (rst_n && update_done) n_upd_done++;
  end

  // state order recorder
  int seq [$];
  always @(posedge clk) if (seq.size() == 0 || seq[$] != int'(dut.state)) seq.push_back(int'(dut.state));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int k = 0; k < 8192; k++) begin lbl[k] = 0; lbr[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    seq.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (init_done); repeat (3) @(negedge clk);
    foreach (seq[k]) $write("%0d ", seq[k]); $display("");
    // expected sequence IDLE A WAIT_A B WAIT_B IDLE = 0 1 2 3 4 0
    chk(seq.size() == 6 && seq[0] == 0 && seq[1] == 1 && seq[2] == 2 && seq[3] == 3 && seq[4] == 4 && seq[5] == 0,
        $sformatf("init state order size %0d", seq.size()));
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < W; x += 2) begin
        chk(lbl[((y % 16) * W + x) / 2] == f(0, y * W + x), $sformatf("left init (%0d,%0d)", x, y));
        chk(lbr[((y % 16) * W + x) / 2] == f(1, y * W + x), $sformatf("right init (%0d,%0d)", x, y));
      end
    chk(n_init_done == 1, "one init_done");
    seq.delete();
    for (int u = 0; u < 8; u++) begin
      int ux = 2 * (u % (W / 2)), ul = 16 + (u % 4);
      @(negedge clk); update = 1; upd_x = 10'(ux); upd_line = 9'(ul);
      @(negedge clk); update = 0;
      wait (update_done); @(negedge clk);
      chk(lbl[((ul % 16) * W + ux) / 2] == f(0, ul * W + ux), $sformatf("left update %0d", u));
      chk(lbr[((ul % 16) * W + ux) / 2] == f(1, ul * W + ux), $sformatf("right update %0d", u));
    end
    // each update: IDLE C WAIT_C D WAIT_D (5,6,7,8)
    chk(seq.size() >= 5 && seq[0] == 0 && seq[1] == 5 && seq[2] == 6 && seq[3] == 7 && seq[4] == 8, "update state order");
    repeat (3) @(negedge clk);
    chk(n_upd_done == 8, "eight update_done");
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
