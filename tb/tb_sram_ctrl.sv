// tb_sram_ctrl: random back-to-back reads and writes through the controller
// into the SRAM model; every read must return the model's last written value
// with its tag exactly two clocks after the command.
module tb_sram_ctrl;
  import stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  sram_cmd_t cmd;
  logic rvalid;
  logic [15:0] rdata, sram_wdata, sram_rdata;
  logic [15:0] rtag;
  logic [17:0] sram_addr;
  logic sram_ce_n, sram_we_n, sram_oe_n;
  logic [15:0] model [256];
  int checks = 0, failures = 0;
  int exp_q [$];
  int tag_q [$];
  bit rd_hist [4];

  sram_ctrl dut (.clk, .rst_n, .cmd, .rvalid, .rdata, .rtag, .sram_addr, .sram_wdata, .sram_rdata,
                 .sram_ce_n, .sram_we_n, .sram_oe_n);
  sram_model #(.AW(18), .DEPTH(256)) u_mem (.clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
                 .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n));
  always #5 clk = ~clk;

  initial begin
    cmd = '0;
    for (int k = 0; k < 256; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // the controller's outputs are undefined until the first reset edge; start from a clean memory
    for (int k = 0; k < 256; k++) u_mem.mem[k] = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check the output of the read issued two clocks ago
      checks++;
      if (rvalid != rd_hist[1]) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d rvalid %0b exp %0b", t, rvalid, rd_hist[1]);
      end
      if (rvalid && exp_q.size() > 0) begin
        automatic int e = exp_q.pop_front();
        automatic int tg = tag_q.pop_front();
        checks++;
        if (int'(rdata) != e || int'(rtag) != tg) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d rdata %h exp %h tag %h exp %h", t, rdata, e, rtag, tg);
        end
      end
      rd_hist[1] = rd_hist[0];
      cmd = '0;
      cmd.valid = ($urandom_range(0, 3) != 0);
      cmd.we    = $urandom_range(0, 1);
      cmd.addr  = 18'($urandom_range(0, 255));
      cmd.wdata = 16'($urandom);
      cmd.tag   = 16'($urandom);
      rd_hist[0] = cmd.valid && !cmd.we;
      if (cmd.valid && cmd.we) model[cmd.addr[7:0]] = cmd.wdata;
      if (cmd.valid && !cmd.we) begin exp_q.push_back(int'(model[cmd.addr[7:0]])); tag_q.push_back(int'(cmd.tag)); end
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
