// tb_line_buffer: writes random two-pixel words at random even addresses,
// keeps a byte-level model, and reads random addresses back with the
// one-clock read latency, also while writes continue on the other port.
module tb_line_buffer;
  localparam int DEPTH = 16384;
  logic clk = 0, we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0;
  logic [7:0] rdata;
  logic [7:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;
  line_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin
    int exp_v; bit exp_ok;
    for (int k = 0; k < DEPTH; k++) written[k] = 0;
    // fill a region of 2048 bytes
    for (int a = 0; a < 2048; a += 2) begin
      @(negedge clk);
      we = 1; waddr = 14'(a); wdata = 16'($urandom);
      model[a] = wdata[7:0]; model[a+1] = wdata[15:8]; written[a] = 1; written[a+1] = 1;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      raddr = 14'($urandom_range(0, 2047));
      exp_v = int'(model[raddr]); exp_ok = written[raddr];
      // simultaneous write elsewhere in the upper half
      we = 1; waddr = 14'(($urandom_range(2048, DEPTH - 1)) & ~1); wdata = 16'($urandom);
      model[waddr] = wdata[7:0]; model[waddr+1] = wdata[15:8]; written[waddr] = 1; written[waddr+1] = 1;
      @(negedge clk);
      we = 0;
      checks++;
      if (int'(rdata) != exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d got %0d exp %0d", raddr, rdata, exp_v);
      end
    end
    // read back the upper half writes
    for (int a = 2048; a < DEPTH; a += 37) if (written[a]) begin
      @(negedge clk); raddr = 14'(a);
      @(negedge clk);
      checks++;
      if (rdata != model[a]) failures++;
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
