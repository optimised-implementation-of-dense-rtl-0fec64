// tb_disp_kernel: fills the kernel's chains with a random 5-row band of a
// left and a right image (right = left shifted by a known amount plus noise),
// then slides the window column by column. After every compute pulse the
// disparity must equal a brute-force SAD search over d = 0..63 (ties to the
// smaller d) and must appear exactly two clocks later.
module tb_disp_kernel;
  localparam int WIN = 5, ND = 64, RC = ND + WIN - 1, NX = 24, W = NX + RC;
  logic clk = 0, rst_n = 0, shift_l = 0, shift_r = 0, sw = 0, compute = 0;
  logic [7:0] din_l = 0, din_r = 0;
  logic out_valid;
  logic [7:0] disp;
  logic [12:0] sad_min;
  logic [7:0] L [WIN][W];
  logic [7:0] R [WIN][W];
  int checks = 0, failures = 0;

  disp_kernel dut (.clk, .rst_n, .shift_l, .din_l, .shift_r, .din_r, .sw, .compute, .out_valid, .disp, .sad_min);
  always #5 clk = ~clk;

  task automatic push(input logic [7:0] lv, input bit dol, input logic [7:0] rv, input bit dor);
    @(negedge clk);
    shift_l = dol; din_l = lv; shift_r = dor; din_r = rv;
    @(negedge clk);
    shift_l = 0; shift_r = 0;
  endtask

  task automatic check_at(input int x);
    int best, bd, s;
    best = 1 << 30; bd = 0;
    for (int d = 0; d < ND; d++) begin
      s = 0;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          int a = int'(L[r][x+c]), b = int'(R[r][x+d+c]);
          s += (a > b) ? a - b : b - a;
        end
      if (s < best) begin best = s; bd = d; end
    end
    @(negedge clk);
    compute = 1;
    sw = x[0];
    @(negedge clk);
    compute = 0;
    checks++;
    if (out_valid) failures++;            // not yet: latency is two clocks
    @(negedge clk);
    checks++;
    if (!out_valid || int'(disp) != bd || int'(sad_min) != best) begin
      failures++;
      if (failures < 5) $display("FAIL x=%0d v=%0b disp %0d exp %0d sad %0d exp %0d", x, out_valid, disp, bd, sad_min, best);
    end
  endtask

  initial begin
    int shift_amt;
    shift_amt = 17;
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < W; c++) R[r][c] = 8'($urandom);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < W; c++)
        L[r][c] = (c + shift_amt < W) ? 8'(int'(R[r][c+shift_amt]) + $urandom_range(0, 3)) : 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // initial fill: RC columns of the right band, the first WIN of the left
    for (int c = 0; c < RC; c++)
      for (int r = 0; r < WIN; r++)
        push(c < WIN ? L[r][c] : 8'd0, c < WIN, R[r][c], 1'b1);
    check_at(0);
    for (int x = 1; x < NX; x++) begin
      for (int r = 0; r < WIN; r++) push(L[r][x+WIN-1], 1'b1, R[r][x+RC-1], 1'b1);
      check_at(x);
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
