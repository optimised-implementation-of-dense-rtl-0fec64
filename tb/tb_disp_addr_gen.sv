// tb_disp_addr_gen: every pixel of a 320x240 frame; the write address must be
// 2*(j*320+i).
module tb_disp_addr_gen;
  logic [9:0] i;
  logic [8:0] j;
  logic [19:0] a_write;
  int checks = 0, failures = 0;
  disp_addr_gen dut (.i, .j, .a_write);
  initial begin
    for (int jj = 0; jj < 240; jj++)
      for (int ii = 0; ii < 320; ii++) begin
        i = 10'(ii); j = 9'(jj); #1;
        checks++;
        if (int'(a_write) != 2 * (jj * 320 + ii)) begin
          failures++;
          if (failures < 5) $display("FAIL (%0d,%0d) got %0d", ii, jj, a_write);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
