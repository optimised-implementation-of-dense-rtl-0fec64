// tb_sram_mux: random request patterns; the lowest-index valid request must
// be granted alone and passed through unchanged.
module tb_sram_mux;
  import stereo_pkg::*;
  sram_req_t req [3];
  logic [2:0] gnt;
  sram_req_t sel;
  int checks = 0, failures = 0;
  sram_mux dut (.req, .gnt, .sel);
  initial begin
    int win;
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 3; k++) begin
        req[k] = sram_req_t'({$urandom, $urandom, $urandom});
        req[k].valid = $urandom_range(0, 1);
      end
      #1;
      win = req[0].valid ? 0 : req[1].valid ? 1 : req[2].valid ? 2 : -1;
      checks++;
      if (win < 0) begin
        if (gnt != 0 || sel.valid) failures++;
      end else if (gnt != 3'(1 << win) || sel != req[win]) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d gnt %b win %0d", t, gnt, win);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
