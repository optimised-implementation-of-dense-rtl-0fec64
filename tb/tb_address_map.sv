// tb_address_map: random offsets in each bank map to base + offset/2, with
// bases 0, W*H/2 and W*H for a 320x240 frame.
module tb_address_map;
  import stereo_pkg::*;
  bank_e bank;
  logic [19:0] byte_off;
  logic [17:0] word_addr;
  int checks = 0, failures = 0;
  address_map dut (.bank, .byte_off, .word_addr);
  initial begin
    int base, off;
    for (int t = 0; t < 3000; t++) begin
      case (t % 3)
        0: begin bank = BANK_LEFT;  base = 0;     off = $urandom_range(0, 76799); end
        1: begin bank = BANK_RIGHT; base = 38400; off = $urandom_range(0, 76799); end
        default: begin bank = BANK_DISP; base = 76800; off = 2 * $urandom_range(0, 76799); end
      endcase
      byte_off = 20'(off); #1;
      checks++;
      if (int'(word_addr) != base + off / 2) begin
        failures++;
        if (failures < 5) $display("FAIL bank %0d off %0d got %0d", bank, off, word_addr);
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
