// address_map: bank selection and byte-to-word mapping for the SRAM.
//
// The SRAM is 16 bits wide. The left image occupies words 0 .. W*H/2-1 (two
// pixels per word, low byte = even column), the right image the next W*H/2
// words, and the disparity table starts at word W*H (one word per disparity).
// word_addr = base(bank) + byte_off / 2. Combinational. The published design
// shows an address map block with a bank selector; this layout is this
// design's own.
module address_map
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240
) (
  input  bank_e              bank,
  input  logic [OFF_W-1:0]   byte_off,
  output logic [SRAM_AW-1:0] word_addr
);
  localparam int unsigned BASE_RIGHT = IMG_W * IMG_H / 2;
  localparam int unsigned BASE_DISP  = IMG_W * IMG_H;

  logic [SRAM_AW-1:0] base;

  always_comb begin
    unique case (bank)
      BANK_LEFT:  base = '0;
      BANK_RIGHT: base = SRAM_AW'(BASE_RIGHT);
      default:    base = SRAM_AW'(BASE_DISP);
    endcase
    word_addr = base + SRAM_AW'(byte_off >> 1);
  end
endmodule
