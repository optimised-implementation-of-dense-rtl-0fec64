// disp_addr_gen: address of a disparity write.
//
// A_write = A_DRAM + 2 * (j * IMG_W + i): each disparity of pixel (i, j) takes
// one 16-bit word (two bytes) of the disparity table, which starts at byte
// A_DRAM. Combinational. The formula is the published one; A_DRAM = 0 (the
// start of the disparity bank, see address_map) is this design's choice.
module disp_addr_gen
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W  = 320,
  parameter int unsigned A_DRAM = 0
) (
  input  logic [X_W-1:0]   i,
  input  logic [Y_W-1:0]   j,
  output logic [OFF_W-1:0] a_write
);
  assign a_write = OFF_W'(A_DRAM) + OFF_W'(2) * (OFF_W'(j) * OFF_W'(IMG_W) + OFF_W'(i));
endmodule
