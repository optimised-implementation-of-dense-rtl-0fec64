// rw_addr_gen: read/write address generator for line-buffer loads.
//
// Holds the position (x, y) of the next pixel pair to move from the SRAM into
// a line buffer. load sets the position to (x0, y0); step advances x by two
// pixels and wraps to the start of the next line after the last pair. For the
// current position it gives the byte offset of the pair inside an image bank
// (y*IMG_W + x, the SRAM read side) and the line-buffer byte address
// (y mod NLINES)*IMG_W + x (the write side). eol flags the last pair of a line.
// Outputs are registered state and combinational functions of it.
//
// The address formula for the line buffer is the published one; stepping two
// pixels at a time (one 16-bit SRAM word) is this design's choice. IMG_W must
// be even.
module rw_addr_gen
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned NLINES   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [X_W-1:0]    x0,
  input  logic [Y_W-1:0]    y0,
  input  logic              step,
  output logic [X_W-1:0]    x,
  output logic [Y_W-1:0]    y,
  output logic [OFF_W-1:0]  src_byte,
  output logic [LB_AW-1:0]  lb_wr_addr,
  output logic              eol
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (load) begin
      x <= x0;
      y <= y0;
    end else if (step) begin
      if (eol) begin
        x <= '0;
        y <= y + 1'b1;
      end else begin
        x <= x + X_W'(2);
      end
    end
  end

  assign eol        = (32'(x) + 2 >= IMG_W);
  assign src_byte   = OFF_W'(y) * OFF_W'(IMG_W) + OFF_W'(x);
  assign lb_wr_addr = lb_addr(x, y, IMG_W, NLINES);
endmodule
