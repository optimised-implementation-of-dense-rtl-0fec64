// line_buffer: dual-port line store for one image.
//
// Holds LB_LINES lines of up to LB_MAX_PIX pixels (16 x 1024 bytes by
// default). Pixel (i, j) lives at byte address (j mod 16) * Npixel + i; the
// address is formed by the users (see stereo_pkg::lb_addr). The write port
// stores two adjacent pixels per clock (one 16-bit SRAM word, low byte at the
// even address waddr). The read port returns one pixel, registered, one clock
// after raddr. Both ports work every clock, so lines can be refilled while the
// kernel reads others.
//
// Size and addressing follow the published design; the 16-bit write / 8-bit
// read shape and the one-clock read latency are this design's choices.
module line_buffer #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  // Stored as DEPTH/2 words of two pixels so that each port touches one word.
  logic [15:0] mem [DEPTH/2];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:1]] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= raddr[0] ? mem[raddr[AW-1:1]][15:8] : mem[raddr[AW-1:1]][7:0];
  end
endmodule
