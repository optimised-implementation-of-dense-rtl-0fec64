// sram_ctrl: pin driver for a synchronous 16-bit SRAM.
//
// Accepts one command per clock (already mapped to a word address). The
// command is registered onto the chip pins; the SRAM samples them on the next
// edge and, for a read, drives its data one clock later. rvalid, rdata and
// rtag (the command's tag) therefore come two clocks after the command.
// Write data and address are driven on separate pins (the board's tristate
// data bus is outside this module). Timing and pin shape are this design's
// choices; the published design names the block only.
module sram_ctrl
  import stereo_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  sram_cmd_t           cmd,
  output logic                rvalid,
  output logic [SRAM_DW-1:0]  rdata,
  output logic [TAG_W-1:0]    rtag,
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [SRAM_DW-1:0]  sram_wdata,
  input  logic [SRAM_DW-1:0]  sram_rdata,
  output logic                sram_ce_n,
  output logic                sram_we_n,
  output logic                sram_oe_n
);
  logic             rd_p1, rd_p2;
  logic [TAG_W-1:0] tag_p1, tag_p2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_wdata <= '0;
      sram_ce_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      rd_p1      <= 1'b0;
      rd_p2      <= 1'b0;
      tag_p1     <= '0;
      tag_p2     <= '0;
    end else begin
      sram_addr  <= cmd.addr;
      sram_wdata <= cmd.wdata;
      sram_ce_n  <= !cmd.valid;
      sram_we_n  <= !(cmd.valid && cmd.we);
      sram_oe_n  <= !(cmd.valid && !cmd.we);
      rd_p1      <= cmd.valid && !cmd.we;
      tag_p1     <= cmd.tag;
      rd_p2      <= rd_p1;
      tag_p2     <= tag_p1;
    end
  end

  assign rvalid = rd_p2;
  assign rdata  = sram_rdata;
  assign rtag   = tag_p2;
endmodule
