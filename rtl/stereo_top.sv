// stereo_top: dense SAD stereo-matching core.
//
// A left and a right rectified image (IMG_W x IMG_H, 8-bit pixels) sit in an
// external 16-bit SRAM. Two 16-line buffers take the image lines out of the
// SRAM; the controller walks a WIN x WIN window over every position of the
// left image and, for each, shifts the needed pixels into the disparity
// kernel, where NDISP SAD modules score the candidate disparities 0..NDISP-1
// in parallel and a comparator tree picks the lowest score (winner take all).
// Each disparity is written back to the SRAM disparity table.
//
// Two ways to start a frame: a pulse on start (images already in the SRAM),
// or sending both images over the serial port, after which the disparity map
// is also sent back over the serial port when the frame is done.
//
// SRAM users are arbitrated by fixed priority: disparity writes, then
// line-buffer loads, then the serial link. The SRAM pins are those of a
// synchronous SRAM: registered address/control, read data one clock later.
// The block structure (controller, read/write and disparity address
// generators, address map, SRAM control, data multiplexer, kernel, UART) is
// the published one; arbitration, memory layout and the serial protocol are
// this design's choices.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W        = 320,
  parameter int unsigned IMG_H        = 240,
  parameter int unsigned WIN          = 5,
  parameter int unsigned NDISP        = 64,
  parameter int unsigned NLINES       = 16,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               sw,
  input  logic               uart_rxd,
  output logic               uart_txd,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic               sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               busy,
  output logic               done
);
  // ------------------------------------------------------------ UART link
  logic       rx_valid, tx_start, tx_busy;
  logic [7:0] rx_data, tx_data;
  logic       images_ready, send_map, via_uart;

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .rx_valid, .rx_data,
    .tx_start, .tx_data, .txd(uart_txd), .tx_busy);

  // ------------------------------------------------------------ SRAM path
  sram_req_t  req [3];
  logic [2:0] gnt;
  sram_req_t  sel;
  sram_cmd_t  cmd;
  logic               rvalid;
  logic [SRAM_DW-1:0] rdata;
  logic [TAG_W-1:0]   rtag;

  uart_host_if #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN)) u_host (
    .clk, .rst_n, .rx_valid, .rx_data, .images_ready, .send(send_map),
    .tx_start, .tx_data, .tx_busy, .req(req[2]), .gnt(gnt[2]), .rvalid, .rdata);

  sram_mux #(.N(3)) u_mux (.req, .gnt, .sel);

  logic [SRAM_AW-1:0] word_addr;
  address_map #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_map (
    .bank(sel.bank), .byte_off(sel.byte_off), .word_addr);

  always_comb begin
    cmd.valid = sel.valid;
    cmd.we    = sel.we;
    cmd.addr  = word_addr;
    cmd.wdata = sel.wdata;
    cmd.tag   = sel.tag;
  end

  sram_ctrl u_sram (
    .clk, .rst_n, .cmd, .rvalid, .rdata, .rtag,
    .sram_addr, .sram_wdata, .sram_rdata, .sram_ce_n, .sram_we_n, .sram_oe_n);

  // ------------------------------------------------- memory management
  logic              mm_start, mm_update, mm_init_done, mm_update_done, mm_busy;
  logic [X_W-1:0]    mm_upd_x;
  logic [Y_W-1:0]    mm_upd_line;
  logic              lb_we_l, lb_we_r;
  logic [LB_AW-1:0]  lb_waddr, lb_raddr_l, lb_raddr_r;
  logic [15:0]       lb_wdata;
  logic [PIX_W-1:0]  lb_rdata_l, lb_rdata_r;

  mem_mgmt_fsm #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NLINES(NLINES)) u_mm (
    .clk, .rst_n, .start(mm_start), .update(mm_update), .upd_x(mm_upd_x), .upd_line(mm_upd_line),
    .init_done(mm_init_done), .update_done(mm_update_done), .busy(mm_busy),
    .req(req[1]), .gnt(gnt[1]), .rvalid, .rdata, .rtag,
    .lb_we_l, .lb_we_r, .lb_waddr, .lb_wdata);

  line_buffer #(.DEPTH(LB_DEPTH)) u_lb_left (
    .clk, .we(lb_we_l), .waddr(lb_waddr), .wdata(lb_wdata), .raddr(lb_raddr_l), .rdata(lb_rdata_l));

  line_buffer #(.DEPTH(LB_DEPTH)) u_lb_right (
    .clk, .we(lb_we_r), .waddr(lb_waddr), .wdata(lb_wdata), .raddr(lb_raddr_r), .rdata(lb_rdata_r));

  // --------------------------------------------------- controller + kernel
  logic              k_shift_l, k_shift_r, k_compute, k_out_valid;
  logic [PIX_W-1:0]  k_din_l, k_din_r;
  logic [DISP_W-1:0] k_disp;
  logic [SAD_W-1:0]  k_sad_min;
  logic              stall, row_start, col_feed;

  stereo_matching_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN), .NDISP(NDISP), .NLINES(NLINES)) u_smc (
    .clk, .rst_n, .go(start || images_ready),
    .mm_start, .mm_update, .mm_upd_x, .mm_upd_line, .mm_init_done, .mm_update_done, .mm_busy,
    .lb_raddr_l, .lb_raddr_r, .lb_rdata_l, .lb_rdata_r,
    .k_shift_l, .k_din_l, .k_shift_r, .k_din_r, .k_compute, .k_out_valid, .k_disp,
    .dw_req(req[0]), .dw_gnt(gnt[0]),
    .busy, .done, .stall, .row_start, .col_feed);

  disp_kernel #(.WIN(WIN), .NDISP(NDISP)) u_kernel (
    .clk, .rst_n, .shift_l(k_shift_l), .din_l(k_din_l), .shift_r(k_shift_r), .din_r(k_din_r),
    .sw, .compute(k_compute), .out_valid(k_out_valid), .disp(k_disp), .sad_min(k_sad_min));

  // A frame loaded over the serial port is answered over the serial port.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      via_uart <= 1'b0;
      send_map <= 1'b0;
    end else begin
      send_map <= done && via_uart;
      if (images_ready) via_uart <= 1'b1;
      else if (done)    via_uart <= 1'b0;
    end
  end
endmodule
