// stereo_pkg: constants, types and helper functions shared by the SAD stereo core.
//
// The pixel, absolute-difference, SAD and disparity widths (8, 9, 13 and 8 bits)
// and the 16-line x 1024-pixel line buffer come from the published design. The
// SRAM request record, its bank encoding and the 18-bit/16-bit SRAM word shape
// are this design's own choices (a 256K x 16 board SRAM).
package stereo_pkg;

  localparam int unsigned PIX_W      = 8;     // one byte per pixel
  localparam int unsigned AD_W       = 9;     // absolute difference output
  localparam int unsigned SAD_W      = 13;    // 25 * 255 = 6375 < 2^13
  localparam int unsigned DISP_W     = 8;     // disparity output
  localparam int unsigned LB_LINES   = 16;    // lines held per line buffer
  localparam int unsigned LB_MAX_PIX = 1024;  // longest line a buffer holds
  localparam int unsigned LB_DEPTH   = LB_LINES * LB_MAX_PIX;
  localparam int unsigned LB_AW      = $clog2(LB_DEPTH);
  localparam int unsigned X_W        = 10;    // pixel column, up to 1023
  localparam int unsigned Y_W        = 9;     // pixel row, up to 511
  localparam int unsigned OFF_W      = 20;    // byte offset inside a bank
  localparam int unsigned SRAM_AW    = 18;    // 256K words
  localparam int unsigned SRAM_DW    = 16;
  localparam int unsigned TAG_W      = 16;

  typedef logic [PIX_W-1:0] pixel_t;

  // Which region of the SRAM an access goes to.
  typedef enum logic [1:0] {
    BANK_LEFT  = 2'd0,
    BANK_RIGHT = 2'd1,
    BANK_DISP  = 2'd2
  } bank_e;

  // One SRAM access as presented by a user, before address mapping.
  typedef struct packed {
    logic                 valid;
    logic                 we;
    bank_e                bank;
    logic [OFF_W-1:0]     byte_off;   // byte offset inside the bank
    logic [SRAM_DW-1:0]   wdata;
    logic [TAG_W-1:0]     tag;        // returned with read data
  } sram_req_t;

  // The same access after the address map: a physical word address.
  typedef struct packed {
    logic                 valid;
    logic                 we;
    logic [SRAM_AW-1:0]   addr;
    logic [SRAM_DW-1:0]   wdata;
    logic [TAG_W-1:0]     tag;
  } sram_cmd_t;

  // Line-buffer address of pixel (i, j): A = (j mod nlines) * npixel + i,
  // with nlines = 16 lines in the default configuration.
  function automatic logic [LB_AW-1:0] lb_addr(input logic [X_W-1:0] i,
                                               input logic [Y_W-1:0] j,
                                               input int unsigned npixel,
                                               input int unsigned nlines);
    return LB_AW'((32'(j) % nlines) * npixel + 32'(i));
  endfunction

endpackage
