// mem_mgmt_fsm: memory-management state machine for the two line buffers.
//
// Nine states. After reset the machine waits in IDLE.
//   start  : IDLE -> A -> WAIT_A -> B -> WAIT_B -> IDLE.
//            A/WAIT_A copy the first min(NLINES, IMG_H) lines (16 by default) of the left image
//            from the SRAM into the left line buffer; B/WAIT_B do the same
//            for the right image. A (B) is left once the SRAM grants the first
//            read (start_read); WAIT_A (WAIT_B) keeps issuing one read per
//            granted clock and is left when the last word has been written
//            (init_done, pulsed at the end of WAIT_B).
//   update : IDLE -> C -> WAIT_C -> D -> WAIT_D -> IDLE.
//            C/WAIT_C move one 16-bit word (two pixels) of the left image at
//            (upd_x, upd_line) into the left buffer, D/WAIT_D the same word of
//            the right image; update_done pulses at the end of WAIT_D.
// Reads carry their line-buffer address in the SRAM tag, so the data is
// written whenever it returns, whatever the SRAM latency.
//
// The states, their order and their exit conditions follow the published
// state table; the word-per-update size, the burst during initialisation and
// the tag scheme are this design's choices.
module mem_mgmt_fsm
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned IMG_H    = 240,
  parameter int unsigned NLINES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               update,
  input  logic [X_W-1:0]     upd_x,
  input  logic [Y_W-1:0]     upd_line,
  output logic               init_done,
  output logic               update_done,
  output logic               busy,
  // SRAM side
  output sram_req_t          req,
  input  logic               gnt,
  input  logic               rvalid,
  input  logic [SRAM_DW-1:0] rdata,
  input  logic [TAG_W-1:0]   rtag,
  // line-buffer write side
  output logic               lb_we_l,
  output logic               lb_we_r,
  output logic [LB_AW-1:0]   lb_waddr,
  output logic [15:0]        lb_wdata
);
  localparam int unsigned N_INIT = (IMG_H < NLINES) ? IMG_H : NLINES;

  typedef enum logic [3:0] {
    S_IDLE, S_A, S_WAIT_A, S_B, S_WAIT_B, S_C, S_WAIT_C, S_D, S_WAIT_D
  } mm_state_e;

  mm_state_e state;
  logic      issuing;      // reads of the current initial fill still to issue

  logic              ag_load, ag_step, ag_eol;
  logic [X_W-1:0]    ag_x0, ag_x;
  logic [Y_W-1:0]    ag_y0, ag_y;
  logic [OFF_W-1:0]  ag_src;
  logic [LB_AW-1:0]  ag_lb;

  rw_addr_gen #(.IMG_W(IMG_W), .NLINES(NLINES)) u_ag (
    .clk, .rst_n, .load(ag_load), .x0(ag_x0), .y0(ag_y0), .step(ag_step),
    .x(ag_x), .y(ag_y), .src_byte(ag_src), .lb_wr_addr(ag_lb), .eol(ag_eol));

  logic is_right, last_word, init_phase, data_last;
  assign is_right   = (state == S_B) || (state == S_WAIT_B) || (state == S_D) || (state == S_WAIT_D);
  assign init_phase = (state == S_A) || (state == S_WAIT_A) || (state == S_B) || (state == S_WAIT_B);
  assign last_word  = init_phase ? (ag_eol && (32'(ag_y) == N_INIT - 1)) : 1'b1;
  assign data_last  = rvalid && rtag[15];

  // SRAM request: tag = {last, right image, line-buffer address}
  always_comb begin
    req          = '0;
    req.bank     = is_right ? BANK_RIGHT : BANK_LEFT;
    req.byte_off = ag_src;
    req.tag      = TAG_W'({last_word, is_right, ag_lb});
    unique case (state)
      S_A, S_B, S_WAIT_A, S_WAIT_B: req.valid = issuing;
      S_C, S_D:                     req.valid = 1'b1;
      default:                      req.valid = 1'b0;
    endcase
  end

  assign ag_step = req.valid && gnt && init_phase;

  always_comb begin
    ag_load = 1'b0;
    ag_x0   = '0;
    ag_y0   = '0;
    if (state == S_IDLE && start) begin
      ag_load = 1'b1;
    end else if (state == S_IDLE && update) begin
      ag_load = 1'b1;
      ag_x0   = upd_x;
      ag_y0   = upd_line;
    end else if (state == S_WAIT_A && data_last) begin
      ag_load = 1'b1;
    end
  end

  // Line-buffer writes from returning read data.
  assign lb_we_l  = rvalid && (state != S_IDLE) && !rtag[LB_AW];
  assign lb_we_r  = rvalid && (state != S_IDLE) &&  rtag[LB_AW];
  assign lb_waddr = rtag[LB_AW-1:0];
  assign lb_wdata = rdata;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      issuing     <= 1'b0;
      init_done   <= 1'b0;
      update_done <= 1'b0;
    end else begin
      init_done   <= 1'b0;
      update_done <= 1'b0;
      if (ag_step && last_word) issuing <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_A;
            issuing <= 1'b1;
          end else if (update) begin
            state   <= S_C;
          end
        end
        S_A:      if (gnt) state <= S_WAIT_A;             // start_read
        S_WAIT_A: if (data_last) begin                    // init_done (left)
                    state   <= S_B;
                    issuing <= 1'b1;
                  end
        S_B:      if (gnt) state <= S_WAIT_B;             // start_read
        S_WAIT_B: if (data_last) begin                    // init_done (right)
                    state     <= S_IDLE;
                    init_done <= 1'b1;
                  end
        S_C:      if (gnt) state <= S_WAIT_C;             // start_read
        S_WAIT_C: if (rvalid) state <= S_D;               // left word written
        S_D:      if (gnt) state <= S_WAIT_D;             // start_read
        S_WAIT_D: if (rvalid) begin                       // update_done
                    state       <= S_IDLE;
                    update_done <= 1'b1;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
