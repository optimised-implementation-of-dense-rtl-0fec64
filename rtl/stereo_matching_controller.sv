// stereo_matching_controller: frame sequencing of the SAD stereo core.
//
// State machine (reset -> IDLE):
//   IDLE          on go, starts the line-buffer initialisation and waits for
//                 it to finish, then enters INIT_SHIFTTAP at x = y = 0.
//   INIT_SHIFTTAP reads the WIN rows y..y+WIN-1 of columns x..x+NDISP+WIN-2
//                 from the right line buffer (column by column, top row
//                 first) and columns x..x+WIN-1 from the left line buffer,
//                 one pixel per clock each, into the kernel's shift chains.
//                 Reads take two clocks to reach a chain, so the state lasts
//                 WIN*(NDISP+WIN-1)+2 clocks (342 by default).
//   DISP          two clocks: one to load the SAD registers, one for the
//                 disparity segregator.
//   UPDATE        one clock (more while stalled). The disparity of (x, y) is
//                 queued for writing to the SRAM at byte offset
//                 2*(y*IMG_W + x). Then: x < XP -> FEEDING_SHIFTTAP (x+1);
//                 x = XP and y < YP -> INIT_SHIFTTAP (x = 0, y+1);
//                 x = XP and y = YP -> DONE. XP = IMG_W-WIN and YP = IMG_H-WIN
//                 are the last window positions.
//   FEEDING_SHIFTTAP  WIN+2 clocks: one new column of WIN pixels for each
//                 chain (left column x+WIN-1, right column x+NDISP+WIN-2).
//   DONE          once the last disparity write has been issued, pulses
//                 done and returns to IDLE.
// Right-image columns past the image edge are fed as zero.
//
// In the background, a refill engine keeps the NLINES-line buffers (16 by default) ahead of the
// window: image line L is copied (one 16-bit word per image at a time, via
// the memory-management FSM) into slot L mod NLINES as soon as line L-NLINES is no
// longer in use (at the latest once the last window of row L-NLINES is done,
// so NLINES may be as small as WIN). If the line a new row needs is not loaded yet, UPDATE waits
// (stall pulses each waiting clock).
//
// The state names, their order and the transition conditions follow the
// published controller; the read schedule, the zero fill, the refill engine
// and the stall are this design's choices.
module stereo_matching_controller
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned IMG_H    = 240,
  parameter int unsigned WIN      = 5,
  parameter int unsigned NDISP    = 64,
  parameter int unsigned NLINES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  // memory management
  output logic               mm_start,
  output logic               mm_update,
  output logic [X_W-1:0]     mm_upd_x,
  output logic [Y_W-1:0]     mm_upd_line,
  input  logic               mm_init_done,
  input  logic               mm_update_done,
  input  logic               mm_busy,
  // line-buffer read ports
  output logic [LB_AW-1:0]   lb_raddr_l,
  output logic [LB_AW-1:0]   lb_raddr_r,
  input  logic [PIX_W-1:0]   lb_rdata_l,
  input  logic [PIX_W-1:0]   lb_rdata_r,
  // disparity kernel
  output logic               k_shift_l,
  output logic [PIX_W-1:0]   k_din_l,
  output logic               k_shift_r,
  output logic [PIX_W-1:0]   k_din_r,
  output logic               k_compute,
  input  logic               k_out_valid,
  input  logic [DISP_W-1:0]  k_disp,
  // disparity write to SRAM
  output sram_req_t          dw_req,
  input  logic               dw_gnt,
  // status
  output logic               busy,
  output logic               done,
  output logic               stall,
  output logic               row_start,
  output logic               col_feed
);
  localparam int unsigned RCOLS = NDISP + WIN - 1;
  localparam int unsigned RT    = WIN * RCOLS;          // right chain length
  localparam int unsigned LT    = WIN * WIN;            // left chain length
  localparam int unsigned XP    = IMG_W - WIN;          // last x position
  localparam int unsigned YP    = IMG_H - WIN;          // last y position
  localparam int unsigned N_INIT = (IMG_H < NLINES) ? IMG_H : NLINES;
  localparam int unsigned SW_   = $clog2(RT + 2) + 1;   // send counter width

  typedef enum logic [2:0] {
    S_IDLE, S_INIT_SHIFTTAP, S_FEEDING_SHIFTTAP, S_DISP, S_UPDATE, S_DONE
  } smc_state_e;

  smc_state_e        state;
  logic              buf_init;            // buffer initialisation running
  logic [SW_-1:0]    send;                // clocks spent in the current state
  logic [X_W-1:0]    x;
  logic [Y_W-1:0]    y;
  logic [X_W-1:0]    rd_col;              // column offset of the read
  logic [Y_W-1:0]    rd_row;              // row offset of the read
  logic [Y_W:0]      lines_loaded;

  // ---------------------------------------------------------------- reads
  logic             rd_l, rd_r;
  logic [X_W:0]     col_l, col_r;
  logic [Y_W-1:0]   row_abs;

  always_comb begin
    rd_l    = 1'b0;
    rd_r    = 1'b0;
    col_l   = (X_W+1)'(x) + (X_W+1)'(rd_col);
    col_r   = (X_W+1)'(x) + (X_W+1)'(rd_col);
    row_abs = y + rd_row;
    if (state == S_INIT_SHIFTTAP) begin
      rd_r = 32'(send) < RT;
      rd_l = 32'(send) < LT;
    end else if (state == S_FEEDING_SHIFTTAP) begin
      rd_r  = 32'(send) < WIN;
      rd_l  = 32'(send) < WIN;
      col_l = (X_W+1)'(x) + (X_W+1)'(WIN - 1);
      col_r = (X_W+1)'(x) + (X_W+1)'(RCOLS - 1);
    end
  end

  assign lb_raddr_l = lb_addr(col_l[X_W-1:0], row_abs, IMG_W, NLINES);
  assign lb_raddr_r = lb_addr(col_r[X_W-1:0], row_abs, IMG_W, NLINES);

  // Two-stage pipeline: line-buffer read, then the register in front of the chains.
  logic p1_l, p1_r, p1_in_l, p1_in_r;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1_l <= 1'b0; p1_r <= 1'b0; p1_in_l <= 1'b0; p1_in_r <= 1'b0;
      k_shift_l <= 1'b0; k_shift_r <= 1'b0; k_din_l <= '0; k_din_r <= '0;
    end else begin
      p1_l      <= rd_l;
      p1_r      <= rd_r;
      p1_in_l   <= 32'(col_l) < IMG_W;
      p1_in_r   <= 32'(col_r) < IMG_W;
      k_shift_l <= p1_l;
      k_shift_r <= p1_r;
      k_din_l   <= p1_in_l ? lb_rdata_l : '0;
      k_din_r   <= p1_in_r ? lb_rdata_r : '0;
    end
  end

  assign k_compute = (state == S_DISP) && (send == '0);

  // ------------------------------------------------------------ main FSM
  logic dw_pending;                     // a disparity write is waiting
  logic next_row_ready;
  assign next_row_ready = 32'(lines_loaded) > 32'(y) + WIN;   // line y+WIN loaded
  assign stall = (state == S_UPDATE) && (32'(x) == XP) && (32'(y) < YP) && !next_row_ready;
  assign busy  = (state != S_IDLE) || buf_init;
  assign row_start = (state == S_UPDATE) && (32'(x) == XP) && (32'(y) < YP) && next_row_ready;
  assign col_feed  = (state == S_UPDATE) && (32'(x) < XP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      buf_init <= 1'b0;
      mm_start <= 1'b0;
      send     <= '0;
      x        <= '0;
      y        <= '0;
      rd_col   <= '0;
      rd_row   <= '0;
      done     <= 1'b0;
    end else begin
      mm_start <= 1'b0;
      done     <= 1'b0;
      send     <= send + 1'b1;
      // column/row walk of the reads (column by column, top row first)
      if (32'(rd_row) == WIN - 1) begin
        rd_row <= '0;
        rd_col <= rd_col + 1'b1;
      end else begin
        rd_row <= rd_row + 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          send <= '0; rd_col <= '0; rd_row <= '0;
          if (go && !buf_init) begin                 // Buf_Initialization
            buf_init <= 1'b1;
            mm_start <= 1'b1;
          end
          if (buf_init && mm_init_done) begin
            buf_init <= 1'b0;
            x        <= '0;
            y        <= '0;
            state    <= S_INIT_SHIFTTAP;
          end
        end
        S_INIT_SHIFTTAP: begin
          if (32'(send) == RT + 1) begin             // Send = 342
            send  <= '0;
            state <= S_DISP;
          end
        end
        S_FEEDING_SHIFTTAP: begin
          if (32'(send) == WIN + 1) begin
            send  <= '0;
            state <= S_DISP;
          end
        end
        S_DISP: begin
          if (32'(send) == 1) begin                  // Send = 2
            send  <= '0;
            state <= S_UPDATE;
          end
        end
        S_UPDATE: begin
          send <= '0; rd_col <= '0; rd_row <= '0;
          if (32'(x) < XP) begin
            x     <= x + 1'b1;
            state <= S_FEEDING_SHIFTTAP;
          end else if (32'(y) < YP) begin
            if (next_row_ready) begin
              x     <= '0;
              y     <= y + 1'b1;
              state <= S_INIT_SHIFTTAP;
            end
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: begin
          if (!dw_pending) begin                     // last disparity issued
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- disparity write
  logic [OFF_W-1:0] a_write;
  logic [OFF_W-1:0] dw_addr;
  logic [DISP_W-1:0] dw_data;

  disp_addr_gen #(.IMG_W(IMG_W)) u_dag (.i(x), .j(y), .a_write);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dw_pending <= 1'b0;
      dw_addr    <= '0;
      dw_data    <= '0;
    end else begin
      if (dw_pending && dw_gnt) dw_pending <= 1'b0;
      if (k_out_valid) begin
        dw_pending <= 1'b1;
        dw_addr    <= a_write;
        dw_data    <= k_disp;
      end
    end
  end

  always_comb begin
    dw_req          = '0;
    dw_req.valid    = dw_pending;
    dw_req.we       = 1'b1;
    dw_req.bank     = BANK_DISP;
    dw_req.byte_off = dw_addr;
    dw_req.wdata    = SRAM_DW'(dw_data);
  end

  // --------------------------------------------------- line refill engine
  logic refilling, upd_pending;
  logic [X_W-1:0] rf_x;
  logic [Y_W-1:0] rf_line;
  logic running, row_finished;
  // In UPDATE at the last column the top line y is no longer needed.
  assign row_finished = (state == S_UPDATE) && (32'(x) == XP);
  assign running = (state != S_IDLE) && (state != S_DONE);

  assign mm_update   = refilling && !upd_pending && !mm_busy;
  assign mm_upd_x    = rf_x;
  assign mm_upd_line = rf_line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lines_loaded <= '0;
      refilling    <= 1'b0;
      upd_pending  <= 1'b0;
      rf_x         <= '0;
      rf_line      <= '0;
    end else begin
      if (state == S_IDLE && buf_init && mm_init_done)
        lines_loaded <= (Y_W+1)'(N_INIT);
      if (mm_update) upd_pending <= 1'b1;
      if (running && !refilling && 32'(lines_loaded) < IMG_H
          && 32'(lines_loaded) < 32'(y) + NLINES + (row_finished ? 1 : 0)) begin
        refilling <= 1'b1;
        rf_x      <= '0;
        rf_line   <= lines_loaded[Y_W-1:0];
      end
      if (mm_update_done && upd_pending) begin
        upd_pending <= 1'b0;
        if (32'(rf_x) + 2 >= IMG_W) begin
          refilling    <= 1'b0;
          lines_loaded <= lines_loaded + 1'b1;
        end else begin
          rf_x <= rf_x + X_W'(2);
        end
      end
    end
  end

  // The disparity writer has top SRAM priority, so a queued write is never
  // overtaken by the next result.
  assert property (@(posedge clk) disable iff (!rst_n) k_out_valid |-> !(dw_pending && !dw_gnt));
endmodule
