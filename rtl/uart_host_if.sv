// uart_host_if: link between the serial port and the SRAM.
//
// Load: the host sends the left image and then the right image, each IMG_W x
// IMG_H bytes in row-major order. Byte pairs are packed into 16-bit words (the
// even-column pixel in the low byte) and written to the left and right image
// banks. When the last word is written, images_ready pulses.
// Read-back: a send pulse starts streaming the disparity map: for each window
// position (i, j), 0 <= i <= IMG_W-WIN, 0 <= j <= IMG_H-WIN, row by row, the
// word at disparity-table byte offset 2*(j*IMG_W+i) is read and its low byte
// is transmitted. One SRAM request is outstanding at a time; requests wait for
// their grant. A received byte pair is written before the next byte can
// arrive (a byte lasts 10 bit times, thousands of clocks); a byte that came in
// while a word still waited for its grant would be lost. This protocol is this design's own; the published design only
// shows the UART feeding a data multiplexer in front of the SRAM.
module uart_host_if
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned WIN   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rx_valid,
  input  logic [7:0]         rx_data,
  output logic               images_ready,
  input  logic               send,
  output logic               tx_start,
  output logic [7:0]         tx_data,
  input  logic               tx_busy,
  output sram_req_t          req,
  input  logic               gnt,
  input  logic               rvalid,
  input  logic [SRAM_DW-1:0] rdata
);
  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned XP   = IMG_W - WIN;
  localparam int unsigned YP   = IMG_H - WIN;

  typedef enum logic [2:0] {H_LOAD, H_WRITE, H_RD_REQ, H_RD_WAIT, H_TX, H_TX_WAIT} host_state_e;
  host_state_e state;

  logic [OFF_W:0]   cnt;       // bytes received so far
  logic [7:0]       low_byte;
  logic [7:0]       rx_hold;   // odd-column byte of the pair
  logic [X_W-1:0]   ri;
  logic [Y_W-1:0]   rj;
  logic [7:0]       rb_byte;
  logic             last_word;

  always_comb begin
    req = '0;
    if (state == H_WRITE) begin
      req.valid    = 1'b1;
      req.we       = 1'b1;
      req.bank     = (32'(cnt) <= NPIX) ? BANK_LEFT : BANK_RIGHT;
      req.byte_off = (32'(cnt) <= NPIX) ? OFF_W'(cnt - 1'b1) : OFF_W'(cnt - 1'b1 - (OFF_W+1)'(NPIX));
      req.byte_off[0] = 1'b0;
      req.wdata    = {rx_hold, low_byte};
    end else if (state == H_RD_REQ) begin
      req.valid    = 1'b1;
      req.bank     = BANK_DISP;
      req.byte_off = OFF_W'(2) * (OFF_W'(rj) * OFF_W'(IMG_W) + OFF_W'(ri));
      req.tag      = 16'h8000;
    end
  end

  assign last_word = (32'(cnt) == 2 * NPIX);
  assign tx_data   = rb_byte;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= H_LOAD;
      cnt          <= '0;
      low_byte     <= '0;
      rx_hold      <= '0;
      ri           <= '0;
      rj           <= '0;
      rb_byte      <= '0;
      images_ready <= 1'b0;
      tx_start     <= 1'b0;
    end else begin
      images_ready <= 1'b0;
      tx_start     <= 1'b0;
      unique case (state)
        H_LOAD: begin
          if (rx_valid) begin
            cnt <= cnt + 1'b1;
            if (cnt[0] == 1'b0) low_byte <= rx_data;
            else begin
              rx_hold <= rx_data;
              state   <= H_WRITE;
            end
          end else if (send) begin
            ri    <= '0;
            rj    <= '0;
            state <= H_RD_REQ;
          end
        end
        H_WRITE: if (gnt) begin
          state <= H_LOAD;
          if (last_word) begin
            images_ready <= 1'b1;
            cnt          <= '0;
          end
        end
        H_RD_REQ:  if (gnt) state <= H_RD_WAIT;
        H_RD_WAIT: if (rvalid) begin
          rb_byte <= rdata[7:0];
          state   <= H_TX;
        end
        H_TX: if (!tx_busy) begin
          tx_start <= 1'b1;
          state    <= H_TX_WAIT;
        end
        H_TX_WAIT: if (!tx_busy && !tx_start) begin
          if (32'(ri) < XP) begin
            ri    <= ri + 1'b1;
            state <= H_RD_REQ;
          end else if (32'(rj) < YP) begin
            ri    <= '0;
            rj    <= rj + 1'b1;
            state <= H_RD_REQ;
          end else begin
            state <= H_LOAD;
          end
        end
        default: state <= H_LOAD;
      endcase
    end
  end
endmodule
