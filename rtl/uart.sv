// uart: RS-232 style serial receiver and transmitter (8 data bits, no parity,
// one stop bit, least significant bit first).
//
// Receiver: rxd is synchronised by two flip-flops; a falling edge starts a
// frame, the start bit is re-checked half a bit later, and each data bit is
// sampled in the middle of its bit time. rx_valid pulses for one clock with
// rx_data; a frame whose stop bit is 0 is dropped.
// Transmitter: tx_start (while tx_busy is low) latches tx_data and sends a
// frame; tx_busy is high from the next clock until the stop bit has ended.
// CLKS_PER_BIT sets the bit time (434 = 115200 baud at 50 MHz). The published
// design only states that an RS-232 link connects the FPGA to a PC; frame
// format and baud rate are this design's choices.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       txd,
  output logic       tx_busy
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------------------------------------------------- receiver
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sync  <= 2'b11;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_sync  <= {rx_sync[0], rxd};
      rx_valid <= 1'b0;
      unique case (rx_state)
        RX_IDLE: if (!rx_sync[1]) begin
          rx_state <= RX_START;
          rx_cnt   <= '0;
        end
        RX_START: begin
          if (32'(rx_cnt) == CLKS_PER_BIT / 2 - 1) begin
            rx_cnt   <= '0;
            rx_bit   <= '0;
            rx_state <= rx_sync[1] ? RX_IDLE : RX_DATA;
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_DATA: begin
          if (32'(rx_cnt) == CLKS_PER_BIT - 1) begin
            rx_cnt   <= '0;
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
            rx_bit   <= rx_bit + 1'b1;
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        RX_STOP: begin
          if (32'(rx_cnt) == CLKS_PER_BIT - 1) begin
            rx_cnt   <= '0;
            rx_state <= RX_IDLE;
            if (rx_sync[1]) begin
              rx_valid <= 1'b1;
              rx_data  <= rx_shift;
            end
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- transmitter
  logic [CW-1:0] tx_cnt;
  logic [3:0]    tx_bit;      // 0 start, 1..8 data, 9 stop
  logic [9:0]    tx_frame;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_busy  <= 1'b0;
      tx_cnt   <= '0;
      tx_bit   <= '0;
      tx_frame <= '1;
      txd      <= 1'b1;
    end else if (!tx_busy) begin
      txd <= 1'b1;
      if (tx_start) begin
        tx_busy  <= 1'b1;
        tx_frame <= {1'b1, tx_data, 1'b0};
        tx_cnt   <= '0;
        tx_bit   <= '0;
        txd      <= 1'b0;
      end
    end else begin
      if (32'(tx_cnt) == CLKS_PER_BIT - 1) begin
        tx_cnt <= '0;
        if (tx_bit == 4'd9) begin
          tx_busy <= 1'b0;
          txd     <= 1'b1;
        end else begin
          tx_bit <= tx_bit + 1'b1;
          txd    <= tx_frame[tx_bit + 1'b1];
        end
      end else tx_cnt <= tx_cnt + 1'b1;
    end
  end
endmodule
