// uart_core: RS-232 transmitter and receiver, 8 data bits, no parity, one
// stop bit, LSB first.
//
// baud_div is the bit time in clocks (at least 2). The transmitter accepts a
// byte with tx_start while tx_busy is low and shifts out start bit, 8 data
// bits and stop bit, each for baud_div clocks; tx_busy stays high until the
// stop bit has been sent. The receiver synchronises rxd with two flops,
// waits half a bit time after a falling edge, re-checks the start bit and
// then samples every bit in its middle; after the stop bit it pulses
// rx_valid with rx_data, or rx_frame_err if the stop bit was 0.
//
// The original design gives only the UART's purpose (transmitting and
// receiving messages at a programmable rate, e.g. 2 Mbit/s); frame format
// and sampling scheme are this design's own choices.
module uart_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] baud_div,
  input  logic        tx_en,
  input  logic        rx_en,
  // transmitter
  input  logic        tx_start,
  input  logic [7:0]  tx_data,
  output logic        tx_busy,
  output logic        txd,
  // receiver
  input  logic        rxd,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        rx_frame_err
);

  // ---------------- transmitter ----------------
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      tx_busy  <= 1'b0;
    end else if (!tx_busy) begin
      if (tx_start && tx_en) begin
        tx_shift <= {1'b1, tx_data, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= baud_div - 16'd1;
        tx_busy  <= 1'b1;
      end
    end else if (tx_cnt != 16'd0) begin
      tx_cnt <= tx_cnt - 16'd1;
    end else begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= baud_div - 16'd1;
      if (tx_bits == 4'd1) tx_busy <= 1'b0;
    end
  end
  assign txd = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;
  rx_state_e   rx_state;
  logic [1:0]  rx_sync;
  logic [15:0] rx_cnt;
  logic [2:0]  rx_bit;
  logic [7:0]  rx_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= 2'b11;
      rx_state     <= R_IDLE;
      rx_cnt       <= '0;
      rx_bit       <= '0;
      rx_shift     <= '0;
      rx_data      <= '0;
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_sync      <= {rx_sync[0], rxd};
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      unique case (rx_state)
        R_IDLE: if (rx_en && !rx_sync[1]) begin
          rx_cnt   <= {1'b0, baud_div[15:1]} - 16'd1;
          rx_state <= R_START;
        end
        R_START: begin
          if (rx_cnt != 16'd0) rx_cnt <= rx_cnt - 16'd1;
          else if (rx_sync[1]) rx_state <= R_IDLE;  // glitch, not a start
          else begin
            rx_cnt   <= baud_div - 16'd1;
            rx_bit   <= '0;
            rx_state <= R_DATA;
          end
        end
        R_DATA: begin
          if (rx_cnt != 16'd0) rx_cnt <= rx_cnt - 16'd1;
          else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_cnt   <= baud_div - 16'd1;
            rx_bit   <= rx_bit + 3'd1;
            if (rx_bit == 3'd7) rx_state <= R_STOP;
          end
        end
        R_STOP: begin
          if (rx_cnt != 16'd0) rx_cnt <= rx_cnt - 16'd1;
          else begin
            rx_state <= R_IDLE;
            if (rx_sync[1]) begin
              rx_valid <= 1'b1;
              rx_data  <= rx_shift;
            end else begin
              rx_frame_err <= 1'b1;
            end
          end
        end
        default: rx_state <= R_IDLE;
      endcase
    end
  end

endmodule
