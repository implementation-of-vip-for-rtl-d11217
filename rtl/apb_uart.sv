// apb_uart: UART with its APB register interface.
//
// Registers (byte offsets; the transmit and receive data offsets 0 and 4
// match the UART addresses of the original design, 0xE000_0020/24 for UART1
// and 0xE000_0080/84 for UART2):
//   +0x00 data (write)  transmit holding register
//   +0x04 data (read)   received byte; reading it clears rx_ready
//   +0x08 status (read) [0] rx_ready [1] tx_hold_empty [2] tx_busy
//                       [3] overrun [4] framing error; reading it clears
//                       bits 3 and 4
//   +0x0C control       [15:0] bit time in clocks [16] tx enable
//                       [17] rx enable
//   +0x10 mask          [0] receive interrupt [1] transmit-done interrupt
// A byte written to the holding register moves into the transmitter as soon
// as it is idle, so a second byte can wait while the first is on the line.
// intr pulses for one clock when a byte arrives (mask bit 0) or when the
// transmitter finishes a byte (mask bit 1). APB: zero wait states.
//
// The original design names the control, data, mask and status registers of
// its UARTs; their bit layout and the holding register are this design's
// own.
module apb_uart
  import amba_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_req_t    apb,
  output logic [31:0] prdata,
  output logic        pready,
  input  logic        rs232_rx,
  output logic        rs232_tx,
  output logic        intr
);

  logic [15:0] baud_div;
  logic        tx_en, rx_en;
  logic [1:0]  mask;
  logic [7:0]  tx_hold, rx_buf;
  logic        tx_hold_full, rx_ready, overrun, frame_err;
  logic        tx_start, tx_busy, tx_busy_q;
  logic        rx_valid, rx_ferr;
  logic [7:0]  rx_byte;
  logic        wr, rd;

  assign wr     = psel && apb.penable && apb.pwrite;
  assign rd     = psel && apb.penable && !apb.pwrite;
  assign pready = 1'b1;
  assign tx_start = tx_hold_full && !tx_busy && tx_en;

  uart_core u_core (
    .clk, .rst_n, .baud_div, .tx_en, .rx_en,
    .tx_start, .tx_data(tx_hold), .tx_busy, .txd(rs232_tx),
    .rxd(rs232_rx), .rx_valid, .rx_data(rx_byte), .rx_frame_err(rx_ferr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_div <= '0; tx_en <= 1'b0; rx_en <= 1'b0; mask <= '0;
      tx_hold <= '0; rx_buf <= '0;
      tx_hold_full <= 1'b0; rx_ready <= 1'b0;
      overrun <= 1'b0; frame_err <= 1'b0;
      tx_busy_q <= 1'b0; intr <= 1'b0;
    end else begin
      tx_busy_q <= tx_busy;
      intr <= (rx_valid && mask[0]) || (tx_busy_q && !tx_busy && mask[1]);
      if (tx_start) tx_hold_full <= 1'b0;
      if (rd && apb.paddr[4:2] == 3'd1) rx_ready <= 1'b0;
      if (rd && apb.paddr[4:2] == 3'd2) begin
        overrun   <= 1'b0;
        frame_err <= 1'b0;
      end
      if (rx_valid) begin
        rx_buf   <= rx_byte;
        rx_ready <= 1'b1;
        if (rx_ready) overrun <= 1'b1;
      end
      if (rx_ferr) frame_err <= 1'b1;
      if (wr) begin
        unique case (apb.paddr[4:2])
          3'd0: begin tx_hold <= apb.pwdata[7:0]; tx_hold_full <= 1'b1; end
          3'd3: {rx_en, tx_en, baud_div} <= apb.pwdata[17:0];
          3'd4: mask <= apb.pwdata[1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    if (psel && !apb.pwrite) begin
      unique case (apb.paddr[4:2])
        3'd1: prdata = {24'd0, rx_buf};
        3'd2: prdata = {27'd0, frame_err, overrun, tx_busy, !tx_hold_full,
                        rx_ready};
        3'd3: prdata = {14'd0, rx_en, tx_en, baud_div};
        3'd4: prdata = {30'd0, mask};
        default: prdata = '0;
      endcase
    end
  end

endmodule
