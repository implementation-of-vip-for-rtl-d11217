// tb_apb_uart: self-checking test of the UART register interface.
// The serial output is looped back to the input. Checks control and mask
// read-back, transmit of 0xA5 and its reception at the receive data
// register, the status bits (rx ready, holding register empty, busy,
// overrun), two back-to-back bytes through the holding register, the
// receive and transmit interrupts, and the transmit frame time.
module tb_apb_uart;
  import amba_pkg::*;
  localparam int DIV = 10;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        psel = 0, pready, rs232_tx, rs232_rx, intr;
  apb_req_t    apb = '0;
  logic [31:0] prdata;
  assign rs232_rx = rs232_tx;

  apb_uart dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; apb = '{paddr: a, pwrite: 1, penable: 0, pwdata: d};
    @(negedge clk); apb.penable = 1;
    @(negedge clk); psel = 0; apb = '0;
  endtask
  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; apb = '{paddr: a, pwrite: 0, penable: 0, pwdata: 0};
    @(negedge clk); apb.penable = 1; d = prdata;
    @(negedge clk); psel = 0; apb = '0;
  endtask

  int n_int = 0;
  always @(posedge clk) if (intr) n_int++;

  // time from the first start bit to the end of transmission
  longint t_start = 0, t_busy_end = 0, cyc = 0;
  logic tx_q = 1;
  always @(posedge clk) begin
    cyc++;
    tx_q <= rs232_tx;
    if (tx_q && !rs232_tx && t_start == 0) t_start = cyc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rs232_tx == 1, "line idles high");
    apb_write(12'h0C, 32'h0003_0000 | DIV);
    apb_read(12'h0C, d);  check(d == (32'h0003_0000 | DIV), "control read back");
    apb_write(12'h10, 32'h3);
    apb_read(12'h10, d);  check(d == 3, "mask read back");
    apb_read(12'h08, d);  check(d[1:0] == 2'b10, "status: tx empty, rx empty");

    apb_write(12'h00, 32'hA5);
    @(negedge clk);
    check(rs232_tx == 0, "start bit on the line");
    apb_read(12'h08, d);  check(d[2], "status: tx busy");
    do apb_read(12'h08, d); while (!d[0]);
    apb_read(12'h04, d);  check(d == 32'hA5, $sformatf("received %h", d));
    apb_read(12'h08, d);  check(!d[0], "reading data clears rx ready");
    repeat (DIV) @(negedge clk);
    check(n_int == 2, $sformatf("rx and tx interrupts: %0d", n_int));

    // two bytes back to back through the holding register, not read: overrun
    t_start = 0;
    apb_write(12'h00, 32'h3C);
    apb_write(12'h00, 32'hC3);
    apb_read(12'h08, d);  check(!d[1] && d[2], "holding register full while busy");
    repeat (25 * DIV) @(negedge clk);
    apb_read(12'h08, d);  check(d[0] && d[3], $sformatf("rx ready and overrun: %h", d));
    apb_read(12'h04, d);  check(d == 32'hC3, "second byte kept");
    apb_read(12'h08, d);  check(!d[3], "status read clears overrun");
    check(n_int == 6, $sformatf("interrupt count %0d", n_int));
    // interrupts masked
    apb_write(12'h10, 32'h0);
    apb_write(12'h00, 32'h11);
    repeat (12 * DIV) @(negedge clk);
    check(n_int == 6, "masked: no interrupt");
    apb_read(12'h04, d);  check(d == 32'h11, "third byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
