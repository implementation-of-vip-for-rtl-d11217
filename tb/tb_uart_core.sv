// tb_uart_core: self-checking test of the UART transmitter and receiver.
// A serial line model checks the transmitted frames (start bit, 8 data
// bits LSB first, stop bit, bit time baud_div) and the bit-time count;
// the transmitter is looped back to the receiver for random bytes; a frame
// with a zero stop bit must raise the framing error.
module tb_uart_core;
  localparam int DIV = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic       tx_start = 0, tx_busy, txd, rxd, rx_valid, rx_ferr;
  logic [7:0] tx_data = 0, rx_data;
  logic       loop = 1, drv = 1;
  assign rxd = loop ? txd : drv;

  uart_core dut (.clk, .rst_n, .baud_div(16'(DIV)), .tx_en(1'b1), .rx_en(1'b1),
                 .tx_start, .tx_data, .tx_busy, .txd, .rxd, .rx_valid,
                 .rx_data, .rx_frame_err(rx_ferr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // line monitor: samples mid-bit after a falling edge
  logic [7:0] mon_byte; int mon_frames = 0; bit mon_err = 0;
  initial begin
    forever begin
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      if (txd != 0) mon_err = 1;
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        mon_byte[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      if (txd != 1) mon_err = 1;
      mon_frames++;
    end
  end

  logic [7:0] rx_q [$];
  int n_ferr = 0;
  always @(posedge clk) begin
    if (rx_valid) rx_q.push_back(rx_data);
    if (rx_ferr) n_ferr++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(txd == 1, "line idles high");
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b; int t;
      b = (i == 0) ? 8'hA5 : 8'($urandom);
      @(negedge clk); tx_data = b; tx_start = 1;
      @(negedge clk); tx_start = 0; t = 1;
      while (tx_busy) begin @(negedge clk); t++; end
      check(t == 10 * DIV + 1, $sformatf("frame took %0d cycles", t));
      repeat (DIV) @(negedge clk);
      check(mon_byte == b && !mon_err, $sformatf("line byte %h vs %h", mon_byte, b));
      check(rx_q.size() == 1 && rx_q[0] == b, $sformatf("looped back %h size %0d q0 %h ferr %0d", b, rx_q.size(), rx_q[0], n_ferr));
      rx_q.delete();
    end
    // framing error: drive a frame whose stop bit is 0
    loop = 0; drv = 1;
    repeat (3 * DIV) @(negedge clk);
    drv = 0; repeat (10 * DIV) @(negedge clk);  // start, 8 zeros, stop=0
    drv = 1; repeat (3 * DIV) @(negedge clk);
    check(n_ferr == 1 && rx_q.size() == 0, $sformatf("framing error detected %0d %0d", n_ferr, rx_q.size()));
    // a glitch shorter than half a bit is not a start bit
    drv = 0; repeat (2) @(negedge clk); drv = 1;
    repeat (12 * DIV) @(negedge clk);
    check(rx_q.size() == 0 && n_ferr == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
