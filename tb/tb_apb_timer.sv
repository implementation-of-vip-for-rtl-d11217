// tb_apb_timer: self-checking test of one APB timer.
// Checks register read-back, the underflow period with auto-reload
// (reload+1 clocks between interrupts), one-shot mode stopping the timer,
// the interrupt enable, the watchdog reset pulse and zero read data while
// not selected.
module tb_apb_timer;
  import amba_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        psel = 0, pready, wdog_en = 0, intr, wdog_reset;
  apb_req_t    apb = '0;
  logic [31:0] prdata;

  apb_timer dut (.*);

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

  int n_int = 0, n_wdog = 0;
  longint last_int = 0, period = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (intr) begin n_int++; period = cyc - last_int; last_int = cyc; end
    if (wdog_reset) n_wdog++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    check(prdata == 0 && intr == 0, "outputs zero in reset");
    rst_n = 1;
    apb_write(12'h4, 32'd19);
    apb_read(12'h4, d);  check(d == 19, "reload read back");
    apb_read(12'h8, d);  check(d == 19, "reload loads counter");
    #1 check(prdata == 0, "prdata zero when not selected");
    // periodic: enable, auto-reload, interrupt enable
    apb_write(12'h0, 32'h7);
    apb_read(12'h0, d);  check(d == 7, "control read back");
    repeat (100) @(negedge clk);
    check(n_int >= 4, $sformatf("periodic interrupts: %0d", n_int));
    check(period == 20, $sformatf("period %0d, expected reload+1 = 20", period));
    apb_read(12'h8, d);  check(d <= 19, "counter within range");
    // counter runs down between two reads
    begin
      logic [31:0] d2;
      apb_read(12'h8, d);
      apb_read(12'h8, d2);
      check(d2 == d - 3 || (d < 3), $sformatf("counter decrements %0d -> %0d", d, d2));
    end
    // one-shot: stops after the underflow
    apb_write(12'h0, 32'h0);
    apb_write(12'h4, 32'd5);
    n_int = 0;
    apb_write(12'h0, 32'h5);
    repeat (40) @(negedge clk);
    check(n_int == 1, $sformatf("one-shot gives one interrupt, got %0d", n_int));
    apb_read(12'h0, d);  check(d[0] == 0, "one-shot clears enable");
    // interrupt disabled: no interrupt
    n_int = 0;
    apb_write(12'h4, 32'd3);
    apb_write(12'h0, 32'h3);
    repeat (20) @(negedge clk);
    check(n_int == 0, "no interrupt with interrupt enable off");
    check(n_wdog == 0, "no watchdog reset while disabled");
    // watchdog: reset pulses on underflow, as long as it is not refreshed
    wdog_en = 1;
    repeat (20) @(negedge clk);
    check(n_wdog >= 4, $sformatf("watchdog resets: %0d", n_wdog));
    // refreshing the counter in time keeps the watchdog quiet
    apb_write(12'h4, 32'd200);
    n_wdog = 0;
    repeat (5) begin repeat (50) @(negedge clk); apb_write(12'h8, 32'd200); end
    check(n_wdog == 0, "refreshed watchdog stays quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
