// tb_apb_intc: self-checking test of the interrupt registers.
// Checks that source pulses latch into the pending register, write-1-to-
// clear, the mask, the global enable, the irq timing (one clock after the
// pending bit) and the lowest-number-first irq_id.
module tb_apb_intc;
  import amba_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        psel = 0, pready, int_en = 0, irq;
  logic [4:0]  irq_id;
  logic [9:0]  src = '0;
  apb_req_t    apb = '0;
  logic [31:0] prdata;

  apb_intc #(.NSRC(10)) dut (.*);

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
  task automatic pulse(input int s);
    @(negedge clk); src[s] = 1; @(negedge clk); src[s] = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [9:0]  exp_pend;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulse(3); pulse(7);
    apb_read(12'h0, d); check(d == 32'h88, $sformatf("pending %h", d));
    check(!irq, "masked: no irq");
    apb_write(12'h4, 32'h080);
    apb_read(12'h4, d); check(d == 32'h80, "mask read back");
    repeat (2) @(negedge clk);
    check(!irq, "global enable off: no irq");
    int_en = 1;
    @(negedge clk); @(negedge clk);
    check(irq && irq_id == 7, "irq for source 7");
    apb_write(12'h4, 32'h3FF);
    @(negedge clk); @(negedge clk);
    check(irq_id == 3, "lowest source first");
    apb_write(12'h0, 32'h008);
    @(negedge clk);
    apb_read(12'h0, d); check(d == 32'h80, "write 1 clears");
    apb_write(12'h0, 32'h080);
    @(negedge clk); @(negedge clk);
    check(!irq, "irq drops when nothing pending");
    // irq one clock after the source
    @(negedge clk); src[9] = 1; @(negedge clk); src[9] = 0;
    check(!irq, "irq not yet");
    @(negedge clk); check(irq && irq_id == 9, "irq one clock later");
    // random pulses against a model
    exp_pend = 10'h200;
    for (int i = 0; i < 50; i++) begin
      logic [9:0] p;
      p = 10'($urandom);
      @(negedge clk); src = p; exp_pend |= p; @(negedge clk); src = 0;
      if (i % 5 == 4) begin
        logic [9:0] c;
        c = 10'($urandom);
        apb_write(12'h0, {22'd0, c});
        exp_pend &= ~c;
        apb_read(12'h0, d);
        check(d[9:0] == exp_pend, $sformatf("pending %h expected %h", d, exp_pend));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
