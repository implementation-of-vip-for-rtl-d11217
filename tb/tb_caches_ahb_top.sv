// tb_caches_ahb_top: end-to-end test of the bus interface at its default
// (full) size: 32 KB caches, four timers, two UARTs, four ACE devices.
// The testbench plays the processor's fetch and memory stages; external
// memory and the ACE devices are behavioural models; UART1's line is looped
// to UART2's input and back. It runs uncached fetches and loads/stores,
// switches both caches on, runs cached code and data (hits, misses,
// write-backs), programs the timers (interrupt and watchdog), sends 0xA5
// across the UARTs, reads and writes the ACE devices and provokes a data
// cache parity error. Every mechanism is counted and must occur. The bus
// checks on the timers and UARTs are written as assertions.
module tb_caches_ahb_top;
  import amba_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        if_req = 0, if_ready, dm_req = 0, dm_we = 0, dm_ready, perr;
  logic [31:0] if_addr = 0, if_rdata, dm_addr = 0, dm_wdata = 0, dm_rdata;
  logic [3:0]  dm_be = 4'hF;
  logic [7:0]  mem_cs;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_oe, mem_we;
  logic [3:0]  mem_be;
  logic [3:0]  ace_cs, ace_int = 4'd0;
  logic [15:0] ace_addr, ace_wdata, ace_rdata;
  logic        ace_rd_wr, ace_ready;
  logic        tx1, tx2, irq, wdog_reset;
  logic [4:0]  irq_id;
  logic [8:0]  secded_en;
  logic [6:0]  mem_wcheck, mem_rcheck;
  logic        secded_ce, secded_ue;
  logic        ic_hit, ic_miss, dc_hit, dc_miss, dc_writeback;
  int          n_reads, n_writes, n_ace;

  caches_ahb_top dut (
    .clk, .rst_n, .if_req, .if_addr, .if_ready, .if_rdata,
    .dm_req, .dm_we, .dm_be, .dm_addr, .dm_wdata, .dm_ready, .dm_rdata,
    .dcache_parity_err(perr),
    .mem_cs, .mem_addr, .mem_oe, .mem_we, .mem_be, .mem_wdata, .mem_rdata,
    .mem_wcheck, .mem_rcheck, .secded_ce, .secded_ue,
    .ace_cs, .ace_addr, .ace_rd_wr, .ace_wdata, .ace_rdata, .ace_ready, .ace_int,
    .rs232_rx1(tx2), .rs232_tx1(tx1), .rs232_rx2(tx1), .rs232_tx2(tx2),
    .irq, .irq_id, .wdog_reset, .secded_en,
    .ic_hit, .ic_miss, .dc_hit, .dc_miss, .dc_writeback
  );
  ext_mem_model u_mem (.clk, .cs(mem_cs), .addr(mem_addr), .oe(mem_oe),
                       .we(mem_we), .be(mem_be), .wdata(mem_wdata),
                       .rdata(mem_rdata), .wcheck(mem_wcheck),
                       .rcheck(mem_rcheck), .n_reads, .n_writes);
  ace_model #(.LATENCY(3)) u_ace (.clk, .ace_cs, .ace_addr, .ace_rd_wr,
                                  .ace_wdata, .ace_rdata, .ace_ready,
                                  .n_access(n_ace));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- bus checks on the timers and UARTs ----
  a_timer_reset_prdata: assert property (@(posedge clk)
    !rst_n |-> dut.g_timer[0].u_timer.prdata == 0 &&
               dut.g_timer[3].u_timer.prdata == 0);
  a_timer_reset_intr: assert property (@(posedge clk)
    !rst_n |-> dut.timer_int == 0);
  a_uart_idle_high: assert property (@(posedge clk) !rst_n |-> tx1 && tx2);

  // ---- mechanism counters ----
  int n_uc_fetch = 0, n_uc_data = 0, n_apb = 0, n_icache_hit = 0,
      n_icache_miss = 0, n_dcache_hit = 0, n_dcache_miss = 0, n_wb = 0,
      n_wdog = 0, n_timer_int = 0, n_irq = 0, n_perr = 0, n_uart_rx = 0,
      n_ws = 0, n_ce = 0, n_ue = 0;
  always @(posedge clk) begin
    if (if_ready && !dut.ic_en) n_uc_fetch++;
    if (dm_ready && !is_apb(dm_addr) && !dut.dc_en) n_uc_data++;
    if (dut.hready_apb) n_apb++;
    if (ic_hit) n_icache_hit++;
    if (ic_miss) n_icache_miss++;
    if (dc_hit) n_dcache_hit++;
    if (dc_miss) n_dcache_miss++;
    if (dc_writeback) n_wb++;
    if (wdog_reset) n_wdog++;
    if (dut.timer_int != 0) n_timer_int++;
    if (irq) n_irq++;
    if (perr) n_perr++;
    if (secded_ce) n_ce++;
    if (secded_ue) n_ue++;
    if (dut.uart_int != 0) n_uart_rx++;
    if (mem_cs != 0 && dut.u_ahb_master.ws_cnt != 0) n_ws++;
  end

  // ---- processor stand-in ----
  task automatic fetch(input logic [31:0] a, output logic [31:0] d, output int cyc);
    @(negedge clk); if_req = 1; if_addr = a; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!if_ready && cyc < 500);
    d = if_rdata; if_req = 0;
  endtask
  task automatic mem(input logic we, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] d);
    int cyc;
    @(negedge clk); dm_req = 1; dm_we = we; dm_be = 4'hF; dm_addr = a;
    dm_wdata = wd; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!dm_ready && cyc < 500);
    check(cyc < 500, $sformatf("access %h completes", a));
    d = dm_rdata; dm_req = 0; dm_we = 0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] v);
    logic [31:0] d; mem(1, a, v, d);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    mem(0, a, 0, d);
  endtask

  // architectural memory for the data side
  logic [31:0] ref_mem [logic [29:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a[31:2]) ? ref_mem[a[31:2]] : tb_pkg::mem_init(a);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d; int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // caches clear their tag RAMs (1024 cycles)
    repeat (1030) @(negedge clk);

    // memory configuration: bank0 2 wait states, bank1 1, bank2 0, RAM 0
    wr(MCR_ADDR, 32'h0000_0012);
    rd(MCR_ADDR, d);  check(d == 32'h12, "MCR read back");
    rd(PCR_ADDR, d);  check(d == 0, "caches off after reset");

    // uncached instruction fetches: 1 + wait states cycles each
    for (int i = 0; i < 8; i++) begin
      fetch(32'h0000_0100 + 32'(4*i), d, cyc);
      check(d == tb_pkg::mem_init(32'h0000_0100 + 32'(4*i)), "uncached fetch data");
      check(cyc == 3, $sformatf("uncached fetch %0d cycles", cyc));
    end
    // uncached loads and stores
    wr(32'h1000_0000, 32'hCAFE_0001); ref_mem[32'h1000_0000 >> 2] = 32'hCAFE_0001;
    rd(32'h1000_0000, d);  check(d == 32'hCAFE_0001, "uncached store/load");
    check(u_mem.peek(32'h1000_0000) == 32'hCAFE_0001, "uncached store reached memory");

    // switch both caches on, interrupts on
    wr(PCR_ADDR, 32'h0000_1003);
    rd(PCR_ADDR, d);  check(d == 32'h1003, "PCR read back");

    // cached code: a 64-instruction loop run three times
    for (int pass = 0; pass < 3; pass++)
      for (int i = 0; i < 64; i++) begin
        logic [31:0] a;
        a = 32'h2000_0400 + 32'(4*i);
        fetch(a, d, cyc);
        check(d == tb_pkg::mem_init(a), $sformatf("cached fetch %h", a));
        if (pass > 0) check(cyc == 1, "loop fetches hit");
      end

    // cached data: stores and loads over three blocks of one set, so that
    // dirty blocks are written back
    for (int r = 0; r < 120; r++) begin
      logic [31:0] a;
      // bank 1, one of three tags, set 0x123
      a = {4'h1, 2'($urandom_range(0, 2)), 12'h0, 10'h123, 2'($urandom), 2'b00};
      if ($urandom_range(0, 1)) begin
        logic [31:0] v; v = $urandom;
        wr(a, v); ref_mem[a[31:2]] = v;
      end else begin
        rd(a, d); check(d == ref_rd(a), $sformatf("cached load %h", a));
      end
    end
    // a parity error on a corrupted cached word
    rd(32'h1000_8000, d);
    dut.u_dcache.g_way[0].u_data.mem[{10'h000, 2'd0}][0] ^= 1'b1;
    begin
      int p0; p0 = n_perr;
      rd(32'h1000_8000, d);
      @(negedge clk);
      check(n_perr == p0 + 1, "parity error reported");
    end

    // timer 1 periodic interrupt through the interrupt registers
    wr(INTC_BASE + 4, 32'h001);                 // unmask timer 1
    wr(TIMER_BASE + 4, 32'd40);                 // reload
    wr(TIMER_BASE + 0, 32'h7);                  // enable, auto-reload, int
    begin
      int t = 0;
      while (!irq && t < 200) begin @(negedge clk); t++; end
      check(irq && irq_id == 0, "timer 1 interrupt reaches irq");
    end
    rd(INTC_BASE, d);  check(d[0], "timer 1 pending");
    wr(TIMER_BASE + 0, 32'h0);
    wr(INTC_BASE, 32'h3FF);
    repeat (3) @(negedge clk);
    check(!irq, "irq cleared");

    // watchdog on timer 4
    wr(PCR_ADDR, 32'h0000_1803);
    wr(TIMER_BASE + 36 + 4, 32'd30);
    wr(TIMER_BASE + 36, 32'h3);
    begin
      int t = 0;
      while (n_wdog == 0 && t < 200) begin @(negedge clk); t++; end
      check(n_wdog > 0, "watchdog reset");
    end
    wr(TIMER_BASE + 36, 32'h0);

    // UARTs, 8 clocks per bit: 0xA5 from UART1 to UART2 and back
    wr(UART1_BASE + 12, 32'h0003_0008);
    wr(UART2_BASE + 12, 32'h0003_0008);
    wr(UART2_BASE + 16, 32'h1);
    wr(UART1_BASE + 16, 32'h1);
    wr(INTC_BASE + 4, 32'h030);
    wr(UART1_BASE + 0, 32'h0000_00A5);
    begin
      int t = 0;
      do begin rd(UART2_BASE + 8, d); t++; end while (!d[0] && t < 100);
    end
    rd(UART2_BASE + 4, d);  check(d == 32'hA5, $sformatf("UART2 received %h", d));
    wr(UART2_BASE + 0, 32'h0000_00A5);
    begin
      int t = 0;
      do begin rd(UART1_BASE + 8, d); t++; end while (!d[0] && t < 100);
    end
    rd(UART1_BASE + 4, d);  check(d == 32'hA5, $sformatf("UART1 received %h", d));
    rd(INTC_BASE, d);  check(d[5:4] == 2'b11, "UART interrupts pending");

    // ACE devices
    for (int n = 0; n < 4; n++) begin
      logic [31:0] a;
      a = ACE_BASE + 32'(n) * 32'h4_0000 + 32'h10;
      rd(a, d);  check(d == 32'(n * 256 + 4), $sformatf("ACE %0d read", n));
      wr(a, 32'h0000_1553);
      rd(a, d);  check(d == 32'h1553, $sformatf("ACE %0d write", n));
    end
    ace_int = 4'b0100; @(negedge clk); ace_int = 0;
    rd(INTC_BASE, d);  check(d[8], "ACE 3 interrupt pending");

    // data cache off: more dirty evictions first, then uncached reads see
    // the written-back data of every evicted block
    for (int k = 0; k < 3; k++) begin
      rd(32'h1040_0000 + 32'(k) * 32'h4000 + 32'h1230, d);
      rd(32'h1040_0000 + 32'(k) * 32'h4000 + 32'h1230 + 32'h4_0000, d);
    end
    wr(PCR_ADDR, 32'h0000_1002);
    begin
      int bad = 0, seen = 0;
      foreach (ref_mem[k]) begin
        logic [31:0] a;
        a = {k, 2'b00};
        if (a[13:4] == 10'h123) begin
          seen++;
          if (u_mem.peek(a) != ref_mem[k]) bad++;
        end
      end
      check(seen > 0 && bad == 0, $sformatf("written-back blocks in memory: %0d bad of %0d", bad, seen));
    end

    // SECDED on bank 1: a stored single-bit error is corrected on the way
    // in, a double-bit error is flagged, and a byte store is merged
    wr(PCR_ADDR, 32'h0000_1012);
    wr(32'h1000_0040, 32'h0BAD_F00D);
    rd(32'h1000_0040, d);
    @(posedge clk); #1;
    check(d == 32'h0BAD_F00D && n_ce == 0 && n_ue == 0, "SECDED clean read");
    u_mem.corrupt(32'h1000_0040, 32'h0000_0400);
    rd(32'h1000_0040, d);
    @(posedge clk); #1;
    check(d == 32'h0BAD_F00D && n_ce == 1, "SECDED single error corrected");
    u_mem.corrupt(32'h1000_0040, 32'h0100_0000);
    rd(32'h1000_0040, d);
    @(posedge clk); #1;
    check(n_ue == 1, "SECDED double error flagged");
    wr(32'h1000_0044, 32'h1234_5678);
    @(negedge clk); dm_req = 1; dm_we = 1; dm_be = 4'b0010;
    dm_addr = 32'h1000_0044; dm_wdata = 32'h0000_AB00;
    do @(negedge clk); while (!dm_ready);
    dm_req = 0; dm_we = 0;
    @(posedge clk); #1;
    rd(32'h1000_0044, d);
    @(posedge clk); #1;
    check(d == 32'h1234_AB78 && n_ce == 1 && n_ue == 1, "SECDED byte store merged");
    wr(PCR_ADDR, 32'h0000_1002);

    // every mechanism happened
    check(n_uc_fetch > 0,    "uncached fetch happened");
    check(n_uc_data > 0,     "uncached data access happened");
    check(n_apb > 0,         "APB access happened");
    check(n_ws > 0,          "wait states happened");
    check(n_icache_hit > 0,  "icache hit happened");
    check(n_icache_miss > 0, "icache miss happened");
    check(n_dcache_hit > 0,  "dcache hit happened");
    check(n_dcache_miss > 0, "dcache miss happened");
    check(n_wb > 0,          "dcache write-back happened");
    check(n_perr > 0,        "parity error happened");
    check(n_timer_int > 0,   "timer interrupt happened");
    check(n_irq > 0,         "irq happened");
    check(n_wdog > 0,        "watchdog reset happened");
    check(n_uart_rx > 0,     "UART interrupt happened");
    check(n_ace == 12,       "ACE accesses happened");
    check(n_ce > 0 && n_ue > 0, "SECDED correction happened");
    $display("uc_fetch=%0d uc_data=%0d apb=%0d ic_hit=%0d ic_miss=%0d dc_hit=%0d dc_miss=%0d wb=%0d perr=%0d timer_int=%0d irq=%0d wdog=%0d uart_int=%0d ace=%0d secded_ce=%0d secded_ue=%0d",
             n_uc_fetch, n_uc_data, n_apb, n_icache_hit, n_icache_miss,
             n_dcache_hit, n_dcache_miss, n_wb, n_perr, n_timer_int, n_irq,
             n_wdog, n_uart_rx, n_ace, n_ce, n_ue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
