// tb_ahb_master: self-checking test of the AHB master FSM.
// Drives uncached fetches, loads and stores, an instruction-cache and a
// data-cache block transfer (the testbench plays the caches' miss FSMs) and
// APB accesses (the testbench answers as the bridge). Checks data, the
// chip select of each bank, the number of cycles per access (wait states of
// the bank + 1) and the request priority.
module tb_ahb_master;
  import amba_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic [31:0] mcr;
  logic        if_req = 0, if_ready;
  logic [31:0] if_addr = 0, if_rdata;
  logic        dm_req = 0, dm_we = 0, dm_ready;
  logic [3:0]  dm_be = 4'hF;
  logic [31:0] dm_addr = 0, dm_wdata = 0, dm_rdata;
  mfc_req_t    ic_mfc, dc_mfc;
  logic        ic_mfc_ack, dc_mfc_ack;
  logic [31:0] mfc_rdata;
  logic        hsel_apb, hwrite, hready_apb;
  logic [31:0] haddr, hwdata, hrdata_apb;
  logic [7:0]  mem_cs;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_oe, mem_we;
  logic [3:0]  mem_be;
  logic [2:0]  state;
  int          n_reads, n_writes;
  logic [7:0]  secded_en = 8'h00;
  logic [6:0]  mem_wcheck, mem_rcheck;
  logic        secded_ce, secded_ue;
  int          n_ce = 0, n_ue = 0;
  always @(posedge clk) begin
    if (secded_ce) n_ce++;
    if (secded_ue) n_ue++;
  end

  ahb_master dut (.*, .state_o(state));
  ext_mem_model u_mem (.clk, .cs(mem_cs), .addr(mem_addr), .oe(mem_oe),
                       .we(mem_we), .be(mem_be), .wdata(mem_wdata),
                       .rdata(mem_rdata), .wcheck(mem_wcheck),
                       .rcheck(mem_rcheck), .n_reads, .n_writes);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bank b has b+1 wait states, bank 7 (internal RAM) none
  localparam logic [31:0] MCR_VAL = 32'h0765_4321;
  function automatic int ws_of(input logic [31:0] a);
    return int'(MCR_VAL[4*a[30:28] +: 4]);
  endfunction

  // APB responder: answers hready_apb two cycles after hsel_apb rises
  int apb_cnt = 0;
  logic [31:0] apb_last_addr, apb_last_wdata;
  logic        apb_last_write;
  int          apb_writes = 0;
  always @(posedge clk) begin
    if (hsel_apb && !hready_apb) apb_cnt <= apb_cnt + 1;
    else apb_cnt <= 0;
    if (hsel_apb && hready_apb) begin
      apb_last_addr  <= haddr;
      apb_last_write <= hwrite;
      apb_last_wdata <= hwdata;
      if (hwrite) apb_writes <= apb_writes + 1;
    end
  end
  assign hready_apb = hsel_apb && apb_cnt == 2;
  assign hrdata_apb = hsel_apb ? ~haddr : 32'd0;

  // cache miss FSM stand-ins
  logic        ic_active = 0, dc_active = 0, dc_wr = 0;
  logic [31:0] ic_base = 0, dc_base = 0;
  int          ic_w = 0, dc_w = 0;
  logic [31:0] ic_words [4];
  logic        ic_done = 0, dc_done = 0;
  always_comb begin
    ic_mfc = '0;
    ic_mfc.wait_for_mfc    = ic_active && ic_w < 4;
    ic_mfc.addr            = ic_base + 32'(4 * ic_w);
    ic_mfc.access_complete = ic_active && ic_w == 4;
    dc_mfc = '0;
    dc_mfc.wait_for_mfc    = dc_active && dc_w < 4;
    dc_mfc.we              = dc_wr;
    dc_mfc.addr            = dc_base + 32'(4 * dc_w);
    dc_mfc.wdata           = 32'hD000_0000 + 32'(dc_w);
    dc_mfc.access_complete = dc_active && dc_w == 4;
  end
  always @(posedge clk) begin
    if (ic_active) begin
      if (ic_mfc_ack) begin ic_words[ic_w] <= mfc_rdata; ic_w <= ic_w + 1; end
      if (ic_w == 4) begin ic_active <= 0; ic_done <= 1; end
    end
    if (dc_active) begin
      if (dc_mfc_ack) dc_w <= dc_w + 1;
      if (dc_w == 4) begin dc_active <= 0; dc_done <= 1; end
    end
  end

  // chip-select check on every external access
  int cs_errors = 0;
  always @(negedge clk)
    if (mem_cs != 0 && mem_cs != (8'd1 << mem_addr[30:28])) cs_errors++;

  task automatic fetch(input logic [31:0] a, output logic [31:0] d,
                       output int cyc);
    @(negedge clk); if_req = 1; if_addr = a; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!if_ready && cyc < 100);
    d = if_rdata; if_req = 0;
    @(posedge clk); #1;   // let the end-of-access pulses be counted
  endtask

  task automatic data(input logic we, input logic [3:0] be,
                      input logic [31:0] a, input logic [31:0] wd,
                      output logic [31:0] d, output int cyc);
    @(negedge clk); dm_req = 1; dm_we = we; dm_be = be; dm_addr = a;
    dm_wdata = wd; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!dm_ready && cyc < 100);
    d = dm_rdata; dm_req = 0; dm_we = 0;
    @(posedge clk); #1;   // let the end-of-access pulses be counted
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] e_dummy(input logic [31:0] a);
    return u_mem.peek(a);
  endfunction

  initial begin
    logic [31:0] d;
    int cyc, t0;
    mcr = MCR_VAL;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // uncached fetches from three banks: latency = wait states + 1
    for (int b = 0; b < 8; b += 3) begin
      logic [31:0] a;
      a = {1'b0, 3'(b), 28'h000_0100} + 32'(4 * b);
      fetch(a, d, cyc);
      check(d == tb_pkg::mem_init(a), $sformatf("fetch data bank %0d", b));
      check(cyc == ws_of(a) + 1,
            $sformatf("fetch bank %0d took %0d cycles, expected %0d", b, cyc, ws_of(a) + 1));
    end

    // uncached store with byte enables, then load back
    data(1, 4'b0101, 32'h1000_0040, 32'hAABB_CCDD, d, cyc);
    check(cyc == ws_of(32'h1000_0040) + 1, "store latency");
    data(0, 4'hF, 32'h1000_0040, 0, d, cyc);
    begin
      logic [31:0] e;
      e = tb_pkg::mem_init(32'h1000_0040);
      e[7:0] = 8'hDD; e[23:16] = 8'hBB;
      check(d == e, $sformatf("load after byte store: %h vs %h", d, e));
    end
    check(cyc == ws_of(32'h1000_0040) + 1, "load latency");

    // instruction cache block fill: four reads, then back to idle
    @(negedge clk); ic_base = 32'h2000_0200; ic_w = 0; ic_active = 1;
    t0 = 0;
    while (!ic_done && t0 < 100) begin @(negedge clk); t0++; end
    for (int w = 0; w < 4; w++)
      check(ic_words[w] == tb_pkg::mem_init(32'h2000_0200 + 32'(4*w)),
            $sformatf("icache fill word %0d", w));
    // per word: 1 start + (ws + 1) access cycles, plus the exit
    check(t0 == 4 * (ws_of(32'h2000_0200) + 2) + 2,
          $sformatf("icache block fill took %0d cycles", t0));
    @(negedge clk);
    check(state == 3'd0, "idle after icache access complete");

    // data cache block write-back: four writes land in memory
    @(negedge clk); dc_base = 32'h3000_0400; dc_w = 0; dc_wr = 1; dc_active = 1;
    t0 = 0;
    while (!dc_done && t0 < 100) begin @(negedge clk); t0++; end
    for (int w = 0; w < 4; w++)
      check(u_mem.peek(32'h3000_0400 + 32'(4*w)) == 32'hD000_0000 + 32'(w),
            $sformatf("dcache write-back word %0d", w));

    // peripheral accesses go to the APB bridge, not to memory
    begin
      int r0;
      r0 = n_reads;
      data(0, 4'hF, 32'hE000_0048, 0, d, cyc);
      check(d == ~32'hE000_0048, "APB read data");
      check(cyc == 3, $sformatf("APB read took %0d cycles", cyc));
      data(1, 4'hF, 32'hE000_0020, 32'hA5, d, cyc);
      @(negedge clk);
      check(apb_last_addr == 32'hE000_0020 && apb_last_write &&
            apb_last_wdata == 32'hA5, "APB write forwarded");
      check(n_reads == r0, "APB access made no memory cycle");
    end

    // priority: a waiting load goes before a waiting fetch
    @(negedge clk);
    if_req = 1; if_addr = 32'h0000_0010; dm_req = 1; dm_we = 0;
    dm_addr = 32'h7000_0020;
    @(negedge clk);
    check(state == 3'd2, "data access wins over fetch");
    while (!dm_ready) @(negedge clk);
    check(dm_rdata == tb_pkg::mem_init(32'h7000_0020), "data with fetch waiting");
    dm_req = 0;
    while (!if_ready) @(negedge clk);
    check(if_rdata == tb_pkg::mem_init(32'h0000_0010), "fetch served next");
    if_req = 0;

    // SECDED on bank 2 (3 wait states)
    secded_en = 8'h04;
    data(1, 4'hF, 32'h2000_0100, 32'h1357_9BDF, d, cyc);
    data(0, 4'hF, 32'h2000_0100, 0, d, cyc);
    check(d == 32'h1357_9BDF && n_ce == 0 && n_ue == 0, "protected word, no error");
    u_mem.corrupt(32'h2000_0100, 32'h0001_0000);
    data(0, 4'hF, 32'h2000_0100, 0, d, cyc);
    check(d == 32'h1357_9BDF, $sformatf("single error corrected: %h", d));
    check(n_ce == 1 && n_ue == 0, "single error reported");
    u_mem.corrupt(32'h2000_0100, 32'h0001_0101);  // bit 16 restored, two new
    data(0, 4'hF, 32'h2000_0100, 0, d, cyc);
    check(n_ue == 1, "double error reported");
    // a partial store to a protected bank is a read-modify-write
    begin
      logic [31:0] e;
      e = tb_pkg::mem_init(32'h2000_0200);
      e[15:8] = 8'h77;
      data(1, 4'b0010, 32'h2000_0200, 32'h0000_7700, d, cyc);
      check(cyc == 2 * (ws_of(32'h2000_0200) + 1),
            $sformatf("read-modify-write took %0d cycles", cyc));
      check(u_mem.peek(32'h2000_0200) == e, "merged word written");
      data(0, 4'hF, 32'h2000_0200, 0, d, cyc);
      check(d == e && n_ce == 1 && n_ue == 1, "merged word has valid check bits");
    end
    // a fetch through the same bank is corrected too
    u_mem.corrupt(32'h2000_0200, 32'h8000_0000);
    fetch(32'h2000_0200, d, cyc);
    check(n_ce == 2, "fetch error corrected");
    secded_en = 8'h00;
    fetch(32'h2000_0200, d, cyc);
    check(d == (e_dummy(32'h2000_0200)), "unprotected read passes the error through");

    check(cs_errors == 0, "chip select matches bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
