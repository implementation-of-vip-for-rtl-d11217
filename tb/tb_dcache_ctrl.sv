// tb_dcache_ctrl: self-checking test of the copy-back data cache at its
// full 32 KB size. The testbench answers the miss FSM like the AHB master
// and keeps its own copy of external memory. Checks load data against a
// reference memory, hit/miss/write-back behaviour against an independent
// two-way LRU model with dirty bits, that store hits make no memory traffic,
// write allocate on a store miss, the hit and miss latencies, and that a
// corrupted data word and a corrupted tag raise the parity error, and that
// a 32 KB array, once written, reads back without a single miss.
module tb_dcache_ctrl;
  import amba_pkg::*;

  localparam int SETS = 1024;
  localparam int LAT  = 1;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        req = 0, we = 0, ready, stall, perr, hit, miss, wb, mfc_ack;
  logic [3:0]  be = 4'hF;
  logic [31:0] addr = 0, wdata = 0, rdata, mfc_rdata;
  mfc_req_t    mfc;

  dcache_ctrl dut (.clk, .rst_n, .req, .we, .be, .addr, .wdata, .ready,
                   .rdata, .stall, .parity_err(perr), .mfc, .mfc_ack,
                   .mfc_rdata, .hit_o(hit), .miss_o(miss), .writeback_o(wb));

  // external memory behind the AHB master
  logic [31:0] ext [logic [29:0]];
  function automatic logic [31:0] ext_rd(input logic [31:0] a);
    return ext.exists(a[31:2]) ? ext[a[31:2]] : tb_pkg::mem_init(a);
  endfunction
  logic busy = 0; int cnt = 0; int mem_writes = 0, mem_reads = 0;
  assign mfc_ack   = busy && cnt == 0;
  assign mfc_rdata = ext_rd(mfc.addr);
  always @(posedge clk) begin
    if (busy) begin
      if (cnt == 0) begin
        busy <= 0;
        if (mfc.we) begin ext[mfc.addr[31:2]] = mfc.wdata; mem_writes++; end
        else mem_reads++;
      end else cnt <= cnt - 1;
    end else if (mfc.wait_for_mfc) begin
      busy <= 1; cnt <= LAT;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference: architectural memory and a two-way LRU model with dirty bits
  logic [31:0] ref_mem [logic [29:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a[31:2]) ? ref_mem[a[31:2]] : tb_pkg::mem_init(a);
  endfunction
  logic [17:0] m_tag [SETS][2];
  logic        m_val [SETS][2], m_dirty [SETS][2];
  logic        m_lru [SETS];
  // returns 0 hit, 1 clean miss, 2 dirty miss
  function automatic int model_access(input logic [31:0] a, input bit st);
    int s; logic [17:0] t; int v;
    s = int'(a[13:4]); t = a[31:14];
    for (int w = 0; w < 2; w++)
      if (m_val[s][w] && m_tag[s][w] == t) begin
        m_lru[s] = ~w[0];
        if (st) m_dirty[s][w] = 1'b1;
        return 0;
      end
    v = !m_val[s][0] ? 0 : (!m_val[s][1] ? 1 : int'(m_lru[s]));
    model_access = (m_val[s][v] && m_dirty[s][v]) ? 2 : 1;
    m_val[s][v] = 1'b1; m_tag[s][v] = t; m_lru[s] = ~v[0]; m_dirty[s][v] = st;
  endfunction

  int hits = 0, clean_miss = 0, dirty_miss = 0, perrs = 0;
  always @(posedge clk) if (perr) perrs++;

  task automatic access(input bit st, input logic [3:0] ben,
                        input logic [31:0] a, input logic [31:0] d,
                        input string what);
    int cyc, kind, w0;
    kind = model_access(a, st);
    w0 = mem_writes;
    @(negedge clk); req = 1; we = st; be = ben; addr = a; wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!ready && cyc < 200);
    if (st) begin
      logic [31:0] n;
      n = ref_rd(a);
      for (int b = 0; b < 4; b++) if (ben[b]) n[8*b +: 8] = d[8*b +: 8];
      ref_mem[a[31:2]] = n;
    end else begin
      check(rdata == ref_rd(a), $sformatf("%s: load %h got %h exp %h", what, a, rdata, ref_rd(a)));
    end
    case (kind)
      0: begin hits++;
         check(cyc == 1, $sformatf("%s: hit took %0d", what, cyc)); end
      1: begin clean_miss++;
         check(cyc == 4 * (LAT + 2) + 3, $sformatf("%s: clean miss took %0d", what, cyc)); end
      default: begin dirty_miss++;
         check(cyc == 4 * (LAT + 3) + 4 * (LAT + 2) + 3,
               $sformatf("%s: dirty miss took %0d", what, cyc)); end
    endcase
    @(negedge clk);
    check(mem_writes - w0 == (kind == 2 ? 4 : 0),
          $sformatf("%s: %0d words written back", what, mem_writes - w0));
    req = 0; we = 0;
  endtask

  initial begin
    repeat (160000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin
      m_val[s][0] = 0; m_val[s][1] = 0; m_lru[s] = 0;
      m_dirty[s][0] = 0; m_dirty[s][1] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (dut.state != dut.S_IDLE) @(negedge clk);

    // load miss, store hit (no memory traffic), load sees the store
    access(0, 4'hF, 32'h0000_2000, 0, "load miss");
    access(1, 4'hF, 32'h0000_2004, 32'h1234_5678, "store hit");
    access(0, 4'hF, 32'h0000_2004, 0, "load after store");
    // store miss: write allocate, partial word
    access(1, 4'b0011, 32'h0000_3008, 32'hFFFF_BEEF, "store miss");
    access(0, 4'hF, 32'h0000_3008, 0, "load allocated");
    check(ext_rd(32'h0000_3008) == tb_pkg::mem_init(32'h0000_3008),
          "copy back: memory not yet updated");
    // evict dirty blocks: same set as 0x2000 (set 0x200)
    access(0, 4'hF, 32'h0001_2000, 0, "fill way 2");
    access(0, 4'hF, 32'h0002_2000, 0, "evict dirty 0x2000");
    check(ext_rd(32'h0000_2004) == 32'h1234_5678, "written back data");
    access(0, 4'hF, 32'h0000_2004, 0, "reload written back");

    // parity: corrupt a cached data word, then a tag entry
    access(0, 4'hF, 32'h0000_5010, 0, "fresh set");
    begin
      int p0;
      p0 = perrs;
      dut.g_way[0].u_data.mem[{10'h101, 2'd0}][7] ^= 1'b1;
      access(0, 4'hF, 32'h0000_5014, 0, "other word, no error");
      check(perrs == p0, "no parity error on a clean word");
      @(negedge clk); req = 1; addr = 32'h0000_5010; we = 0;
      while (!ready) @(negedge clk);
      req = 0;
      @(negedge clk);
      check(perrs == p0 + 1, "parity error on the corrupted word");
      ref_mem[32'h0000_5010 >> 2] = tb_pkg::mem_init(32'h0000_5010) ^ 32'h80;
      void'(model_access(32'h0000_5010, 0));
      p0 = perrs;
      dut.g_way[0].u_tag.mem[10'h101][3] ^= 1'b1;
      @(negedge clk); req = 1; addr = 32'h0000_5018; we = 0;
      while (!ready) @(negedge clk);
      req = 0;
      @(negedge clk);
      check(perrs == p0 + 1, "parity error on the corrupted tag");
    end

    // random loads and stores over 8 sets x 8 tags
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      a = {10'($urandom_range(0, 7)) + 10'd16, 8'h00, 3'($urandom_range(0, 7)),
           7'h00, 2'($urandom), 2'b00};
      access($urandom_range(0, 2) == 0, 4'($urandom_range(1, 15)), a,
             $urandom, "random");
    end
    // capacity: a 32 KB array written word by word, then read back; the
    // read pass must hit on every word
    for (int i = 0; i < 8192; i++)
      access(1, 4'hF, 32'h0080_0000 + 32'(4 * i), 32'(i) * 32'h9E37_79B9, "array store");
    begin
      int m0;
      m0 = clean_miss + dirty_miss;
      for (int i = 0; i < 8192; i++)
        access(0, 4'hF, 32'h0080_0000 + 32'(4 * i), 0, "array load");
      check(clean_miss + dirty_miss == m0,
            $sformatf("32 KB held: %0d misses on read-back", clean_miss + dirty_miss - m0));
    end

    check(hits > 50 && clean_miss > 20 && dirty_miss > 20, "all access kinds exercised");
    $display("hits=%0d clean_miss=%0d dirty_miss=%0d", hits, clean_miss, dirty_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
