// tb_icache_ctrl: self-checking test of the instruction cache at its full
// 32 KB size. The testbench answers the miss FSM like the AHB master (each
// word LAT+1 cycles plus one idle cycle) with data from tb_pkg::mem_init.
// Checks instruction data, hit/miss against an independent two-way LRU
// model, the hit latency (ready one cycle after the request) and the miss
// latency (four word transfers plus tag write and completion), and that a
// 32 KB program, once fetched, runs a second time without a single miss.
module tb_icache_ctrl;
  import amba_pkg::*;

  localparam int SETS = 1024;
  localparam int LAT  = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        req = 0, ready, stall, hit, miss, mfc_ack;
  logic [31:0] addr = 0, rdata, mfc_rdata;
  mfc_req_t    mfc;

  icache_ctrl dut (.clk, .rst_n, .req, .addr, .ready, .rdata, .stall,
                   .mfc, .mfc_ack, .mfc_rdata, .hit_o(hit), .miss_o(miss));

  // memory side: like the AHB master
  logic busy = 0; int cnt = 0; int words = 0;
  logic [31:0] word_addr [$];
  assign mfc_ack   = busy && cnt == 0;
  assign mfc_rdata = tb_pkg::mem_init(mfc.addr);
  always @(posedge clk) begin
    if (busy) begin
      if (cnt == 0) begin busy <= 0; words <= words + 1; word_addr.push_back(mfc.addr); end
      else cnt <= cnt - 1;
    end else if (mfc.wait_for_mfc) begin
      busy <= 1; cnt <= LAT;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference model: per set two tags, valid bits and an LRU way
  logic [17:0] m_tag [SETS][2];
  logic        m_val [SETS][2];
  logic        m_lru [SETS];      // way to evict next
  function automatic bit model_access(input logic [31:0] a);
    int s; logic [17:0] t;
    s = int'(a[13:4]); t = a[31:14];
    for (int w = 0; w < 2; w++)
      if (m_val[s][w] && m_tag[s][w] == t) begin
        m_lru[s] = ~w[0];
        return 1'b1;
      end
    begin
      int v;
      v = !m_val[s][0] ? 0 : (!m_val[s][1] ? 1 : int'(m_lru[s]));
      m_val[s][v] = 1'b1; m_tag[s][v] = t; m_lru[s] = ~v[0];
    end
    return 1'b0;
  endfunction

  int hits = 0, misses = 0;
  task automatic fetch(input logic [31:0] a, input string what);
    int cyc; bit exp_hit; int w0;
    exp_hit = model_access(a);
    w0 = words;
    @(negedge clk); req = 1; addr = a; cyc = 0;
    do begin
      @(negedge clk); cyc++;
      if (!ready) check(stall, "stall while waiting");
    end while (!ready && cyc < 200);
    check(rdata == tb_pkg::mem_init(a),
          $sformatf("%s: data %h for %h", what, rdata, a));
    if (exp_hit) begin
      hits++;
      check(cyc == 1, $sformatf("%s: hit took %0d cycles", what, cyc));
    end else begin
      misses++;
      check(cyc == 4 * (LAT + 2) + 3,
            $sformatf("%s: miss took %0d cycles", what, cyc));
      check(words - w0 == 4, $sformatf("%s: block of 4 words", what));
      for (int i = 0; i < 4; i++)
        check(word_addr[word_addr.size() - 4 + i] ==
              {a[31:4], 4'h0} + 32'(4 * i), $sformatf("%s: word order", what));
    end
    req = 0;
  endtask

  int n_hit_pulses = 0, n_miss_pulses = 0;
  always @(posedge clk) begin
    if (hit)  n_hit_pulses++;
    if (miss) n_miss_pulses++;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin
      m_val[s][0] = 0; m_val[s][1] = 0; m_lru[s] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the clearing sweep takes one cycle per set
    @(negedge clk); req = 1; addr = 32'h0000_1000;
    begin
      int c = 0;
      while (dut.state != dut.S_IDLE) begin @(negedge clk); c++; end
      check(c >= SETS - 2 && c <= SETS, $sformatf("clear sweep %0d cycles", c));
    end
    req = 0;

    // compulsory miss, then hits in the same block
    fetch(32'h0000_1000, "first");
    fetch(32'h0000_1004, "same block");
    fetch(32'h0000_100C, "same block end");

    // three blocks on one set: LRU keeps the most recently used
    fetch(32'h0001_0040, "A");      // set 4
    fetch(32'h0002_0040, "B");
    fetch(32'h0001_0044, "A again");
    fetch(32'h0003_0040, "C evicts B");
    fetch(32'h0001_0048, "A still there");
    fetch(32'h0002_0040, "B missed");

    // random fetches over 64 blocks sharing 8 sets
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a;
      a = {10'($urandom_range(0, 7)), 8'h00, 3'($urandom_range(0, 7)), 7'h00,
           2'($urandom), 2'b00};
      fetch(a, "random");
    end

    // capacity: a 32 KB program (8192 instructions) run twice; the second
    // pass must not miss at all
    for (int i = 0; i < 8192; i++)
      fetch(32'h0040_0000 + 32'(4 * i), "program pass 1");
    begin
      int m0;
      m0 = misses;
      for (int i = 0; i < 8192; i++)
        fetch(32'h0040_0000 + 32'(4 * i), "program pass 2");
      check(misses == m0, $sformatf("8192 instructions held: %0d misses in pass 2", misses - m0));
    end

    @(posedge clk); #1;
    check(n_hit_pulses == hits && n_miss_pulses == misses, "hit/miss pulse counts");
    check(hits > 50 && misses > 20, "both hits and misses exercised");
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
