// tb_apb_bridge: self-checking test of the AHB-to-APB bridge.
// Seven register-file slaves stand on the APB (one of them inserts wait
// states); four ACE devices are modelled by ace_model. Checks the address
// decoding to the one-hot select and the offset inside each peripheral,
// the SETUP/ACCESS sequence, write data and read data, the access time
// (two cycles for a register, longer while the ACE is not ready), the
// configuration registers and unmapped addresses.
module tb_apb_bridge;
  import amba_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  logic        hsel_apb = 0, hwrite = 0, hready_apb;
  logic [31:0] haddr = 0, hwdata = 0, hrdata_apb;
  logic [NUM_APB_SLAVES-1:0] psel, pready;
  apb_req_t    apb;
  logic [31:0] prdata [NUM_APB_SLAVES];
  logic [3:0]  ace_cs;
  logic [15:0] ace_addr, ace_wdata, ace_rdata;
  logic        ace_rd_wr, ace_ready;
  logic [31:0] pcr, mcr;
  int          n_ace;

  apb_bridge dut (.*);
  ace_model #(.LATENCY(4)) u_ace (.clk, .ace_cs, .ace_addr, .ace_rd_wr,
                                  .ace_wdata, .ace_rdata, .ace_ready,
                                  .n_access(n_ace));

  // APB slaves: 16 registers each; slave 2 (UART2) waits 3 cycles
  logic [31:0] sregs [NUM_APB_SLAVES][16];
  int          wcnt  [NUM_APB_SLAVES];
  int          protocol_err = 0;
  for (genvar s = 0; s < NUM_APB_SLAVES; s++) begin : g_slv
    assign pready[s] = (s == 2) ? (wcnt[s] >= 3) : 1'b1;
    assign prdata[s] = (psel[s] && !apb.pwrite) ? sregs[s][apb.paddr[5:2]] : 32'd0;
    initial begin
      wcnt[s] = 0;
      for (int i = 0; i < 16; i++) sregs[s][i] = 32'(s * 256 + i);
    end
    always @(posedge clk) begin
      if (psel[s] && apb.penable) begin
        if (pready[s]) begin
          wcnt[s] <= 0;
          if (apb.pwrite) sregs[s][apb.paddr[5:2]] <= apb.pwdata;
        end else wcnt[s] <= wcnt[s] + 1;
      end
    end
  end
  // a select must come one cycle before penable
  logic [NUM_APB_SLAVES-1:0] psel_q = '0;
  logic pen_q = 0;
  always @(posedge clk) begin
    psel_q <= psel; pen_q <= apb.penable;
    if (apb.penable && !pen_q && psel_q != psel) protocol_err++;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ahb(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int cyc,
                     output logic [NUM_APB_SLAVES-1:0] sel_seen,
                     output logic [11:0] off_seen);
    @(negedge clk); hsel_apb = 1; hwrite = wr; haddr = a; hwdata = wd; cyc = 0;
    sel_seen = '0; off_seen = '0;
    do begin
      @(negedge clk); cyc++;
      if (psel != 0) begin sel_seen = psel; off_seen = apb.paddr; end
    end while (!hready_apb && cyc < 50);
    rd = hrdata_apb;
    @(posedge clk); #1 hsel_apb = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] a; int slv; logic [11:0] off; } map_t;
  map_t map [10];

  initial begin
    logic [31:0] d; int cyc; logic [NUM_APB_SLAVES-1:0] sel; logic [11:0] off;
    map[0] = '{32'hE000_0010, 0, 12'h0};  map[1] = '{32'hE000_0014, 0, 12'h4};
    map[2] = '{32'hE000_0020, 1, 12'h0};  map[3] = '{32'hE000_0024, 1, 12'h4};
    map[4] = '{32'hE000_0048, 3, 12'h8};  map[5] = '{32'hE000_0054, 4, 12'h8};
    map[6] = '{32'hE000_0058, 5, 12'h0};  map[7] = '{32'hE000_006C, 6, 12'h8};
    map[8] = '{32'hE000_0080, 2, 12'h0};  map[9] = '{32'hE000_0090, 2, 12'h10};
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(pcr == 0 && mcr == 32'hFFFF_FFFF, "configuration reset values");

    foreach (map[i]) begin
      ahb(0, map[i].a, 0, d, cyc, sel, off);
      check(sel == (1 << map[i].slv), $sformatf("%h selects slave %0d (psel %b)", map[i].a, map[i].slv, sel));
      check(off == map[i].off, $sformatf("%h offset %h", map[i].a, off));
      check(d == 32'(map[i].slv * 256 + map[i].off / 4), $sformatf("%h read %h", map[i].a, d));
      check(cyc == (map[i].slv == 2 ? 5 : 2), $sformatf("%h took %0d cycles", map[i].a, cyc));
      ahb(1, map[i].a, 32'hC0DE_0000 + 32'(i), d, cyc, sel, off);
      check(sregs[map[i].slv][map[i].off[5:2]] == 32'hC0DE_0000 + 32'(i),
            $sformatf("%h write", map[i].a));
    end

    // configuration registers
    ahb(1, 32'hE000_0000, 32'hFFFF_1803, d, cyc, sel, off);
    check(sel == 0 && pcr == 32'h0000_1803, $sformatf("PCR write %h", pcr));
    ahb(0, 32'hE000_0000, 0, d, cyc, sel, off);
    check(d == 32'h0000_1803 && cyc == 2, "PCR read");
    ahb(1, 32'hE000_0004, 32'h1234_5678, d, cyc, sel, off);
    ahb(0, 32'hE000_0004, 0, d, cyc, sel, off);
    check(mcr == 32'h1234_5678 && d == 32'h1234_5678, "MCR write and read");

    // ACE: chip select, word address, wait for ready
    for (int n = 0; n < 4; n++) begin
      logic [31:0] a;
      a = 32'hE010_0000 + 32'(n) * 32'h4_0000 + 32'h0000_0028;
      ahb(0, a, 0, d, cyc, sel, off);
      check(d == 32'(n * 256 + 10), $sformatf("ACE %0d read %h", n, d));
      check(cyc == 1 + 4, $sformatf("ACE read waits for ready: %0d cycles", cyc));
      ahb(1, a, 32'h0000_BEEF, d, cyc, sel, off);
      check(u_ace.regs[n][10] == 16'hBEEF, $sformatf("ACE %0d write", n));
    end
    check(n_ace == 8, "ACE access count");

    // unmapped addresses finish at once and read zero
    ahb(0, 32'hE000_0070, 0, d, cyc, sel, off);
    check(d == 0 && sel == 0 && cyc == 2, "unmapped address");
    check(protocol_err == 0, "select before enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
