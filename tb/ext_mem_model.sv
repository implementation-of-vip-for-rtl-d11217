// ext_mem_model: behavioural model of the external memory banks.
// Behavioural model for simulation only. Any chip select with oe reads the
// word at addr (a written value, else tb_pkg::mem_init(addr)) without delay;
// with we the enabled bytes are written at every clock edge of the access.
// The number of the bus interface's wait states decides when data are used.
// Counts completed word accesses seen (rising edges of a chip select).
// Seven SECDED check bits are stored beside each word (written with wcheck,
// read on rcheck; a never-written word has the check bits of its initial
// value); corrupt() flips stored data bits to inject errors.
module ext_mem_model (
  input  logic        clk,
  input  logic [7:0]  cs,
  input  logic [31:0] addr,
  input  logic        oe,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [6:0]  wcheck,
  output logic [6:0]  rcheck,
  output int          n_reads,
  output int          n_writes
);
  logic [31:0] mem [logic [29:0]];
  logic [6:0]  chk [logic [29:0]];
  logic        active_q = 1'b0;

  always @* begin
    rdata = '0;
    if (cs != 8'd0 && oe)
      rdata = mem.exists(addr[31:2]) ? mem[addr[31:2]] : tb_pkg::mem_init(addr);
    rcheck = chk.exists(addr[31:2]) ? chk[addr[31:2]]
                                    : tb_pkg::secded_check(tb_pkg::mem_init(addr));
  end

  initial begin n_reads = 0; n_writes = 0; end

  always @(posedge clk) begin
    active_q <= cs != 8'd0;
    if (cs != 8'd0 && !active_q) begin
      if (we) n_writes <= n_writes + 1;
      else    n_reads  <= n_reads + 1;
    end
    if (cs != 8'd0 && we) begin
      logic [31:0] w;
      w = mem.exists(addr[31:2]) ? mem[addr[31:2]] : tb_pkg::mem_init(addr);
      for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = wdata[8*b +: 8];
      mem[addr[31:2]] = w;
      chk[addr[31:2]] = wcheck;
    end
  end

  function automatic void corrupt(input logic [31:0] a, input logic [31:0] mask);
    if (!chk.exists(a[31:2])) chk[a[31:2]] = tb_pkg::secded_check(peek(a));
    mem[a[31:2]] = peek(a) ^ mask;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : tb_pkg::mem_init(a);
  endfunction
endmodule
