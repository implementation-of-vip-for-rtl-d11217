// ace_model: behavioural model of four MIL-STD-1553 ACE devices as seen by
// the bus interface. Behavioural model for simulation only: each device is a
// 256-word register file; an access (a chip select) is answered with
// ace_ready after LATENCY clocks, writes taking effect then.
module ace_model #(
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic [3:0]  ace_cs,
  input  logic [15:0] ace_addr,
  input  logic        ace_rd_wr,
  input  logic [15:0] ace_wdata,
  output logic [15:0] ace_rdata,
  output logic        ace_ready,
  output int          n_access
);
  logic [15:0] regs [4][256];
  int          cnt = 0;
  logic [1:0]  dev;

  initial begin
    n_access = 0;
    for (int d = 0; d < 4; d++)
      for (int i = 0; i < 256; i++) regs[d][i] = 16'(d * 256 + i);
  end

  always_comb begin
    dev = 2'd0;
    for (int d = 0; d < 4; d++) if (ace_cs[d]) dev = 2'(d);
  end

  assign ace_ready = (ace_cs != 4'd0) && cnt >= LATENCY;
  assign ace_rdata = (ace_cs != 4'd0 && ace_rd_wr) ? regs[dev][ace_addr[7:0]] : 16'd0;

  always @(posedge clk) begin
    if (ace_cs == 4'd0) cnt <= 0;
    else if (ace_ready) begin
      cnt <= 0;
      n_access <= n_access + 1;
      if (!ace_rd_wr) regs[dev][ace_addr[7:0]] <= ace_wdata;
    end else cnt <= cnt + 1;
  end
endmodule
