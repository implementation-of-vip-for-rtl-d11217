// ahb_master: bus master of the processor's bus interface.
//
// One FSM arbitrates the accesses that leave the processor core and turns
// them into external-memory cycles or APB register accesses:
//   INSTR   - instruction fetch with the instruction cache disabled
//   DATA    - load/store with the data cache disabled
//   ICACHE  - instruction cache miss: every word the cache's miss FSM asks
//             for (wait_for_mfc) becomes one external read
//   DCACHE  - data cache miss: write-back and refill words, as above
//   APB_SEL - access to a memory-mapped peripheral through the APB bridge
// This state set and the exits of the cache states (on access_complete) and
// of APB_SEL (on hready_apb) follow the original design. Each external word
// access holds chip select, address and strobes for 1 + N cycles, N being the
// wait states of the addressed bank, read from the memory configuration
// register: the data are taken (or the write completes) in the last cycle,
// when the requester sees its ready/ack pulse. After every word one idle
// cycle follows, in which a cache presents its next word address.
//
// SECDED: every external word carries 7 check bits (secded32). They are
// written with every store. When the addressed bank's enable bit is set,
// read data are corrected before they reach the pipeline or a cache and
// secded_ce / secded_ue pulse on a single / double error; a store of fewer
// than four bytes to such a bank becomes a read-modify-write (two accesses)
// so that the check bits always cover the whole word.
//
// Own choices: one clock (the original FSM runs on a doubled clock), active
// high chip selects, bank = addr[30:28] with 4-bit wait-state fields at
// mcr[4*bank +: 4], and the fixed priority dcache miss > memory stage >
// icache miss > fetch when several requests wait in IDLE.
module ahb_master
  import amba_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] mcr,          // memory configuration (wait states)
  // fetch stage, instruction cache disabled
  input  logic        if_req,
  input  logic [31:0] if_addr,
  output logic        if_ready,
  output logic [31:0] if_rdata,
  // memory stage, uncached data or peripheral access
  input  logic        dm_req,
  input  logic        dm_we,
  input  logic [3:0]  dm_be,
  input  logic [31:0] dm_addr,
  input  logic [31:0] dm_wdata,
  output logic        dm_ready,
  output logic [31:0] dm_rdata,
  // instruction / data cache miss FSMs
  input  mfc_req_t    ic_mfc,
  output logic        ic_mfc_ack,
  input  mfc_req_t    dc_mfc,
  output logic        dc_mfc_ack,
  output logic [31:0] mfc_rdata,
  // AHB side of the APB bridge
  output logic        hsel_apb,
  output logic [31:0] haddr,
  output logic        hwrite,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata_apb,
  input  logic        hready_apb,
  // external memory
  output logic [7:0]  mem_cs,
  output logic [31:0] mem_addr,
  output logic        mem_oe,
  output logic        mem_we,
  output logic [3:0]  mem_be,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // SECDED check bits stored beside every external word
  input  logic [7:0]  secded_en,    // per bank (7 = internal RAM)
  output logic [6:0]  mem_wcheck,
  input  logic [6:0]  mem_rcheck,
  output logic        secded_ce,    // single error corrected (pulse)
  output logic        secded_ue,    // double error detected (pulse)
  output logic [2:0]  state_o       // current state, for observation
);

  typedef enum logic [2:0] {
    S_IDLE, S_INSTR, S_DATA, S_ICACHE, S_DCACHE, S_APB_SEL
  } state_e;

  state_e      state;
  logic        acc_active;   // an external word access is in progress
  logic [3:0]  ws_cnt;       // wait states left in the current access
  logic [2:0]  bank;
  logic        acc_we;
  logic [3:0]  acc_be;
  logic [31:0] acc_addr, acc_wdata;
  logic        acc_last;
  logic        rmw;          // read phase of a read-modify-write store
  logic [31:0] rdata_c;      // read data after SECDED correction
  logic        dec_ce, dec_ue, bank_ecc;
  logic        rmw_needed;

  function automatic logic [31:0] merge(input logic [31:0] old_w,
                                        input logic [31:0] new_w,
                                        input logic [3:0]  en);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = en[b] ? new_w[8*b +: 8] : old_w[8*b +: 8];
    return r;
  endfunction

  secded32 u_secded (
    .enc_data(acc_wdata), .enc_check(mem_wcheck),
    .dec_data(mem_rdata), .dec_check(mem_rcheck),
    .dec_corrected(rdata_c), .ce(dec_ce), .ue(dec_ue)
  );
  assign bank_ecc   = secded_en[bank];
  // a partial store to a protected bank must rebuild the whole codeword
  assign rmw_needed = dm_we && dm_be != 4'hF && secded_en[mem_bank(dm_addr)];

  function automatic logic [3:0] wait_states(input logic [31:0] cfg,
                                             input logic [31:0] a);
    return cfg[4*mem_bank(a) +: 4];
  endfunction

  mfc_req_t    r;          // request of the cache being served
  assign r        = (state == S_ICACHE) ? ic_mfc : dc_mfc;
  assign acc_last = acc_active && ws_cnt == 4'd0;
  assign state_o  = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      acc_active <= 1'b0;
      ws_cnt     <= '0;
      bank       <= '0;
      acc_we     <= 1'b0;
      acc_be     <= '0;
      acc_addr   <= '0;
      acc_wdata  <= '0;
      rmw        <= 1'b0;
      hsel_apb   <= 1'b0;
      haddr      <= '0;
      hwrite     <= 1'b0;
      hwdata     <= '0;
    end else begin
      if (acc_active) begin
        if (ws_cnt == 4'd0) acc_active <= 1'b0;
        else                ws_cnt     <= ws_cnt - 4'd1;
      end
      unique case (state)
        S_IDLE: begin
          if (dc_mfc.wait_for_mfc) begin
            state <= S_DCACHE;
          end else if (dm_req && is_apb(dm_addr)) begin
            state    <= S_APB_SEL;
            hsel_apb <= 1'b1;
            haddr    <= dm_addr;
            hwrite   <= dm_we;
            hwdata   <= dm_wdata;
          end else if (dm_req) begin
            state      <= S_DATA;
            acc_active <= 1'b1;
            ws_cnt     <= wait_states(mcr, dm_addr);
            bank       <= mem_bank(dm_addr);
            acc_we     <= dm_we && !rmw_needed;
            rmw        <= rmw_needed;
            acc_be     <= dm_we ? dm_be : 4'hF;
            acc_addr   <= dm_addr;
            acc_wdata  <= dm_wdata;
          end else if (ic_mfc.wait_for_mfc) begin
            state <= S_ICACHE;
          end else if (if_req) begin
            state      <= S_INSTR;
            acc_active <= 1'b1;
            ws_cnt     <= wait_states(mcr, if_addr);
            bank       <= mem_bank(if_addr);
            acc_we     <= 1'b0;
            acc_be     <= 4'hF;
            acc_addr   <= if_addr;
            acc_wdata  <= '0;
          end
        end
        S_INSTR: begin
          if (acc_last) state <= S_IDLE;
        end
        S_DATA: begin
          if (acc_last && rmw) begin
            // old word read (and corrected): now write the merged word
            acc_active <= 1'b1;
            ws_cnt     <= wait_states(mcr, acc_addr);
            acc_we     <= 1'b1;
            acc_wdata  <= merge(rdata_c, acc_wdata, acc_be);
            acc_be     <= 4'hF;
            rmw        <= 1'b0;
          end else if (acc_last) begin
            state <= S_IDLE;
          end
        end
        S_ICACHE, S_DCACHE: begin
          if (!acc_active) begin
            if (r.access_complete) begin
              state <= S_IDLE;
            end else if (r.wait_for_mfc) begin
              acc_active <= 1'b1;
              ws_cnt     <= wait_states(mcr, r.addr);
              bank       <= mem_bank(r.addr);
              acc_we     <= r.we;
              acc_be     <= 4'hF;
              acc_addr   <= r.addr;
              acc_wdata  <= r.wdata;
            end
          end
        end
        S_APB_SEL: begin
          if (hready_apb) begin
            state    <= S_IDLE;
            hsel_apb <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // external memory strobes
  always_comb begin
    mem_cs    = acc_active ? (8'd1 << bank) : 8'd0;
    mem_oe    = acc_active && !acc_we;
    mem_we    = acc_active && acc_we;
    mem_be    = acc_we ? acc_be : 4'hF;
    mem_addr  = acc_addr;
    mem_wdata = acc_wdata;
  end

  // completion strobes towards the requesters
  always_comb begin
    if_ready   = (state == S_INSTR) && acc_last;
    if_rdata   = bank_ecc ? rdata_c : mem_rdata;
    ic_mfc_ack = (state == S_ICACHE) && acc_last;
    dc_mfc_ack = (state == S_DCACHE) && acc_last;
    mfc_rdata  = if_rdata;
    dm_ready   = ((state == S_DATA) && acc_last && !rmw) ||
                 ((state == S_APB_SEL) && hready_apb);
    dm_rdata   = (state == S_APB_SEL) ? hrdata_apb : if_rdata;
    secded_ce  = acc_last && !acc_we && bank_ecc && dec_ce;
    secded_ue  = acc_last && !acc_we && bank_ecc && dec_ue;
  end

  // a word access never outlives its state
  a_acc_in_state: assert property (@(posedge clk) disable iff (!rst_n)
    acc_active |-> state inside {S_INSTR, S_DATA, S_ICACHE, S_DCACHE});
  // only one chip select at a time
  a_cs_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(mem_cs));

endmodule
