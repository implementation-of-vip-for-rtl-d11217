// apb_bridge: AHB-to-APB bridge, the only master of the peripheral bus.
//
// For an access from the AHB master (hsel_apb with haddr, hwrite, hwdata
// held until hready_apb) the bridge latches and decodes the address, raises
// exactly one peripheral select for the SETUP cycle, adds penable for the
// ACCESS cycle and, for a write, drives the data onto pwdata. The slaves on
// the APB (interrupt registers, two UARTs, four timers) answer without wait
// states, so a register access takes SETUP + ACCESS and hready_apb is high in
// the ACCESS cycle together with hrdata_apb. The four ACE devices are outside
// the APB: during an ACE access the bridge drives ace_cs, ace_addr,
// ace_rd_wr and ace_wdata and stays in ACCESS until the device answers with
// ace_ready. Unmapped addresses finish in one cycle and read as zero.
//
// The bridge also holds the processor configuration register (PCR at
// 0xE000_0000: [0] data cache enable, [1] instruction cache enable,
// [2..10] SECDED enables of internal registers, banks 0-6 and internal RAM,
// [11] watchdog enable, [12] interrupt enable, the rest reads 0) and the
// memory configuration register (MCR at 0xE000_0004: 4 wait-state bits per
// bank, bank b at [4b+3:4b], bank 7 = internal RAM).
// PCR layout, the bridge's role as APB master, the address latching, the
// one-hot select and the ACE ready wait follow the original design. The
// two-cycle APB access, the ACE windows (ACE n at 0xE010_0000 + n*256 KiB,
// 16-bit data, word n of the device at byte offset 4n), the MCR layout and
// reset values (PCR 0, MCR all wait states at 15) are this design's own.
module apb_bridge
  import amba_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB side
  input  logic        hsel_apb,
  input  logic [31:0] haddr,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata_apb,
  output logic        hready_apb,
  // APB side
  output logic [NUM_APB_SLAVES-1:0] psel,
  output apb_req_t                  apb,
  input  logic [31:0]               prdata [NUM_APB_SLAVES],
  input  logic [NUM_APB_SLAVES-1:0] pready,
  // ACE devices
  output logic [NUM_ACE-1:0] ace_cs,
  output logic [15:0]        ace_addr,
  output logic               ace_rd_wr,   // 1: read, 0: write
  output logic [15:0]        ace_wdata,
  input  logic [15:0]        ace_rdata,
  input  logic               ace_ready,
  // configuration registers
  output logic [31:0] pcr,
  output logic [31:0] mcr
);

  typedef enum logic [1:0] {B_IDLE, B_SETUP, B_ACCESS} bstate_e;
  typedef enum logic [2:0] {T_NONE, T_PCR, T_MCR, T_APB, T_ACE} target_e;

  bstate_e     state;
  target_e     target;
  logic [31:0] addr_q, wdata_q;
  logic        write_q;
  logic [NUM_APB_SLAVES-1:0] sel_q;
  logic [NUM_ACE-1:0]        ace_sel_q;
  logic [11:0]               off_q;

  // address decoder
  target_e                   dec_target;
  logic [NUM_APB_SLAVES-1:0] dec_sel;
  logic [NUM_ACE-1:0]        dec_ace;
  logic [11:0]               dec_off;
  always_comb begin
    dec_target = T_NONE;
    dec_sel    = '0;
    dec_ace    = '0;
    dec_off    = haddr[11:0];
    if (haddr == PCR_ADDR) begin
      dec_target = T_PCR;
    end else if (haddr == MCR_ADDR) begin
      dec_target = T_MCR;
    end else if (haddr[31:20] == ACE_BASE[31:20]) begin
      dec_target = T_ACE;
      dec_ace[haddr[19:18]] = 1'b1;
    end else if (haddr[31:8] == PCR_ADDR[31:8]) begin
      dec_target = T_APB;
      if (haddr[7:0] >= 8'h10 && haddr[7:0] < 8'h20) begin
        dec_sel[SLV_INTC] = 1'b1;  dec_off = haddr[11:0] - 12'h010;
      end else if (haddr[7:0] >= 8'h20 && haddr[7:0] < 8'h40) begin
        dec_sel[SLV_UART1] = 1'b1; dec_off = haddr[11:0] - 12'h020;
      end else if (haddr[7:0] >= 8'h40 && haddr[7:0] < 8'h4C) begin
        dec_sel[SLV_TIMER1] = 1'b1; dec_off = haddr[11:0] - 12'h040;
      end else if (haddr[7:0] >= 8'h4C && haddr[7:0] < 8'h58) begin
        dec_sel[SLV_TIMER2] = 1'b1; dec_off = haddr[11:0] - 12'h04C;
      end else if (haddr[7:0] >= 8'h58 && haddr[7:0] < 8'h64) begin
        dec_sel[SLV_TIMER3] = 1'b1; dec_off = haddr[11:0] - 12'h058;
      end else if (haddr[7:0] >= 8'h64 && haddr[7:0] < 8'h70) begin
        dec_sel[SLV_TIMER4] = 1'b1; dec_off = haddr[11:0] - 12'h064;
      end else if (haddr[7:0] >= 8'h80 && haddr[7:0] < 8'hA0) begin
        dec_sel[SLV_UART2] = 1'b1; dec_off = haddr[11:0] - 12'h080;
      end else begin
        dec_target = T_NONE;
      end
    end
  end

  logic apb_done;
  always_comb begin
    apb_done = 1'b0;
    unique case (target)
      T_APB:   apb_done = (pready & sel_q) != '0;
      T_ACE:   apb_done = ace_ready;
      default: apb_done = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      target    <= T_NONE;
      addr_q    <= '0;
      wdata_q   <= '0;
      write_q   <= 1'b0;
      sel_q     <= '0;
      ace_sel_q <= '0;
      off_q     <= '0;
      pcr       <= '0;
      mcr       <= '1;
    end else begin
      unique case (state)
        B_IDLE: if (hsel_apb) begin
          addr_q    <= haddr;
          wdata_q   <= hwdata;
          write_q   <= hwrite;
          target    <= dec_target;
          sel_q     <= dec_sel;
          ace_sel_q <= dec_ace;
          off_q     <= dec_off;
          state     <= B_SETUP;
        end
        B_SETUP: state <= B_ACCESS;
        B_ACCESS: if (apb_done) begin
          state     <= B_IDLE;
          sel_q     <= '0;
          ace_sel_q <= '0;
          if (write_q && target == T_PCR) pcr <= {19'd0, wdata_q[12:0]};
          if (write_q && target == T_MCR) mcr <= wdata_q;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // APB and ACE outputs
  always_comb begin
    psel        = (state != B_IDLE) ? sel_q : '0;
    apb.paddr   = off_q;
    apb.pwrite  = write_q;
    apb.penable = (state == B_ACCESS) && target == T_APB;
    apb.pwdata  = wdata_q;
    ace_cs      = (state != B_IDLE) ? ace_sel_q : '0;
    ace_addr    = addr_q[17:2];
    ace_rd_wr   = !write_q;
    ace_wdata   = wdata_q[15:0];
  end

  // response towards the AHB master
  always_comb begin
    hready_apb = (state == B_ACCESS) && apb_done;
    hrdata_apb = '0;
    if (!write_q) begin
      unique case (target)
        T_PCR: hrdata_apb = pcr;
        T_MCR: hrdata_apb = mcr;
        T_ACE: hrdata_apb = {16'd0, ace_rdata};
        T_APB: for (int s = 0; s < NUM_APB_SLAVES; s++)
                 if (sel_q[s]) hrdata_apb = prdata[s];
        default: hrdata_apb = '0;
      endcase
    end
  end

  // APB rules: one select at a time, penable only with a select, and the
  // address and write data held steady from SETUP to the end of ACCESS
  a_psel_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(psel));
  a_penable_psel: assert property (@(posedge clk) disable iff (!rst_n)
    apb.penable |-> psel != '0);
  a_setup_access: assert property (@(posedge clk) disable iff (!rst_n)
    (psel != '0 && !apb.penable) |=> apb.penable && $stable(apb.paddr) &&
                                    $stable(apb.pwdata));

endmodule
