// caches_ahb_top: bus interface of a 32-bit processor.
//
// Sits between the processor pipeline (fetch stage and memory stage) and the
// outside world: external memory banks, four MIL-STD-1553 ACE devices and
// two RS-232 lines. Inside are
//   - icache_ctrl  32 KB two-way instruction cache (used when PCR[1] = 1)
//   - dcache_ctrl  32 KB two-way copy-back data cache (used when PCR[0] = 1)
//   - ahb_master   FSM that runs uncached fetches and loads/stores, cache
//                  miss traffic and peripheral accesses, with per-bank wait
//                  states from the memory configuration register
//   - apb_bridge   AHB-to-APB bridge holding the processor and memory
//                  configuration registers and the ACE interface
//   - apb_intc, 2 x apb_uart, 4 x apb_timer on the APB
// Routing: a fetch goes to the instruction cache when it is enabled, else
// straight to the AHB master. A load/store to 0xE000_0000-0xEFFF_FFFF goes
// to the APB through the AHB master; any other goes to the data cache when
// it is enabled, else straight to the AHB master. Requests are held until
// their ready pulse; the caches keep the pipeline stalled until then.
// Interrupt sources, in pending-register order: timers 1-4 (bits 0-3),
// UART1 and UART2 (4-5), ACE 1-4 (6-9). Timer 4 is the watchdog: with PCR[11]
// set its underflow pulses wdog_reset. PCR[10:3] enable SECDED correction
// for external banks 0-6 and the internal RAM in the AHB master; all nine
// SECDED enables (PCR[10:2]) are also brought out as secded_en, bit 0 being
// the enable for the internal registers of the processor.
// The enable bits are meant to be changed only while no fetch is waiting.
module caches_ahb_top
  import amba_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // fetch stage
  input  logic        if_req,
  input  logic [31:0] if_addr,
  output logic        if_ready,
  output logic [31:0] if_rdata,
  // memory stage
  input  logic        dm_req,
  input  logic        dm_we,
  input  logic [3:0]  dm_be,
  input  logic [31:0] dm_addr,
  input  logic [31:0] dm_wdata,
  output logic        dm_ready,
  output logic [31:0] dm_rdata,
  output logic        dcache_parity_err,
  // external memory
  output logic [7:0]  mem_cs,
  output logic [31:0] mem_addr,
  output logic        mem_oe,
  output logic        mem_we,
  output logic [3:0]  mem_be,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  output logic [6:0]  mem_wcheck,   // SECDED check bits of mem_wdata
  input  logic [6:0]  mem_rcheck,   // stored check bits of mem_rdata
  output logic        secded_ce,    // corrected single error (pulse)
  output logic        secded_ue,    // uncorrectable double error (pulse)
  // ACE devices
  output logic [NUM_ACE-1:0] ace_cs,
  output logic [15:0]        ace_addr,
  output logic               ace_rd_wr,
  output logic [15:0]        ace_wdata,
  input  logic [15:0]        ace_rdata,
  input  logic               ace_ready,
  input  logic [NUM_ACE-1:0] ace_int,
  // serial lines
  input  logic        rs232_rx1,
  output logic        rs232_tx1,
  input  logic        rs232_rx2,
  output logic        rs232_tx2,
  // interrupts, watchdog, configuration
  output logic        irq,
  output logic [4:0]  irq_id,
  output logic        wdog_reset,
  output logic [8:0]  secded_en,
  // cache events, one-cycle pulses (for performance counting)
  output logic        ic_hit,
  output logic        ic_miss,
  output logic        dc_hit,
  output logic        dc_miss,
  output logic        dc_writeback
);

  logic [31:0] pcr, mcr;
  logic        ic_en, dc_en;
  assign ic_en     = pcr[PCR_ICACHE_EN];
  assign dc_en     = pcr[PCR_DCACHE_EN];
  assign secded_en = pcr[10:2];

  // ---------------- request routing ----------------
  logic ic_req, am_if_req, dc_req, am_dm_req, dm_to_dc;
  assign ic_req    = if_req && ic_en;
  assign am_if_req = if_req && !ic_en;
  assign dm_to_dc  = dc_en && !is_apb(dm_addr);
  assign dc_req    = dm_req && dm_to_dc;
  assign am_dm_req = dm_req && !dm_to_dc;

  logic        ic_ready, am_if_ready, dc_ready, am_dm_ready;
  logic [31:0] ic_rdata, am_if_rdata, dc_rdata, am_dm_rdata;

  assign if_ready = ic_en ? ic_ready : am_if_ready;
  assign if_rdata = ic_en ? ic_rdata : am_if_rdata;
  assign dm_ready = dm_to_dc ? dc_ready : am_dm_ready;
  assign dm_rdata = dm_to_dc ? dc_rdata : am_dm_rdata;

  mfc_req_t    ic_mfc, dc_mfc;
  logic        ic_mfc_ack, dc_mfc_ack;
  logic [31:0] mfc_rdata;

  icache_ctrl u_icache (
    .clk, .rst_n,
    .req(ic_req), .addr(if_addr), .ready(ic_ready), .rdata(ic_rdata),
    .stall(),
    .mfc(ic_mfc), .mfc_ack(ic_mfc_ack), .mfc_rdata,
    .hit_o(ic_hit), .miss_o(ic_miss)
  );

  dcache_ctrl u_dcache (
    .clk, .rst_n,
    .req(dc_req), .we(dm_we), .be(dm_be), .addr(dm_addr), .wdata(dm_wdata),
    .ready(dc_ready), .rdata(dc_rdata), .stall(),
    .parity_err(dcache_parity_err),
    .mfc(dc_mfc), .mfc_ack(dc_mfc_ack), .mfc_rdata,
    .hit_o(dc_hit), .miss_o(dc_miss), .writeback_o(dc_writeback)
  );

  // ---------------- AHB master ----------------
  logic        hsel_apb, hwrite, hready_apb;
  logic [31:0] haddr, hwdata, hrdata_apb;

  ahb_master u_ahb_master (
    .clk, .rst_n, .mcr,
    .if_req(am_if_req), .if_addr, .if_ready(am_if_ready),
    .if_rdata(am_if_rdata),
    .dm_req(am_dm_req), .dm_we, .dm_be, .dm_addr, .dm_wdata,
    .dm_ready(am_dm_ready), .dm_rdata(am_dm_rdata),
    .ic_mfc, .ic_mfc_ack, .dc_mfc, .dc_mfc_ack, .mfc_rdata,
    .hsel_apb, .haddr, .hwrite, .hwdata, .hrdata_apb, .hready_apb,
    .mem_cs, .mem_addr, .mem_oe, .mem_we, .mem_be, .mem_wdata, .mem_rdata,
    .secded_en(pcr[10:3]), .mem_wcheck, .mem_rcheck, .secded_ce, .secded_ue,
    .state_o()
  );

  // ---------------- APB bridge and peripherals ----------------
  logic [NUM_APB_SLAVES-1:0] psel, pready;
  logic [31:0]               prdata [NUM_APB_SLAVES];
  apb_req_t                  apb;

  apb_bridge u_apb_bridge (
    .clk, .rst_n,
    .hsel_apb, .haddr, .hwrite, .hwdata, .hrdata_apb, .hready_apb,
    .psel, .apb, .prdata, .pready,
    .ace_cs, .ace_addr, .ace_rd_wr, .ace_wdata, .ace_rdata, .ace_ready,
    .pcr, .mcr
  );

  logic [NUM_TIMERS-1:0] timer_int, timer_wdog;
  logic [NUM_UARTS-1:0]  uart_int;

  apb_intc #(.NSRC(NUM_TIMERS + NUM_UARTS + NUM_ACE)) u_intc (
    .clk, .rst_n, .psel(psel[SLV_INTC]), .apb,
    .prdata(prdata[SLV_INTC]), .pready(pready[SLV_INTC]),
    .src({ace_int, uart_int, timer_int}), .int_en(pcr[PCR_INT_EN]),
    .irq, .irq_id
  );

  apb_uart u_uart1 (
    .clk, .rst_n, .psel(psel[SLV_UART1]), .apb,
    .prdata(prdata[SLV_UART1]), .pready(pready[SLV_UART1]),
    .rs232_rx(rs232_rx1), .rs232_tx(rs232_tx1), .intr(uart_int[0])
  );

  apb_uart u_uart2 (
    .clk, .rst_n, .psel(psel[SLV_UART2]), .apb,
    .prdata(prdata[SLV_UART2]), .pready(pready[SLV_UART2]),
    .rs232_rx(rs232_rx2), .rs232_tx(rs232_tx2), .intr(uart_int[1])
  );

  for (genvar t = 0; t < NUM_TIMERS; t++) begin : g_timer
    apb_timer u_timer (
      .clk, .rst_n, .psel(psel[int'(SLV_TIMER1) + t]), .apb,
      .prdata(prdata[int'(SLV_TIMER1) + t]),
      .pready(pready[int'(SLV_TIMER1) + t]),
      .wdog_en(t == NUM_TIMERS - 1 ? pcr[PCR_WDOG_EN] : 1'b0),
      .intr(timer_int[t]), .wdog_reset(timer_wdog[t])
    );
  end

  assign wdog_reset = |timer_wdog;

endmodule
