// amba_pkg: types and constants shared by the bus interface of the 32-bit
// processor (AHB master, caches, AHB-to-APB bridge and APB peripherals).
//
// The peripheral addresses of the UARTs (0xE000_0020/24, 0xE000_0080/84) and
// of the four timers (0xE000_0040..0xE000_006C, three registers each) follow
// the register addresses used by the bus checks of the original design. The
// location of the configuration, interrupt and ACE registers, the bank
// decoding of external memory and the field layout of the memory
// configuration register are this design's own choices.
package amba_pkg;

  // ---- address map -------------------------------------------------------
  // 0xE000_0000 .. 0xEFFF_FFFF : memory mapped peripherals (APB)
  // otherwise                   : external memory, bank = addr[30:28]
  //                               (banks 0..6 external, 7 = internal RAM)
  localparam logic [3:0]  APB_REGION  = 4'hE;
  localparam logic [31:0] PCR_ADDR    = 32'hE000_0000; // processor configuration
  localparam logic [31:0] MCR_ADDR    = 32'hE000_0004; // memory configuration
  localparam logic [31:0] INTC_BASE   = 32'hE000_0010; // pending, mask
  localparam logic [31:0] UART1_BASE  = 32'hE000_0020;
  localparam logic [31:0] TIMER_BASE  = 32'hE000_0040; // timer n at +12*n
  localparam logic [31:0] UART2_BASE  = 32'hE000_0080;
  localparam logic [31:0] ACE_BASE    = 32'hE010_0000; // ACE n at +n*64 KiB

  localparam int NUM_TIMERS = 4;
  localparam int NUM_UARTS  = 2;
  localparam int NUM_ACE    = 4;

  // APB slave indices (one-hot PSEL vector positions)
  typedef enum logic [2:0] {
    SLV_INTC   = 3'd0,
    SLV_UART1  = 3'd1,
    SLV_UART2  = 3'd2,
    SLV_TIMER1 = 3'd3,
    SLV_TIMER2 = 3'd4,
    SLV_TIMER3 = 3'd5,
    SLV_TIMER4 = 3'd6
  } apb_slave_e;
  localparam int NUM_APB_SLAVES = 7;

  // Processor configuration register (bit positions)
  localparam int PCR_DCACHE_EN  = 0;
  localparam int PCR_ICACHE_EN  = 1;
  localparam int PCR_SECDED_REG = 2;  // 3..9 banks 0..6, 10 internal RAM
  localparam int PCR_WDOG_EN    = 11;
  localparam int PCR_INT_EN     = 12;

  // APB request from the bridge to every slave (PSEL is a separate vector)
  typedef struct packed {
    logic [11:0] paddr;   // offset inside the peripheral window
    logic        pwrite;
    logic        penable;
    logic [31:0] pwdata;
  } apb_req_t;

  // Word transfer between a cache controller and the AHB master while the
  // cache miss FSM is in its wait-for-memory-function-complete state.
  typedef struct packed {
    logic        wait_for_mfc;  // a word transfer is requested
    logic        we;            // 1: write back a word, 0: fetch a word
    logic [31:0] addr;          // word address (byte address, [1:0] = 0)
    logic [31:0] wdata;
    logic        access_complete; // the whole miss has been handled
  } mfc_req_t;

  // Bank of an external memory address
  function automatic logic [2:0] mem_bank(input logic [31:0] a);
    return a[30:28];
  endfunction

  function automatic logic is_apb(input logic [31:0] a);
    return a[31:28] == APB_REGION;
  endfunction

  // Parity over the even- and odd-numbered bits of a vector: {odd, even}
  function automatic logic [1:0] parity2_32(input logic [31:0] d);
    logic pe, po;
    pe = 1'b0; po = 1'b0;
    for (int i = 0; i < 32; i += 2) begin
      pe ^= d[i];
      po ^= d[i+1];
    end
    return {po, pe};
  endfunction

endpackage
