// apb_intc: interrupt registers of the peripheral bus.
//
// Collects NSRC interrupt sources (timers, UARTs, ACE devices) into a
// pending register and raises irq to the processor when a pending source is
// unmasked and interrupts are enabled (bit 12 of the processor
// configuration register, int_en here).
// Registers (byte offsets):
//   +0 pending  read: pending bits; write: 1 clears a bit
//   +4 mask     read/write, 1 enables a source
// A source that is high in a clock sets its pending bit at that clock's edge;
// setting wins over a simultaneous clear. irq is registered (one clock after
// the pending bit) and irq_id gives the lowest-numbered active source.
// APB: zero wait states.
//
// The original design only names its interrupt registers and the enable
// bit; the register set and source order are this design's own.
module apb_intc
  import amba_pkg::*;
#(
  parameter int NSRC = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            psel,
  input  apb_req_t        apb,
  output logic [31:0]     prdata,
  output logic            pready,
  input  logic [NSRC-1:0] src,
  input  logic            int_en,
  output logic            irq,
  output logic [4:0]      irq_id
);

  logic [NSRC-1:0] pend, mask, active;
  logic            wr;

  assign wr     = psel && apb.penable && apb.pwrite;
  assign pready = 1'b1;
  assign active = pend & mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= '0;
      mask   <= '0;
      irq    <= 1'b0;
      irq_id <= '0;
    end else begin
      if (wr && apb.paddr[3:2] == 2'd0)
        pend <= (pend & ~apb.pwdata[NSRC-1:0]) | src;
      else
        pend <= pend | src;
      if (wr && apb.paddr[3:2] == 2'd1) mask <= apb.pwdata[NSRC-1:0];
      irq    <= int_en && (active != '0);
      irq_id <= '0;
      for (int i = NSRC-1; i >= 0; i--)
        if (active[i]) irq_id <= 5'(i);
    end
  end

  always_comb begin
    prdata = '0;
    if (psel && !apb.pwrite) begin
      unique case (apb.paddr[3:2])
        2'd0:    prdata[NSRC-1:0] = pend;
        2'd1:    prdata[NSRC-1:0] = mask;
        default: prdata = '0;
      endcase
    end
  end

endmodule
