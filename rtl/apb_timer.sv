// apb_timer: 32-bit down-counting timer on the APB.
//
// Registers (byte offsets inside the timer's 12-byte window; the window
// order control / reload / counter matches the timer addresses of the
// original design, 0xE000_0040 + 12*n):
//   +0 control  [0] enable  [1] auto-reload  [2] interrupt enable
//   +4 reload   writing it also loads the counter
//   +8 counter  current value, read/write
// While enabled the counter decrements once per clock. When it is zero the
// next clock is an underflow: intr pulses for one cycle (if enabled) and the
// counter is reloaded (auto-reload) or the timer stops (enable cleared), so
// with auto-reload the period is reload+1 clocks. With wdog_en high an
// underflow also pulses wdog_reset; the top wires wdog_en only to the last
// timer, which thereby serves as the watchdog.
// APB: zero wait states (pready tied high); a write takes effect at the
// clock edge ending the access phase; prdata is zero when not selected and
// in reset.
//
// Own choices: register bit layout, reload-on-write, no prescaler, and the
// fourth timer as watchdog.
module apb_timer
  import amba_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_req_t    apb,
  output logic [31:0] prdata,
  output logic        pready,
  input  logic        wdog_en,
  output logic        intr,
  output logic        wdog_reset
);

  logic        en, auto_rl, ie;
  logic [31:0] reload, count;
  logic        wr, underflow;

  assign wr        = psel && apb.penable && apb.pwrite;
  assign underflow = en && count == 32'd0;
  assign pready    = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; auto_rl <= 1'b0; ie <= 1'b0;
      reload <= '0; count <= '0;
      intr <= 1'b0; wdog_reset <= 1'b0;
    end else begin
      intr       <= underflow && ie;
      wdog_reset <= underflow && wdog_en;
      if (underflow) begin
        if (auto_rl) count <= reload;
        else         en    <= 1'b0;
      end else if (en) begin
        count <= count - 32'd1;
      end
      if (wr) begin
        unique case (apb.paddr[3:2])
          2'd0: {ie, auto_rl, en} <= apb.pwdata[2:0];
          2'd1: begin reload <= apb.pwdata; count <= apb.pwdata; end
          2'd2: count <= apb.pwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    if (psel && !apb.pwrite) begin
      unique case (apb.paddr[3:2])
        2'd0: prdata = {29'd0, ie, auto_rl, en};
        2'd1: prdata = reload;
        2'd2: prdata = count;
        default: prdata = '0;
      endcase
    end
  end

  // an interrupt comes exactly one clock after an enabled underflow, and a
  // stopped timer raises none
  a_intr_on_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    underflow && ie |=> intr);
  a_no_intr_when_disabled: assert property (@(posedge clk) disable iff (!rst_n)
    !en |=> !intr);

endmodule
