// cache_ram: synchronous single-port-read, single-port-write RAM used for
// the tag and data arrays of the caches.
//
// rdata is registered: it takes the word at raddr at the clock edge where
// ren is high and holds it otherwise. A write (we) at the same edge to the
// same address is not seen by that read. No reset: the contents start
// undefined, which the cache controllers handle by clearing their tag
// arrays after reset.
module cache_ram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     ren,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)  mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end

endmodule
