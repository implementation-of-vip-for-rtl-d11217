// icache_ctrl: two-way set-associative instruction cache with LRU
// replacement.
//
// Default geometry follows the original design: 32 KB holding 8K 32-bit
// instructions, two ways, 4-word blocks, so 1024 sets, a 10-bit set index,
// 2 word-locator bits and an 18-bit tag. Every tag RAM entry is
// {valid, lru, tag}. On a hit in one way that way's LRU bit is cleared and
// the LRU bit of the other way of the set is set; on a miss an invalid way,
// or else the way whose LRU bit is 1, is refilled.
//
// Fetch interface: the fetch stage holds req and addr until ready. The tag
// and data RAMs are read synchronously, so a hit answers in the second cycle
// of the request (ready and rdata for one cycle). On a miss the miss FSM
// (FSM2) enters wait_for_mfc and asks the AHB master for the four words of
// the block, one word per mfc_ack, starting at word 0; then it writes the tag
// entry, pulses access_complete together with ready and hands the requested
// word to the pipeline, which stalls meanwhile (stall = req && !ready).
// After reset the controller clears one set per cycle (SETS cycles, ready
// stays low) so that no stale valid bit survives.
//
// Own choices: the synchronous-read timing, the in-order refill and the
// clearing sweep.
module icache_ctrl
  import amba_pkg::*;
#(
  parameter int SETS       = 1024,  // sets per way
  parameter int LINE_WORDS = 4      // words per block
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch stage
  input  logic        req,
  input  logic [31:0] addr,
  output logic        ready,
  output logic [31:0] rdata,
  output logic        stall,
  // miss handling towards the AHB master
  output mfc_req_t    mfc,
  input  logic        mfc_ack,
  input  logic [31:0] mfc_rdata,
  // observation
  output logic        hit_o,
  output logic        miss_o
);

  localparam int IDX_W = $clog2(SETS);
  localparam int OFF_W = $clog2(LINE_WORDS);
  localparam int TAG_W = 32 - IDX_W - OFF_W - 2;

  typedef struct packed {
    logic             valid;
    logic             lru;
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_FILL, S_TAGW, S_COMPLETE
  } state_e;

  state_e state;

  logic [31:0]      req_addr;
  logic [TAG_W-1:0] req_tag;
  logic [IDX_W-1:0] req_idx;
  logic [OFF_W-1:0] req_off;
  assign req_tag = req_addr[31 -: TAG_W];
  assign req_idx = req_addr[2+OFF_W +: IDX_W];
  assign req_off = req_addr[2 +: OFF_W];

  tag_entry_t  tag_q  [2];
  logic [31:0] data_q [2];
  logic [1:0]  way_hit;
  logic        victim;
  logic [OFF_W-1:0] wcnt;
  logic [IDX_W-1:0] init_idx;
  logic [31:0]      fill_word;

  always_comb begin
    for (int w = 0; w < 2; w++)
      way_hit[w] = tag_q[w].valid && tag_q[w].tag == req_tag;
  end

  // refill victim: an invalid way first, else the way marked LRU
  always_comb begin
    if (!tag_q[0].valid)      victim = 1'b0;
    else if (!tag_q[1].valid) victim = 1'b1;
    else                      victim = tag_q[1].lru;
  end

  // control FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      init_idx <= '0;
      req_addr <= '0;
      wcnt     <= '0;
      fill_word <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_W'(SETS-1)) state <= S_IDLE;
        end
        S_IDLE: if (req) begin
          req_addr <= addr;
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (way_hit == 2'b00) begin
            wcnt  <= '0;
            state <= S_FILL;
          end else begin
            state <= S_IDLE;
          end
        end
        S_FILL: if (mfc_ack) begin
          if (wcnt == req_off) fill_word <= mfc_rdata;
          wcnt <= wcnt + 1'b1;
          if (wcnt == OFF_W'(LINE_WORDS-1)) state <= S_TAGW;
        end
        S_TAGW:     state <= S_COMPLETE;
        S_COMPLETE: state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // victim way, held through the refill
  logic fill_way;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 fill_way <= 1'b0;
    else if (state == S_LOOKUP) fill_way <= victim;
  end

  // RAM read address: the request address while idle
  logic [IDX_W-1:0] rd_idx;
  logic [OFF_W-1:0] rd_off;
  assign rd_idx = addr[2+OFF_W +: IDX_W];
  assign rd_off = addr[2 +: OFF_W];

  // write ports of the tag and data RAMs
  logic             tag_we  [2];
  logic [IDX_W-1:0] tag_wa;
  tag_entry_t       tag_wd  [2];
  logic             data_we [2];
  always_comb begin
    tag_wa = (state == S_INIT) ? init_idx : req_idx;
    for (int w = 0; w < 2; w++) begin
      tag_we[w]  = 1'b0;
      tag_wd[w]  = '0;
      data_we[w] = (state == S_FILL) && mfc_ack && fill_way == w[0];
      unique case (state)
        S_INIT: tag_we[w] = 1'b1;
        S_LOOKUP: begin
          // hit: clear this way's LRU bit, set the other way's
          tag_we[w] = (way_hit != 2'b00);
          tag_wd[w] = '{valid: tag_q[w].valid, lru: !way_hit[w],
                        tag: tag_q[w].tag};
        end
        S_TAGW: begin
          tag_we[w] = 1'b1;
          if (fill_way == w[0])
            tag_wd[w] = '{valid: 1'b1, lru: 1'b0, tag: req_tag};
          else
            tag_wd[w] = '{valid: tag_q[w].valid, lru: 1'b1,
                          tag: tag_q[w].tag};
        end
        default: ;
      endcase
    end
  end

  for (genvar w = 0; w < 2; w++) begin : g_way
    cache_ram #(.DEPTH(SETS), .WIDTH(TAG_W + 2)) u_tag (
      .clk, .ren(state == S_IDLE), .raddr(rd_idx), .rdata(tag_q[w]),
      .we(tag_we[w]), .waddr(tag_wa), .wdata(tag_wd[w])
    );
    cache_ram #(.DEPTH(SETS * LINE_WORDS), .WIDTH(32)) u_data (
      .clk, .ren(state == S_IDLE), .raddr({rd_idx, rd_off}),
      .rdata(data_q[w]),
      .we(data_we[w]), .waddr({req_idx, wcnt}), .wdata(mfc_rdata)
    );
  end

  always_comb begin
    hit_o  = (state == S_LOOKUP) && (way_hit != 2'b00);
    miss_o = (state == S_LOOKUP) && (way_hit == 2'b00);
    ready  = hit_o || (state == S_COMPLETE);
    rdata  = (state == S_COMPLETE) ? fill_word
           : (way_hit[1] ? data_q[1] : data_q[0]);
    stall  = req && !ready;
    mfc.wait_for_mfc    = (state == S_FILL);
    mfc.we              = 1'b0;
    mfc.addr            = {req_tag, req_idx, wcnt, 2'b00};
    mfc.wdata           = '0;
    mfc.access_complete = (state == S_COMPLETE);
  end

  // a block never sits in both ways of a set
  a_no_double_hit: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOOKUP |-> way_hit != 2'b11);

endmodule
