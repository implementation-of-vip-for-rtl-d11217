// dcache_ctrl: two-way set-associative copy-back data cache with write
// allocate, LRU replacement and parity on tags and data.
//
// Default geometry follows the original design: 32 KB, two ways, 4-word
// blocks, 1024 sets indexed by 10 address bits, with the 2 word-locator bits
// appended to address the data RAM. A tag RAM entry is 23 bits:
// {parity[1:0], valid, dirty, lru, tag[17:0]}. The two tag parity bits cover
// the odd- and even-numbered bits of {valid, dirty, lru, tag}; every 32-bit
// data word carries two parity bits over its odd and even bits in the same
// way. Parity is written with the tag or word and checked on every lookup
// (both tag entries of the set and the addressed word of the hit way); an
// error pulses parity_err and the access goes on.
//
// Memory-stage interface: req, we, be, addr, wdata are held until ready.
// A hit answers in the second cycle. A store hit merges the enabled bytes
// into the word and sets the block's dirty bit: nothing goes to memory. On a
// miss the victim (an invalid way, else the way whose LRU bit is 1) is first
// written back word by word if it is dirty, then the block is fetched over
// the AHB master (wait_for_mfc, one word per mfc_ack, in order from word 0);
// a store updates the fetched word on its way into the RAM (write allocate).
// The tag entry is then written, with the LRU bits of the set updated as on
// a hit, and access_complete is pulsed together with ready.
// After reset one set per cycle is cleared (SETS cycles).
//
// Own choices: synchronous RAM timing, in-order refill, byte enables on
// stores, and continuing the access after a parity error.
module dcache_ctrl
  import amba_pkg::*;
#(
  parameter int SETS       = 1024,
  parameter int LINE_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory stage
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        ready,
  output logic [31:0] rdata,
  output logic        stall,
  output logic        parity_err,
  // miss handling towards the AHB master
  output mfc_req_t    mfc,
  input  logic        mfc_ack,
  input  logic [31:0] mfc_rdata,
  // observation
  output logic        hit_o,
  output logic        miss_o,
  output logic        writeback_o   // one pulse per written-back block
);

  localparam int IDX_W = $clog2(SETS);
  localparam int OFF_W = $clog2(LINE_WORDS);
  localparam int TAG_W = 32 - IDX_W - OFF_W - 2;
  localparam int TE_W  = TAG_W + 3;   // bits covered by the tag parity

  typedef struct packed {
    logic [1:0]       par;     // {odd, even} parity of the fields below
    logic             valid;
    logic             dirty;
    logic             lru;
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WB_RD, S_WB, S_FILL, S_TAGW, S_COMPLETE
  } state_e;

  function automatic logic [1:0] par2(input logic [TE_W-1:0] d);
    logic pe, po;
    pe = 1'b0; po = 1'b0;
    for (int i = 0; i < TE_W; i++)
      if (i % 2 == 0) pe ^= d[i];
      else            po ^= d[i];
    return {po, pe};
  endfunction

  function automatic tag_entry_t mk_entry(input logic v, input logic d,
                                          input logic l,
                                          input logic [TAG_W-1:0] t);
    tag_entry_t e;
    e.valid = v; e.dirty = d; e.lru = l; e.tag = t;
    e.par   = par2({v, d, l, t});
    return e;
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old_w,
                                        input logic [31:0] new_w,
                                        input logic [3:0]  en);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = en[b] ? new_w[8*b +: 8] : old_w[8*b +: 8];
    return r;
  endfunction

  state_e state;

  logic [31:0]      req_addr, req_wdata;
  logic             req_we;
  logic [3:0]       req_be;
  logic [TAG_W-1:0] req_tag;
  logic [IDX_W-1:0] req_idx;
  logic [OFF_W-1:0] req_off;
  assign req_tag = req_addr[31 -: TAG_W];
  assign req_idx = req_addr[2+OFF_W +: IDX_W];
  assign req_off = req_addr[2 +: OFF_W];

  tag_entry_t  tag_q  [2];
  logic [31:0] data_q [2];
  logic [1:0]  dpar_q [2];
  logic [1:0]  way_hit;
  logic        hit_way;
  logic        victim, fill_way;
  logic [OFF_W-1:0] wcnt;
  logic [IDX_W-1:0] init_idx;
  logic [31:0]      fill_word;
  logic [31:0]      wb_word;

  always_comb begin
    for (int w = 0; w < 2; w++)
      way_hit[w] = tag_q[w].valid && tag_q[w].tag == req_tag;
    hit_way = way_hit[1];
    if (!tag_q[0].valid)      victim = 1'b0;
    else if (!tag_q[1].valid) victim = 1'b1;
    else                      victim = tag_q[1].lru;
  end

  // control FSM (FSM2 handles the miss)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      init_idx  <= '0;
      req_addr  <= '0;
      req_wdata <= '0;
      req_we    <= 1'b0;
      req_be    <= '0;
      wcnt      <= '0;
      fill_word <= '0;
      fill_way  <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_W'(SETS-1)) state <= S_IDLE;
        end
        S_IDLE: if (req) begin
          req_addr  <= addr;
          req_we    <= we;
          req_be    <= be;
          req_wdata <= wdata;
          state     <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (way_hit == 2'b00) begin
            fill_way <= victim;
            wcnt     <= '0;
            state    <= (tag_q[victim].valid && tag_q[victim].dirty)
                        ? S_WB_RD : S_FILL;
          end else begin
            state <= S_IDLE;
          end
        end
        S_WB_RD: state <= S_WB;
        S_WB: if (mfc_ack) begin
          wcnt  <= wcnt + 1'b1;
          state <= (wcnt == OFF_W'(LINE_WORDS-1)) ? S_FILL : S_WB_RD;
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

  // RAM read address: the request while idle, the victim word in write-back
  logic [IDX_W-1:0] rd_idx;
  logic [OFF_W-1:0] rd_off;
  always_comb begin
    if (state == S_WB_RD) begin
      rd_idx = req_idx;
      rd_off = wcnt;
    end else begin
      rd_idx = addr[2+OFF_W +: IDX_W];
      rd_off = addr[2 +: OFF_W];
    end
  end

  logic [31:0] hit_new_word, fill_new_word;
  assign hit_new_word  = merge(data_q[hit_way], req_wdata, req_be);
  assign fill_new_word = (req_we && wcnt == req_off)
                       ? merge(mfc_rdata, req_wdata, req_be) : mfc_rdata;
  assign wb_word       = data_q[fill_way];

  // write ports of the tag RAMs and of the data RAMs (word with its parity)
  logic             tag_we  [2];
  logic [IDX_W-1:0] tag_wa;
  tag_entry_t       tag_wd  [2];
  logic             data_we [2];
  logic [IDX_W+OFF_W-1:0] data_wa;
  logic [33:0]      data_wd;
  always_comb begin
    tag_wa  = (state == S_INIT) ? init_idx : req_idx;
    data_wa = (state == S_FILL) ? {req_idx, wcnt} : {req_idx, req_off};
    data_wd = (state == S_FILL)
            ? {parity2_32(fill_new_word), fill_new_word}
            : {parity2_32(hit_new_word), hit_new_word};
    for (int w = 0; w < 2; w++) begin
      tag_we[w]  = 1'b0;
      tag_wd[w]  = '0;
      data_we[w] = 1'b0;
      unique case (state)
        S_INIT: begin
          tag_we[w] = 1'b1;
          tag_wd[w] = mk_entry(1'b0, 1'b0, 1'b0, '0);
        end
        S_LOOKUP: begin
          // hit: clear this way's LRU bit, set the other way's; a store
          // also marks the block dirty and updates the word
          tag_we[w]  = (way_hit != 2'b00);
          tag_wd[w]  = mk_entry(tag_q[w].valid,
                                tag_q[w].dirty || (way_hit[w] && req_we),
                                !way_hit[w], tag_q[w].tag);
          data_we[w] = way_hit[w] && req_we;
        end
        S_FILL: data_we[w] = mfc_ack && fill_way == w[0];
        S_TAGW: begin
          tag_we[w] = 1'b1;
          if (fill_way == w[0])
            tag_wd[w] = mk_entry(1'b1, req_we, 1'b0, req_tag);
          else
            tag_wd[w] = mk_entry(tag_q[w].valid, tag_q[w].dirty, 1'b1,
                                 tag_q[w].tag);
        end
        default: ;
      endcase
    end
  end

  for (genvar w = 0; w < 2; w++) begin : g_way
    cache_ram #(.DEPTH(SETS), .WIDTH(TAG_W + 5)) u_tag (
      .clk, .ren(state == S_IDLE), .raddr(rd_idx), .rdata(tag_q[w]),
      .we(tag_we[w]), .waddr(tag_wa), .wdata(tag_wd[w])
    );
    cache_ram #(.DEPTH(SETS * LINE_WORDS), .WIDTH(34)) u_data (
      .clk, .ren(state == S_IDLE || state == S_WB_RD),
      .raddr({rd_idx, rd_off}), .rdata({dpar_q[w], data_q[w]}),
      .we(data_we[w]), .waddr(data_wa), .wdata(data_wd)
    );
  end

  logic tag_perr, data_perr;
  always_comb begin
    tag_perr = 1'b0;
    for (int w = 0; w < 2; w++)
      tag_perr |= (tag_q[w].par != par2({tag_q[w].valid, tag_q[w].dirty,
                                         tag_q[w].lru, tag_q[w].tag}));
    data_perr = (way_hit != 2'b00) &&
                (dpar_q[hit_way] != parity2_32(data_q[hit_way]));
  end

  always_comb begin
    hit_o       = (state == S_LOOKUP) && (way_hit != 2'b00);
    miss_o      = (state == S_LOOKUP) && (way_hit == 2'b00);
    writeback_o = (state == S_LOOKUP) && (way_hit == 2'b00) &&
                  tag_q[victim].valid && tag_q[victim].dirty;
    parity_err  = (state == S_LOOKUP) && (tag_perr || data_perr);
    ready  = hit_o || (state == S_COMPLETE);
    rdata  = (state == S_COMPLETE) ? fill_word : data_q[hit_way];
    stall  = req && !ready;
    mfc.wait_for_mfc    = (state == S_WB) || (state == S_FILL);
    mfc.we              = (state == S_WB);
    mfc.addr            = (state == S_WB)
                        ? {tag_q[fill_way].tag, req_idx, wcnt, 2'b00}
                        : {req_tag, req_idx, wcnt, 2'b00};
    mfc.wdata           = wb_word;
    mfc.access_complete = (state == S_COMPLETE);
  end

  a_no_double_hit: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOOKUP |-> way_hit != 2'b11);

endmodule
