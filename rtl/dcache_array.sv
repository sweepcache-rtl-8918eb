// dcache_array: storage of the volatile SRAM L1 data cache.
//
// A set-associative array of 2 ways (4 KB, 32 sets of two 64-byte lines by default).
// Per line it keeps a valid bit, a dirty bit, a tag and the data; per set one LRU bit
// naming the way to replace next. A line is addressed as a slot {set index, way}, so
// the 64 slots of the default size map one to one onto the bits of a
// write-back-instructive table.
//
// Interface and timing: lookups and both read ports are combinational; every update
// (word write, line fill, clean, LRU touch) takes effect at the rising clock edge.
// Port A serves the cache controller, port B the region-end flush engine, which reads a
// line and clears its dirty bit while the controller keeps running. A flushed line stays
// valid with its dirty bit cleared. The synchronous active-low rst_n models loss of
// power: valid and dirty bits and LRU state are cleared; data and tags are left as they
// are. Cache size, associativity and line size follow the evaluated configuration; LRU
// replacement, the slot numbering and the byte-enabled 32-bit word write are this
// design's own choices.
module dcache_array
  import sweepcache_pkg::*;
#(
  parameter  int unsigned N_SETS = CACHE_SETS,
  parameter  int unsigned LW     = LINE_W,
  parameter  int unsigned LAW    = LADDR_W,
  localparam int unsigned IDX_W  = $clog2(N_SETS),
  localparam int unsigned SLOT_W = IDX_W + 1,
  localparam int unsigned N_SLOT = N_SETS * 2,
  localparam int unsigned TAG_W  = LAW - IDX_W,
  localparam int unsigned WSEL_W = $clog2(LW / WORD_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup of one line address
  input  logic [IDX_W-1:0]  lk_index,
  input  logic [TAG_W-1:0]  lk_tag,
  output logic              lk_hit,
  output logic              lk_way,
  output logic              lk_dirty,    // dirty bit of the hit line
  output logic              vic_way,     // way a fill of lk_index would replace
  output logic              vic_valid,
  output logic              vic_dirty,
  output logic [TAG_W-1:0]  vic_tag,
  // read port A (controller)
  input  logic [SLOT_W-1:0] a_slot,
  output logic [LW-1:0]     a_data,
  // read port B (flush engine)
  input  logic [SLOT_W-1:0] b_slot,
  output logic [LW-1:0]     b_data,
  output logic [TAG_W-1:0]  b_tag,
  // word write: writes bytes of one word and sets the dirty bit
  input  logic              ww_en,
  input  logic [SLOT_W-1:0] ww_slot,
  input  logic [WSEL_W-1:0] ww_word,
  input  logic [WORD_W-1:0] ww_data,
  input  logic [WORD_W/8-1:0] ww_be,
  // line fill: valid, clean
  input  logic              fl_en,
  input  logic [SLOT_W-1:0] fl_slot,
  input  logic [TAG_W-1:0]  fl_tag,
  input  logic [LW-1:0]     fl_data,
  // clean: clear the dirty bit (region-end flush)
  input  logic              cl_en,
  input  logic [SLOT_W-1:0] cl_slot,
  // LRU update: way touch_way of set touch_index was used
  input  logic              touch_en,
  input  logic [IDX_W-1:0]  touch_index,
  input  logic              touch_way
);

  logic [LW-1:0]    data  [N_SLOT];
  logic [TAG_W-1:0] tags  [N_SLOT];
  logic [N_SLOT-1:0] valid, dirty;
  logic [N_SETS-1:0] lru;

  logic [SLOT_W-1:0] s0, s1;
  logic              h0, h1;

  always_comb begin
    s0 = {lk_index, 1'b0};
    s1 = {lk_index, 1'b1};
    h0 = valid[s0] && (tags[s0] == lk_tag);
    h1 = valid[s1] && (tags[s1] == lk_tag);
    lk_hit   = h0 || h1;
    lk_way   = h1;
    lk_dirty = h1 ? dirty[s1] : (h0 && dirty[s0]);
    if (!valid[s0])      vic_way = 1'b0;
    else if (!valid[s1]) vic_way = 1'b1;
    else                 vic_way = lru[lk_index];
    vic_valid = valid[{lk_index, vic_way}];
    vic_dirty = dirty[{lk_index, vic_way}];
    vic_tag   = tags[{lk_index, vic_way}];
  end

  assign a_data = data[a_slot];
  assign b_data = data[b_slot];
  assign b_tag  = tags[b_slot];

  // data and tags: no reset, as in an SRAM macro
  always_ff @(posedge clk) begin
    if (fl_en) begin
      data[fl_slot] <= fl_data;
      tags[fl_slot] <= fl_tag;
    end else if (ww_en) begin
      for (int b = 0; b < WORD_W / 8; b++)
        if (ww_be[b]) data[ww_slot][ww_word*WORD_W + b*8 +: 8] <= ww_data[b*8 +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      dirty <= '0;
      lru   <= '0;
    end else begin
      if (cl_en) dirty[cl_slot] <= 1'b0;
      if (fl_en) begin
        valid[fl_slot] <= 1'b1;
        dirty[fl_slot] <= 1'b0;
      end else if (ww_en) begin
        dirty[ww_slot] <= 1'b1;
      end
      if (touch_en) lru[touch_index] <= ~touch_way;
    end
  end

endmodule
