// cache_ctrl: controller of the volatile write-back data cache.
//
// Serves the processor's word loads and stores. A hit completes in the cycle of the
// request. A miss allocates a line (stores too): a dirty victim is first written back
// into the running region's persist buffer (t-phase1), never straight to NVM, and its
// write-back-instructive table bit is cleared. The line is then looked up in the
// persist buffers (buffer_search, youngest copy first, skipped when empty) and only
// read from NVM when no buffer holds it. Every store marks its line in the running
// region's table.
//
// Write-after-write rule: while the previous region's flush is unfinished
// (prev_p1 = 0), a store that hits a dirty line waits until prev_p1 becomes 1, since
// that line may still belong to the previous region. The check does not tell whose
// dirty line it is, so it sometimes waits needlessly. For the same reason a miss whose
// victim is dirty also waits; the latter is this design's own extension of the rule to
// evictions.
//
// Interface and timing: cpu_req with cpu_we, cpu_addr, cpu_wdata and cpu_be is held
// until cpu_ack (one cycle); cpu_rdata is valid with the ack of a load. enable holds the
// controller off during power-up recovery. Miss latency is about 3 cycles plus the
// buffer search, plus the buffer write for a dirty victim, plus the NVM read if the
// buffers miss. Word width, byte enables, write-allocate and LRU replacement are this
// design's own choices.
//
// cpu_addr[1:0] is not used: accesses are word-aligned and cpu_be picks the bytes. The
// eviction's buffer data is wired straight from the array's read port.
module cache_ctrl
  import sweepcache_pkg::*;
#(
  parameter  int unsigned N_SETS = CACHE_SETS,
  parameter  int unsigned LW     = LINE_W,
  parameter  int unsigned AW     = ADDR_W,
  localparam int unsigned OFF_W  = $clog2(LW / 8),
  localparam int unsigned LAW    = AW - OFF_W,
  localparam int unsigned IDX_W  = $clog2(N_SETS),
  localparam int unsigned SLOT_W = IDX_W + 1,
  localparam int unsigned TAG_W  = LAW - IDX_W,
  localparam int unsigned WSEL_W = $clog2(LW / WORD_W),
  localparam int unsigned BE_W   = WORD_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // processor port
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [AW-1:0]     cpu_addr,
  input  logic [WORD_W-1:0] cpu_wdata,
  input  logic [BE_W-1:0]   cpu_be,
  output logic              cpu_ack,
  output logic [WORD_W-1:0] cpu_rdata,
  // region state
  input  logic              prev_p1,
  output logic              idle,
  // cache array
  output logic [IDX_W-1:0]  lk_index,
  output logic [TAG_W-1:0]  lk_tag,
  input  logic              lk_hit,
  input  logic              lk_way,
  input  logic              lk_dirty,
  input  logic              vic_way,
  input  logic              vic_valid,
  input  logic              vic_dirty,
  input  logic [TAG_W-1:0]  vic_tag,
  output logic [SLOT_W-1:0] a_slot,
  input  logic [LW-1:0]     a_data,
  output logic              ww_en,
  output logic [SLOT_W-1:0] ww_slot,
  output logic [WSEL_W-1:0] ww_word,
  output logic [WORD_W-1:0] ww_data,
  output logic [BE_W-1:0]   ww_be,
  output logic              fl_en,
  output logic [SLOT_W-1:0] fl_slot,
  output logic [TAG_W-1:0]  fl_tag,
  output logic [LW-1:0]     fl_data,
  output logic              touch_en,
  output logic [IDX_W-1:0]  touch_index,
  output logic              touch_way,
  // running region's write-back-instructive table
  output logic              wbit_set_en,
  output logic [SLOT_W-1:0] wbit_set_idx,
  output logic              wbit_clr_en,
  output logic [SLOT_W-1:0] wbit_clr_idx,
  // eviction into the running region's persist buffer
  output logic              ev_push_req,
  output logic [LAW-1:0]    ev_push_laddr,
  output logic [LW-1:0]     ev_push_data,
  input  logic              ev_push_ack,
  // persist buffer search
  output logic              srch_start,
  output logic [LAW-1:0]    srch_laddr,
  input  logic              srch_done,
  input  logic              srch_found,
  input  logic [LW-1:0]     srch_data,
  // NVM line read
  output logic              rd_req,
  output logic [LAW-1:0]    rd_laddr,
  input  logic              rd_ack,
  input  logic [LW-1:0]     rd_data,
  // events
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_evict,
  output logic              ev_nvm_fill,
  output logic              ev_waw
);

  typedef enum logic [2:0] {S_IDLE, S_EVICT, S_SEARCH, S_NVM, S_FILL} state_t;

  state_t            state;
  logic [SLOT_W-1:0] vslot_q;
  logic [TAG_W-1:0]  vtag_q;
  logic [LW-1:0]     fill_q;
  logic              missed_q, stall_q;
  logic              req_ok, stall, miss_go;
  logic [LAW-1:0]    laddr;
  logic [WSEL_W-1:0] wsel;

  assign laddr    = cpu_addr[AW-1:OFF_W];
  assign wsel     = cpu_addr[OFF_W-1:2];
  assign lk_index = laddr[IDX_W-1:0];
  assign lk_tag   = laddr[LAW-1:IDX_W];
  assign idle     = (state == S_IDLE);

  assign req_ok   = (state == S_IDLE) && enable && cpu_req;
  // write-after-write rule, for a store hit and for a dirty victim
  assign stall    = req_ok && !prev_p1 &&
                    (lk_hit ? (cpu_we && lk_dirty) : (vic_valid && vic_dirty));
  assign cpu_ack  = req_ok && lk_hit && !stall;
  assign miss_go  = req_ok && !lk_hit && !stall;

  assign a_slot    = (state == S_EVICT) ? vslot_q : {lk_index, lk_way};
  assign cpu_rdata = a_data[wsel*WORD_W +: WORD_W];

  assign ww_en   = cpu_ack && cpu_we;
  assign ww_slot = {lk_index, lk_way};
  assign ww_word = wsel;
  assign ww_data = cpu_wdata;
  assign ww_be   = cpu_be;

  assign touch_en    = cpu_ack;
  assign touch_index = lk_index;
  assign touch_way   = lk_way;

  assign wbit_set_en  = ww_en;
  assign wbit_set_idx = ww_slot;
  assign wbit_clr_en  = (state == S_EVICT) && ev_push_ack;
  assign wbit_clr_idx = vslot_q;

  assign ev_push_req   = (state == S_EVICT);
  assign ev_push_laddr = {vtag_q, vslot_q[SLOT_W-1:1]};
  assign ev_push_data  = a_data;

  assign srch_start = (miss_go && !(vic_valid && vic_dirty)) ||
                      ((state == S_EVICT) && ev_push_ack);
  assign srch_laddr = laddr;

  assign rd_req   = (state == S_NVM);
  assign rd_laddr = laddr;

  assign fl_en   = (state == S_FILL);
  assign fl_slot = vslot_q;
  assign fl_tag  = lk_tag;
  assign fl_data = fill_q;

  assign ev_hit      = cpu_ack && !missed_q;
  assign ev_miss     = miss_go;
  assign ev_evict    = wbit_clr_en;
  assign ev_nvm_fill = rd_req && rd_ack;
  assign ev_waw      = stall && !stall_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      missed_q <= 1'b0;
      stall_q  <= 1'b0;
      vslot_q  <= '0;
      vtag_q   <= '0;
    end else begin
      stall_q <= stall;
      if (cpu_ack) missed_q <= 1'b0;
      case (state)
        S_IDLE: if (miss_go) begin
          missed_q <= 1'b1;
          vslot_q  <= {lk_index, vic_way};
          vtag_q   <= vic_tag;
          state    <= (vic_valid && vic_dirty) ? S_EVICT : S_SEARCH;
        end
        S_EVICT:  if (ev_push_ack) state <= S_SEARCH;
        S_SEARCH: if (srch_done) begin
          fill_q <= srch_data;
          state  <= srch_found ? S_FILL : S_NVM;
        end
        S_NVM: if (rd_ack) begin
          fill_q <= rd_data;
          state  <= S_FILL;
        end
        S_FILL:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
