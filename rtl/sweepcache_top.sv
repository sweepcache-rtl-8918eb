// sweepcache_top: a volatile data cache made crash-consistent without just-in-time
// checkpointing, for an intermittently powered processor with NVM main memory.
//
// The program runs as compiler-formed regions whose register state is saved by
// ordinary stores. The cache never writes NVM directly: lines it writes back during a
// region (evictions) and all lines left dirty at the region end go first into that
// region's persist buffer, a redo log kept in NVM, and only when the whole region is in
// the buffer is the buffer copied to NVM. A power loss therefore always finds either
// the buffer or NVM intact. Two buffers let the next region run while the previous one
// is still being persisted (region-level parallelism).
//
// Blocks: dcache_array (4 KB, 2-way, 64 B lines), cache_ctrl (hits, misses, dirty
// evictions, write-after-write stall), two wb_table (write-back-instructive tables),
// two persist_buffer (64 entries, with empty-bits), buffer_search (sequential search
// on a miss), flush_engine (s-phase1 at a region end), dma_engine (s-phase2),
// region_ctrl with persist_status_reg (phase bits, buffer hand-over, recovery) and
// nvm_arbiter (one NVM port).
//
// Interface and timing: processor word accesses use a hold-until-ack handshake
// (cpu_req .. cpu_ack); a region end is signalled with re_req, held until re_ack, and
// must not overlap an access. rst_n is the power-up reset (volatile state); por_n
// initialises the NVM-resident state once, when the device is first powered, and must
// be asserted together with rst_n. After each power-up, ready stays low until recovery
// is done, and rec_action tells software which recovery case was found. The NVM port
// (nvm_*) moves whole lines with a hold-until-ack handshake; its latency belongs to the
// memory. events carries one-cycle pulses for performance counters.
//
// Left open on purpose: the tables' any and first_idx outputs (the flush engine walks
// the bits itself) and the buffers' full flag (a push into a full buffer is a software
// error that persist_buffer reports by assertion). The idle, prev_busy and busy status
// outputs of cache_ctrl, region_ctrl and flush_engine are not needed at this level.
module sweepcache_top
  import sweepcache_pkg::*;
#(
  parameter  int unsigned N_SETS   = CACHE_SETS,
  parameter  int unsigned DEPTH    = PB_DEPTH,
  parameter  int unsigned RD_LAT   = NVM_RD_CYC,
  parameter  int unsigned WR_LAT   = NVM_WR_CYC,
  parameter  bit          EMPTY_BIT = 1'b1,
  localparam int unsigned BE_W     = WORD_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              por_n,
  // processor
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  addr_t             cpu_addr,
  input  word_t             cpu_wdata,
  input  logic [BE_W-1:0]   cpu_be,
  output logic              cpu_ack,
  output word_t             cpu_rdata,
  input  logic              re_req,
  output logic              re_ack,
  output logic              ready,
  output rec_action_t       rec_action,
  // NVM main memory
  output logic              nvm_req,
  output logic              nvm_we,
  output laddr_t            nvm_laddr,
  output line_t             nvm_wdata,
  input  logic              nvm_ack,
  input  line_t             nvm_rdata,
  // observation
  output logic              cur_buf,
  output phase_t            status [2],
  output logic [1:0]        pb_empty,
  output sc_events_t        events
);

  localparam int unsigned IDX_W  = $clog2(N_SETS);
  localparam int unsigned SLOT_W = IDX_W + 1;
  localparam int unsigned N_SLOT = 2 * N_SETS;
  localparam int unsigned TAG_W  = LADDR_W - IDX_W;
  localparam int unsigned WSEL_W = $clog2(WORDS_PER_LINE);
  localparam int unsigned IW     = $clog2(DEPTH);
  localparam int unsigned CW     = $clog2(DEPTH + 1);

  // cache array wiring
  logic [IDX_W-1:0]  lk_index, touch_index;
  logic [TAG_W-1:0]  lk_tag, vic_tag, b_tag, fl_tag;
  logic              lk_hit, lk_way, lk_dirty, vic_way, vic_valid, vic_dirty;
  logic [SLOT_W-1:0] a_slot, b_slot, ww_slot, fl_slot, cl_slot;
  line_t             a_data, b_data, fl_data;
  logic              ww_en, fl_en, cl_en, touch_en, touch_way;
  logic [WSEL_W-1:0] ww_word;
  word_t             ww_data;
  logic [BE_W-1:0]   ww_be;

  // tables
  logic              cc_wset_en, cc_wclr_en;
  logic [SLOT_W-1:0] cc_wset_idx, cc_wclr_idx;
  logic [N_SLOT-1:0] wbt_bits [2];

  // persist buffers
  logic [1:0]          pb_push_req, pb_push_ack, pb_discard;
  laddr_t              pb_push_laddr [2];
  line_t               pb_push_data [2];
  logic [IW-1:0]       pb_rd0_idx, pb_rd1_idx;
  laddr_t              pb_rd0_laddr [2], pb_rd1_laddr [2];
  line_t               pb_rd0_data [2], pb_rd1_data [2];
  logic [1:0][CW-1:0]  pb_count;

  // controller side
  logic              cc_push_req, cc_push_ack;
  laddr_t            cc_push_laddr;
  line_t             cc_push_data;
  logic              srch_start, srch_done, srch_found, srch_rd_buf;
  laddr_t            srch_laddr;
  line_t             srch_data;
  logic              fill_req, fill_ack;
  laddr_t            fill_laddr;
  line_t             fill_data;
  logic              cc_idle, prev_p1, prev_busy;

  // flush and DMA
  logic              fe_start, fe_buf, fe_buf_sel, fe_busy, fe_done;
  logic              fe_push_req, fe_push_ack;
  laddr_t            fe_push_laddr;
  line_t             fe_push_data;
  logic              dma_start, dma_buf, dma_busy, dma_done, dma_rd_buf;
  logic              dma_req, dma_ack;
  laddr_t            dma_laddr;
  line_t             dma_wdata;

  logic ev_hit, ev_miss, ev_evict, ev_nvm_fill, ev_waw, ev_bypass, ev_probe;
  logic ev_flush, ev_dma, ev_re, ev_wait, ev_replay, ev_discard;

  dcache_array #(.N_SETS(N_SETS)) u_cache (
    .clk, .rst_n,
    .lk_index, .lk_tag, .lk_hit, .lk_way, .lk_dirty,
    .vic_way, .vic_valid, .vic_dirty, .vic_tag,
    .a_slot, .a_data, .b_slot, .b_data, .b_tag,
    .ww_en, .ww_slot, .ww_word, .ww_data, .ww_be,
    .fl_en, .fl_slot, .fl_tag, .fl_data,
    .cl_en, .cl_slot,
    .touch_en, .touch_index, .touch_way
  );

  cache_ctrl #(.N_SETS(N_SETS)) u_ctrl (
    .clk, .rst_n, .enable(ready),
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_be, .cpu_ack, .cpu_rdata,
    .prev_p1, .idle(cc_idle),
    .lk_index, .lk_tag, .lk_hit, .lk_way, .lk_dirty,
    .vic_way, .vic_valid, .vic_dirty, .vic_tag,
    .a_slot, .a_data,
    .ww_en, .ww_slot, .ww_word, .ww_data, .ww_be,
    .fl_en, .fl_slot, .fl_tag, .fl_data,
    .touch_en, .touch_index, .touch_way,
    .wbit_set_en(cc_wset_en), .wbit_set_idx(cc_wset_idx),
    .wbit_clr_en(cc_wclr_en), .wbit_clr_idx(cc_wclr_idx),
    .ev_push_req(cc_push_req), .ev_push_laddr(cc_push_laddr),
    .ev_push_data(cc_push_data), .ev_push_ack(cc_push_ack),
    .srch_start, .srch_laddr, .srch_done, .srch_found, .srch_data,
    .rd_req(fill_req), .rd_laddr(fill_laddr), .rd_ack(fill_ack), .rd_data(fill_data),
    .ev_hit, .ev_miss, .ev_evict, .ev_nvm_fill, .ev_waw
  );

  for (genvar b = 0; b < 2; b++) begin : g_buf
    wb_table #(.N(N_SLOT)) u_wbt (
      .clk, .rst_n,
      .set_en   (cc_wset_en && (cur_buf == b)),
      .set_idx  (cc_wset_idx),
      .clr_en   ((cc_wclr_en && (cur_buf == b)) || (cl_en && (fe_buf_sel == b))),
      .clr_idx  ((cc_wclr_en && (cur_buf == b)) ? cc_wclr_idx : cl_slot),
      .clear_all(1'b0),
      .bits     (wbt_bits[b]),
      .any      (),
      .first_idx()
    );

    assign pb_push_req[b]   = (cur_buf == b) ? cc_push_req : (fe_push_req && fe_buf_sel == b);
    assign pb_push_laddr[b] = (cur_buf == b) ? cc_push_laddr : fe_push_laddr;
    assign pb_push_data[b]  = (cur_buf == b) ? cc_push_data : fe_push_data;

    persist_buffer #(.DEPTH(DEPTH), .WR_LAT(WR_LAT)) u_pb (
      .clk, .rst_n, .por_n,
      .discard   (pb_discard[b]),
      .push_req  (pb_push_req[b]),
      .push_laddr(pb_push_laddr[b]),
      .push_data (pb_push_data[b]),
      .push_ack  (pb_push_ack[b]),
      .rd0_idx   (pb_rd0_idx),
      .rd0_laddr (pb_rd0_laddr[b]),
      .rd0_data  (pb_rd0_data[b]),
      .rd1_idx   (pb_rd1_idx),
      .rd1_laddr (pb_rd1_laddr[b]),
      .rd1_data  (pb_rd1_data[b]),
      .count     (pb_count[b]),
      .empty     (pb_empty[b]),
      .full      ()
    );
  end

  assign cc_push_ack = pb_push_ack[cur_buf];
  assign fe_push_ack = pb_push_ack[fe_buf_sel] && (fe_buf_sel != cur_buf);

  buffer_search #(.DEPTH(DEPTH), .RD_LAT(RD_LAT), .EMPTY_BIT(EMPTY_BIT)) u_search (
    .clk, .rst_n,
    .start(srch_start), .laddr(srch_laddr), .first_buf(cur_buf),
    .empty(pb_empty), .count(pb_count),
    .rd_buf(srch_rd_buf), .rd_idx(pb_rd0_idx),
    .rd_laddr(pb_rd0_laddr[srch_rd_buf]), .rd_data(pb_rd0_data[srch_rd_buf]),
    .done(srch_done), .found(srch_found), .data(srch_data),
    .ev_bypass, .ev_probe
  );

  flush_engine #(.N_SETS(N_SETS)) u_flush (
    .clk, .rst_n,
    .start(fe_start), .buf_in(fe_buf), .buf_sel(fe_buf_sel),
    .busy(fe_busy), .done(fe_done),
    .bits(wbt_bits[fe_buf_sel]),
    .rd_slot(b_slot), .rd_data(b_data), .rd_tag(b_tag),
    .push_req(fe_push_req), .push_laddr(fe_push_laddr), .push_data(fe_push_data),
    .push_ack(fe_push_ack),
    .cl_en, .cl_slot, .ev_line(ev_flush)
  );

  dma_engine #(.DEPTH(DEPTH), .RD_LAT(RD_LAT)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .buf_in(dma_buf), .count(pb_count[dma_buf]),
    .busy(dma_busy), .done(dma_done),
    .rd_buf(dma_rd_buf), .rd_idx(pb_rd1_idx),
    .rd_laddr(pb_rd1_laddr[dma_rd_buf]), .rd_data(pb_rd1_data[dma_rd_buf]),
    .nvm_req(dma_req), .nvm_laddr(dma_laddr), .nvm_wdata(dma_wdata), .nvm_ack(dma_ack),
    .ev_line(ev_dma)
  );

  region_ctrl u_region (
    .clk, .rst_n, .por_n,
    .re_req, .re_ack,
    .flush_start(fe_start), .flush_buf(fe_buf), .flush_done(fe_done),
    .dma_start, .dma_buf, .dma_busy, .dma_done,
    .discard(pb_discard),
    .cur_buf, .prev_p1, .prev_busy, .status,
    .ready, .rec_action,
    .ev_region_end(ev_re), .ev_region_wait(ev_wait),
    .ev_rec_replay(ev_replay), .ev_rec_discard(ev_discard)
  );

  nvm_arbiter u_arb (
    .clk, .rst_n,
    .r_req(fill_req), .r_laddr(fill_laddr), .r_ack(fill_ack), .r_rdata(fill_data),
    .w_req(dma_req), .w_laddr(dma_laddr), .w_wdata(dma_wdata), .w_ack(dma_ack),
    .m_req(nvm_req), .m_we(nvm_we), .m_laddr(nvm_laddr), .m_wdata(nvm_wdata),
    .m_ack(nvm_ack), .m_rdata(nvm_rdata)
  );

  always_comb begin
    events               = '0;
    events.hit           = ev_hit;
    events.miss          = ev_miss;
    events.evict_wb      = ev_evict;
    events.search_bypass = ev_bypass;
    events.search_probe  = ev_probe;
    events.search_hit    = srch_done && srch_found;
    events.nvm_fill      = ev_nvm_fill;
    events.waw_stall     = ev_waw;
    events.region_end    = ev_re;
    events.region_wait   = ev_wait;
    events.flush_line    = ev_flush;
    events.dma_line      = ev_dma;
    events.rec_replay    = ev_replay;
    events.rec_discard   = ev_discard;
  end

  // a region end may only be signalled between accesses
  a_re_between_accesses: assert property (@(posedge clk) disable iff (!rst_n)
                                          re_req |-> !cpu_req)
    else $error("region end signalled during a cache access");

endmodule
