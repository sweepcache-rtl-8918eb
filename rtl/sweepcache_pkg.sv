// sweepcache_pkg: sizes, types and event records shared by the SweepCache blocks.
//
// The default configuration is the evaluated one: a 4 KB, 2-way volatile data cache
// with 64-byte lines in front of a 16 MB byte-addressed nonvolatile main memory, and
// two NVM-resident persist buffers of 64 entries each (an entry is a line address plus
// one 64-byte line). The 32-bit word size and the cycle latencies are this design's
// own choices: the latencies assume a 100 MHz clock, so the 20 ns NVM read and the
// 120 ns NVM write become 2 and 12 cycles.
//
// WORDS_PER_LINE, CACHE_SETS, PB_DEPTH, NVM_RD_CYC and NVM_WR_CYC serve only as the
// default values of block parameters.
package sweepcache_pkg;

  localparam int unsigned ADDR_W         = 24;              // 16 MB NVM, byte address
  localparam int unsigned LINE_BYTES     = 64;
  localparam int unsigned LINE_W         = LINE_BYTES * 8;
  localparam int unsigned WORD_W         = 32;
  localparam int unsigned WORDS_PER_LINE = LINE_W / WORD_W;
  localparam int unsigned OFFSET_W       = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W        = ADDR_W - OFFSET_W; // line address width
  localparam int unsigned CACHE_BYTES    = 4096;
  localparam int unsigned CACHE_WAYS     = 2;
  localparam int unsigned CACHE_LINES    = CACHE_BYTES / LINE_BYTES;   // 64
  localparam int unsigned CACHE_SETS     = CACHE_LINES / CACHE_WAYS;   // 32
  localparam int unsigned PB_DEPTH       = 64;              // persist buffer entries
  localparam int unsigned NVM_RD_CYC     = 2;               // 20 ns at 100 MHz
  localparam int unsigned NVM_WR_CYC     = 12;              // 120 ns at 100 MHz

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;

  // Persistence status of one persist buffer: phase1Complete, phase2Complete.
  typedef struct packed {
    logic p1;
    logic p2;
  } phase_t;

  // What the power-up recovery found and did.
  typedef enum logic [1:0] {
    REC_NONE    = 2'd0,  // no recovery run yet
    REC_RESUME  = 2'd1,  // older region fully persisted (1,1): drop the running region's buffer
    REC_REPLAY  = 2'd2,  // older region had (1,0): its s-phase2 was re-executed
    REC_DISCARD = 2'd3   // older region had (0,0): both buffers dropped
  } rec_action_t;

  // One-cycle event pulses, brought out for performance counters and tests.
  typedef struct packed {
    logic hit;            // access served by the cache without a miss
    logic miss;           // cache miss started
    logic evict_wb;       // dirty victim written back into the running region's buffer
    logic search_bypass;  // a buffer skipped on a miss because its empty-bit was set
    logic search_probe;   // one persist-buffer entry compared
    logic search_hit;     // miss served from a persist buffer
    logic nvm_fill;       // miss served from NVM
    logic waw_stall;      // store or eviction held back by the write-after-write rule
    logic region_end;     // region boundary accepted
    logic region_wait;    // cycle of T_wait: region boundary waiting for a free buffer
    logic flush_line;     // dirty line flushed into a persist buffer (t-phase2)
    logic dma_line;       // buffer entry copied to NVM (t-phase3)
    logic rec_replay;     // recovery re-executed an s-phase2
    logic rec_discard;    // recovery discarded an unfinished region's buffer
  } sc_events_t;

endpackage
