// region_ctrl: region boundaries, dual persist buffers and power-up recovery.
//
// The compiler cuts the program into regions and the processor signals each region
// end. Region-level parallelism: at a region end the next region starts at once, as if
// the ended one were already persisted, while that region is persisted in the
// background, first its dirty lines into its own buffer (s-phase1, by the flush
// engine), then its buffer into NVM (s-phase2, by the DMA engine). There are two
// buffers, so a region end must wait (T_wait) until the region before the ended one
// has finished s-phase2 and its buffer is free; this also keeps the s-phase2 copies in
// region order. The phase bits live in persist_status_reg, instantiated here.
//
// Recovery: after every power-up (rst_n released) the controller reads the status of
// the previous region's buffer before letting the cache run:
//   (0,0)  its flush was cut short; both buffers are discarded and software resumes at
//          the start of that region, whose PC is the last one persisted in NVM
//   (1,0)  its buffer is complete; s-phase2 is re-executed, then software resumes at
//          the start of the region after it
//   (1,1)  nothing to redo; the running region's buffer is discarded
// The running region's buffer is always discarded. rec_action reports the case; ready
// rises when recovery is over. Registers and PC are restored by software from NVM.
//
// Interface and timing: re_req is held until re_ack (one cycle); re_ack comes in the
// first cycle the previous buffer is free. flush_start and dma_start are one-cycle
// pulses. The three recovery cases follow the design; the single flush and DMA engine,
// the cur bit and the discard of buffers are this design's own.
module region_ctrl
  import sweepcache_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        por_n,
  // region boundary from the processor
  input  logic        re_req,
  output logic        re_ack,
  // flush engine
  output logic        flush_start,
  output logic        flush_buf,
  input  logic        flush_done,
  // DMA engine
  output logic        dma_start,
  output logic        dma_buf,
  input  logic        dma_busy,
  input  logic        dma_done,
  // persist buffers
  output logic [1:0]  discard,
  // state for the cache side
  output logic        cur_buf,
  output logic        prev_p1,
  output logic        prev_busy,   // previous buffer not yet free
  output phase_t      status [2],
  output logic        ready,
  output rec_action_t rec_action,
  // events
  output logic        ev_region_end,
  output logic        ev_region_wait,
  output logic        ev_rec_replay,
  output logic        ev_rec_discard
);

  typedef enum logic [1:0] {S_BOOT, S_REPLAY, S_RUN} state_t;

  state_t state;
  logic   cur, prev;
  phase_t st [2];
  logic   advance, set_p1, set_p2, release_prev;
  logic   dma_issued_q;
  logic   prev_free;

  persist_status_reg u_status (
    .clk, .por_n, .advance, .set_p1, .set_p2, .release_prev,
    .cur, .st
  );

  assign prev      = ~cur;
  assign prev_free = st[prev].p1 && st[prev].p2;
  assign cur_buf   = cur;
  assign prev_p1   = st[prev].p1;
  assign prev_busy = !prev_free;
  assign status    = st;
  assign ready     = (state == S_RUN);

  // region boundary
  assign advance        = rst_n && (state == S_RUN) && re_req && prev_free;
  assign re_ack         = advance;
  assign flush_start    = advance;
  assign flush_buf      = cur;
  assign ev_region_end  = advance;
  assign ev_region_wait = (state == S_RUN) && re_req && !prev_free;

  // s-phase1 end, s-phase2 launch and end
  assign set_p1    = rst_n && flush_done && (state == S_RUN);
  assign dma_start = (state != S_BOOT) && st[prev].p1 && !st[prev].p2 &&
                     !dma_busy && !dma_issued_q;
  assign dma_buf   = prev;
  assign set_p2    = rst_n && dma_done;

  assign release_prev   = rst_n && (state == S_BOOT) && !st[prev].p1;
  assign ev_rec_discard = release_prev;
  assign ev_rec_replay  = (state == S_REPLAY) && dma_done;

  // persistent state changes only while powered (rst_n high)
  always_comb begin
    discard = '0;
    if (rst_n && state == S_BOOT) begin
      discard[cur] = 1'b1;
      if (!st[prev].p1) discard[prev] = 1'b1;
    end
    if (set_p2)   discard[prev] = 1'b1;
    if (advance)  discard[prev] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_BOOT;
      dma_issued_q <= 1'b0;
    end else begin
      if (dma_start)     dma_issued_q <= 1'b1;
      else if (dma_done) dma_issued_q <= 1'b0;
      case (state)
        S_BOOT: begin
          if (!st[prev].p1)     state <= S_RUN;
          else if (!st[prev].p2) state <= S_REPLAY;
          else                   state <= S_RUN;
        end
        S_REPLAY: if (dma_done) state <= S_RUN;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rec_action <= REC_NONE;
    else if (state == S_BOOT) begin
      if (!st[prev].p1)      rec_action <= REC_DISCARD;
      else if (!st[prev].p2) rec_action <= REC_REPLAY;
      else                   rec_action <= REC_RESUME;
    end
  end

endmodule
