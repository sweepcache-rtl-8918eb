// flush_engine: region-end flush of dirty lines into a persist buffer (t-phase2).
//
// When a region ends, every line it left dirty in the cache must reach that region's
// persist buffer before the region counts as persisted. The write-back-instructive
// table of the region names those lines, so no cache scan is needed: the engine takes
// the lowest set bit, reads that slot through the cache's second read port, pushes
// (line address, data) into the buffer, and on the buffer's acknowledge clears the
// line's dirty bit (the line stays valid in the cache) and the table bit. When the
// table is empty it pulses done, which sets the buffer's phase1Complete bit. The next
// region runs meanwhile; the cache controller keeps it away from the lines being
// flushed (write-after-write rule).
//
// Interface and timing: start is a one-cycle pulse naming the buffer and table (buf).
// bits is that table's content. One line is flushed per buffer write (WR_LAT cycles
// of the buffer); done comes one cycle after the table is found empty, so an empty
// table finishes in 2 cycles. The line address is {tag, set index} of the slot, slot
// = {set index, way}. The use of the table and the clean-but-valid result follow the
// design; the one-line-at-a-time sequencing is this design's own.
//
// push_data is wired straight from the cache's read port, and the line address is
// made of the read tag and slot bits without logic.
module flush_engine
  import sweepcache_pkg::*;
#(
  parameter  int unsigned N_SETS = CACHE_SETS,
  parameter  int unsigned LW     = LINE_W,
  parameter  int unsigned LAW    = LADDR_W,
  localparam int unsigned IDX_W  = $clog2(N_SETS),
  localparam int unsigned SLOT_W = IDX_W + 1,
  localparam int unsigned N_SLOT = N_SETS * 2,
  localparam int unsigned TAG_W  = LAW - IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              buf_in,
  output logic              buf_sel,
  output logic              busy,
  output logic              done,
  input  logic [N_SLOT-1:0] bits,
  output logic [SLOT_W-1:0] rd_slot,
  input  logic [LW-1:0]     rd_data,
  input  logic [TAG_W-1:0]  rd_tag,
  output logic              push_req,
  output logic [LAW-1:0]    push_laddr,
  output logic [LW-1:0]     push_data,
  input  logic              push_ack,
  output logic              cl_en,
  output logic [SLOT_W-1:0] cl_slot,
  output logic              ev_line
);

  logic              run_q, done_q;
  logic [SLOT_W-1:0] first;

  always_comb begin
    first = '0;
    for (int i = N_SLOT - 1; i >= 0; i--)
      if (bits[i]) first = SLOT_W'(i);
  end

  assign busy       = run_q;
  assign done       = done_q;
  assign rd_slot    = first;
  assign push_req   = run_q && (|bits);
  assign push_laddr = {rd_tag, first[SLOT_W-1:1]};
  assign push_data  = rd_data;
  assign cl_en      = push_req && push_ack;
  assign cl_slot    = first;
  assign ev_line    = cl_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      done_q  <= 1'b0;
      buf_sel <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start && !run_q) begin
        run_q   <= 1'b1;
        buf_sel <= buf_in;
      end else if (run_q && !(|bits)) begin
        run_q  <= 1'b0;
        done_q <= 1'b1;
      end
    end
  end

endmodule
