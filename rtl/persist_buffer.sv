// persist_buffer: one NVM-resident persist buffer, a FIFO redo log.
//
// Holds up to DEPTH entries of (line address, 64-byte line) in push order. Dirty lines
// evicted during a region and all dirty lines flushed at its end are pushed here; the
// DMA engine later copies the entries to their NVM homes oldest first, so a younger
// entry for the same line overwrites an older one, and a miss search reads them youngest
// first. The empty-bit is a separate flag, set when the buffer is discarded and cleared
// by the first push, so a miss can skip the buffer without reading it.
//
// The entries, the fill count and the empty-bit survive power loss: they are set only
// by por_n (first power-on of the device) and by discard, never by rst_n. rst_n only
// resets the write-latency counter. Interface and timing: push_req with its address and
// data must be held until push_ack; the entry is written in the ack cycle after
// WR_LAT cycles, the NVM write latency. Both read ports are combinational by index
// (index 0 is the oldest entry); the readers model the NVM read latency themselves.
// The compiler bounds the stores of a region by the buffer size, so a push into a full
// buffer is a protocol error and is flagged by an assertion. The depth of 64 follows
// the evaluated configuration; the latency model and the count-based interface are
// this design's own.
module persist_buffer
  import sweepcache_pkg::*;
#(
  parameter  int unsigned DEPTH  = PB_DEPTH,
  parameter  int unsigned LW     = LINE_W,
  parameter  int unsigned LAW    = LADDR_W,
  parameter  int unsigned WR_LAT = NVM_WR_CYC,
  localparam int unsigned IW     = $clog2(DEPTH),
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           por_n,
  input  logic           discard,
  input  logic           push_req,
  input  logic [LAW-1:0] push_laddr,
  input  logic [LW-1:0]  push_data,
  output logic           push_ack,
  input  logic [IW-1:0]  rd0_idx,
  output logic [LAW-1:0] rd0_laddr,
  output logic [LW-1:0]  rd0_data,
  input  logic [IW-1:0]  rd1_idx,
  output logic [LAW-1:0] rd1_laddr,
  output logic [LW-1:0]  rd1_data,
  output logic [CW-1:0]  count,
  output logic           empty,
  output logic           full
);

  localparam int unsigned WCW = (WR_LAT > 1) ? $clog2(WR_LAT) : 1;

  logic [LAW-1:0] ent_laddr [DEPTH];
  logic [LW-1:0]  ent_data  [DEPTH];
  logic [WCW-1:0] wait_cnt;
  logic           lat_done;

  assign full     = (count == CW'(DEPTH));
  assign lat_done = (WR_LAT <= 1) || (wait_cnt == WCW'(WR_LAT - 1));
  assign push_ack = rst_n && push_req && !full && !discard && lat_done;

  always_ff @(posedge clk) begin
    if (!rst_n || !push_req || push_ack) wait_cnt <= '0;
    else if (!lat_done)                  wait_cnt <= wait_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!por_n || discard) begin
      count <= '0;
      empty <= 1'b1;
    end else if (push_ack) begin
      count <= count + 1'b1;
      empty <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (push_ack) begin
      ent_laddr[count[IW-1:0]] <= push_laddr;
      ent_data[count[IW-1:0]]  <= push_data;
    end
  end

  assign rd0_laddr = ent_laddr[rd0_idx];
  assign rd0_data  = ent_data[rd0_idx];
  assign rd1_laddr = ent_laddr[rd1_idx];
  assign rd1_data  = ent_data[rd1_idx];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || !por_n)
                                  !(push_req && full))
    else $error("persist buffer overflow: region stores exceed the buffer size");

endmodule
