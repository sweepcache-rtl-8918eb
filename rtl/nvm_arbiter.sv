// nvm_arbiter: shares the single NVM port between cache-miss fills and DMA writes.
//
// Two requesters reach the nonvolatile main memory: the cache controller reading a
// line on a miss, and the DMA engine writing persist-buffer entries home. The arbiter
// grants one of them at a time and keeps the grant until the memory acknowledges. A
// waiting read wins over a waiting write, since a miss stalls the processor while the
// DMA copy runs in the background.
//
// Interface and timing: each requester holds its req (and address, data) until its
// ack, a one-cycle pulse; r_rdata is valid with r_ack. The grant is registered, so a
// request reaches the memory one cycle after it is raised. The memory port m_* uses
// the same hold-until-ack handshake. The read priority and the handshake are this
// design's own choices.
//
// Write data is wired straight from the DMA side, the only writer, and read data
// straight from the memory to the cache side; only the address is steered by the grant.
module nvm_arbiter
  import sweepcache_pkg::*;
#(
  parameter int unsigned LW  = LINE_W,
  parameter int unsigned LAW = LADDR_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           r_req,
  input  logic [LAW-1:0] r_laddr,
  output logic           r_ack,
  output logic [LW-1:0]  r_rdata,
  input  logic           w_req,
  input  logic [LAW-1:0] w_laddr,
  input  logic [LW-1:0]  w_wdata,
  output logic           w_ack,
  output logic           m_req,
  output logic           m_we,
  output logic [LAW-1:0] m_laddr,
  output logic [LW-1:0]  m_wdata,
  input  logic           m_ack,
  input  logic [LW-1:0]  m_rdata
);

  typedef enum logic [1:0] {G_NONE, G_READ, G_WRITE} grant_t;
  grant_t grant;

  always_ff @(posedge clk) begin
    if (!rst_n) grant <= G_NONE;
    else if (grant == G_NONE) begin
      if (r_req)      grant <= G_READ;
      else if (w_req) grant <= G_WRITE;
    end else if (m_ack) grant <= G_NONE;
  end

  assign m_req   = (grant != G_NONE);
  assign m_we    = (grant == G_WRITE);
  assign m_laddr = (grant == G_WRITE) ? w_laddr : r_laddr;
  assign m_wdata = w_wdata;
  assign r_ack   = (grant == G_READ) && m_ack;
  assign w_ack   = (grant == G_WRITE) && m_ack;
  assign r_rdata = m_rdata;

endmodule
