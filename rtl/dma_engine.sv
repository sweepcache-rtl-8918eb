// dma_engine: copies a persist buffer to its NVM locations (t-phase3, s-phase2).
//
// Once a region's buffer holds all its stores (phase1Complete), the entries are moved
// to their home lines in NVM, oldest first, so that where a line was pushed twice the
// younger copy lands last. Re-running the copy after a power loss gives the same NVM
// contents, which is what recovery relies on when it finds a buffer at (1,0).
//
// Interface and timing: start is a one-cycle pulse with buf_in and the buffer's count.
// For each entry the engine charges RD_LAT cycles to read it from the NVM-resident
// buffer through the combinational read port (rd_buf, rd_idx), then holds nvm_req with
// the line address and data until nvm_ack. done pulses for one cycle after the last
// write, or 2 cycles after start for an empty buffer. ev_line pulses per line written.
// Oldest-first order follows the design; the handshake and timing are this design's
// own.
module dma_engine
  import sweepcache_pkg::*;
#(
  parameter  int unsigned DEPTH  = PB_DEPTH,
  parameter  int unsigned LW     = LINE_W,
  parameter  int unsigned LAW    = LADDR_W,
  parameter  int unsigned RD_LAT = NVM_RD_CYC,
  localparam int unsigned IW     = $clog2(DEPTH),
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           buf_in,
  input  logic [CW-1:0]  count,
  output logic           busy,
  output logic           done,
  output logic           rd_buf,
  output logic [IW-1:0]  rd_idx,
  input  logic [LAW-1:0] rd_laddr,
  input  logic [LW-1:0]  rd_data,
  output logic           nvm_req,
  output logic [LAW-1:0] nvm_laddr,
  output logic [LW-1:0]  nvm_wdata,
  input  logic           nvm_ack,
  output logic           ev_line
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_DONE} state_t;

  localparam int unsigned LCW = (RD_LAT > 1) ? $clog2(RD_LAT) : 1;

  state_t         state;
  logic [CW-1:0]  n_q, idx_q;
  logic [LCW-1:0] lat_q;
  logic           lat_done;

  assign lat_done = (RD_LAT <= 1) || (lat_q == LCW'(RD_LAT - 1));
  assign busy     = (state != S_IDLE);
  assign done     = (state == S_DONE);
  assign rd_idx   = idx_q[IW-1:0];
  assign nvm_req  = (state == S_WRITE);
  assign ev_line  = nvm_req && nvm_ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rd_buf <= 1'b0;
      n_q    <= '0;
      idx_q  <= '0;
      lat_q  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          rd_buf <= buf_in;
          n_q    <= count;
          idx_q  <= '0;
          lat_q  <= '0;
          state  <= (count == '0) ? S_DONE : S_READ;
        end
        S_READ: begin
          if (!lat_done) lat_q <= lat_q + 1'b1;
          else begin
            lat_q     <= '0;
            nvm_laddr <= rd_laddr;
            nvm_wdata <= rd_data;
            state     <= S_WRITE;
          end
        end
        S_WRITE: if (nvm_ack) begin
          idx_q <= idx_q + 1'b1;
          state <= (idx_q + 1'b1 == n_q) ? S_DONE : S_READ;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
