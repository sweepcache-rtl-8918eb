// buffer_search: sequential persist-buffer search for a cache miss.
//
// On a miss the newest copy of a line may still sit in a persist buffer rather than in
// NVM, so the buffers are searched before NVM is read. The running region's buffer is
// searched first, then the previous region's, and each buffer from its youngest entry
// to its oldest, so the first match is the newest copy. The search is sequential, one
// entry per NVM read, since the buffers live in NVM and associative search would cost
// too much. Each buffer has an empty-bit: with EMPTY_BIT set (the default) an empty
// buffer is skipped at no cost, otherwise its fill pointer is read from NVM first.
//
// Interface and timing: start is a one-cycle pulse with laddr and first_buf. The unit
// drives rd_buf and rd_idx into the buffers' combinational read ports and charges
// RD_LAT cycles for each pointer read and each entry read. done pulses for one cycle;
// found and data are valid in that cycle and held until the next start. A search that
// skips both buffers takes 3 cycles. Event pulses: ev_bypass per buffer skipped by its
// empty-bit, ev_probe per entry compared. Search order, sequential search and the
// empty-bit follow the design; the cycle accounting is this design's own.
module buffer_search
  import sweepcache_pkg::*;
#(
  parameter  int unsigned DEPTH     = PB_DEPTH,
  parameter  int unsigned LW        = LINE_W,
  parameter  int unsigned LAW       = LADDR_W,
  parameter  int unsigned RD_LAT    = NVM_RD_CYC,
  parameter  bit          EMPTY_BIT = 1'b1,
  localparam int unsigned IW        = $clog2(DEPTH),
  localparam int unsigned CW        = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [LAW-1:0]       laddr,
  input  logic                 first_buf,
  input  logic [1:0]           empty,
  input  logic [1:0][CW-1:0]   count,
  output logic                 rd_buf,
  output logic [IW-1:0]        rd_idx,
  input  logic [LAW-1:0]       rd_laddr,
  input  logic [LW-1:0]        rd_data,
  output logic                 done,
  output logic                 found,
  output logic [LW-1:0]        data,
  output logic                 ev_bypass,
  output logic                 ev_probe
);

  typedef enum logic [2:0] {S_IDLE, S_SEL, S_PTR, S_PROBE, S_DONE} state_t;

  localparam int unsigned LCW = (RD_LAT > 1) ? $clog2(RD_LAT) : 1;

  state_t         state;
  logic [LAW-1:0] laddr_q;
  logic           first_q, second_q;
  logic [IW-1:0]  idx_q;
  logic [LCW-1:0] lat_q;
  logic           lat_done;
  logic           b;

  assign b        = second_q ? ~first_q : first_q;
  assign lat_done = (RD_LAT <= 1) || (lat_q == LCW'(RD_LAT - 1));
  assign rd_buf   = b;
  assign rd_idx   = idx_q;
  assign done     = (state == S_DONE);

  assign ev_bypass = (state == S_SEL) && EMPTY_BIT && empty[b];
  assign ev_probe  = (state == S_PROBE) && lat_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      found    <= 1'b0;
      second_q <= 1'b0;
      first_q  <= 1'b0;
      idx_q    <= '0;
      lat_q    <= '0;
      laddr_q  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          laddr_q  <= laddr;
          first_q  <= first_buf;
          second_q <= 1'b0;
          found    <= 1'b0;
          state    <= S_SEL;
        end
        S_SEL: begin
          lat_q <= '0;
          if (EMPTY_BIT && empty[b]) begin
            if (second_q) state <= S_DONE;
            else          second_q <= 1'b1;
          end else begin
            state <= S_PTR;
          end
        end
        S_PTR: begin
          if (!lat_done) begin
            lat_q <= lat_q + 1'b1;
          end else begin
            lat_q <= '0;
            if (count[b] == '0) begin
              if (second_q) state <= S_DONE;
              else begin
                second_q <= 1'b1;
                state    <= S_SEL;
              end
            end else begin
              idx_q <= IW'(count[b] - 1'b1);
              state <= S_PROBE;
            end
          end
        end
        S_PROBE: begin
          if (!lat_done) begin
            lat_q <= lat_q + 1'b1;
          end else begin
            lat_q <= '0;
            if (rd_laddr == laddr_q) begin
              found <= 1'b1;
              data  <= rd_data;
              state <= S_DONE;
            end else if (idx_q != '0) begin
              idx_q <= idx_q - 1'b1;
            end else if (second_q) begin
              state <= S_DONE;
            end else begin
              second_q <= 1'b1;
              state    <= S_SEL;
            end
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
