// wb_table: write-back-instructive table.
//
// One bit per cache line slot (64 bits for a 4 KB cache of 64-byte lines). The cache
// controller sets a slot's bit when a store of the running region makes that line
// dirty and clears it when the line is written back early by an eviction. At the
// region boundary the flush engine walks the set bits, lowest slot first, and clears
// each as its line reaches the persist buffer, so dirty lines are found without
// scanning the cache. Two tables exist, one per persist buffer, so that the next
// region can mark its own lines while the previous region's table is being drained.
//
// Timing: set, clear and clear_all take effect at the rising edge; bits, any and
// first_idx are read combinationally. A set and a clear of the same slot in one cycle
// leave the bit set. The table is SRAM, so rst_n (power loss) clears it.
module wb_table
  import sweepcache_pkg::*;
#(
  parameter  int unsigned N    = CACHE_LINES,
  localparam int unsigned IW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_en,
  input  logic [IW-1:0] set_idx,
  input  logic          clr_en,
  input  logic [IW-1:0] clr_idx,
  input  logic          clear_all,
  output logic [N-1:0]  bits,
  output logic          any,
  output logic [IW-1:0] first_idx
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear_all) begin
      bits <= '0;
    end else begin
      if (clr_en) bits[clr_idx] <= 1'b0;
      if (set_en) bits[set_idx] <= 1'b1;
    end
  end

  assign any = |bits;

  always_comb begin
    first_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (bits[i]) first_idx = IW'(i);
  end

endmodule
