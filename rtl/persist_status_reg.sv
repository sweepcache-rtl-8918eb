// persist_status_reg: the persistent status register of the memory controller.
//
// Holds, for each of the two persist buffers, the phase1Complete and phase2Complete
// bits, plus one bit naming the buffer of the running region (cur); the other buffer
// (prev) belongs to the region before it, which may still be persisting. All updates
// act on prev or swap the roles, and each is one write of the register, so every state
// the register can be found in after a power loss is one of (0,0), (1,0), (1,1) per
// buffer.
//
// Operations, taken at the rising edge, at most one per cycle in normal use:
//   advance      region boundary: cur <= prev, and the new cur's bits become (0,0);
//                allowed only when prev is (1,1)
//   set_p1       the previous region's s-phase1 (flush into its buffer) is done
//   set_p2       the previous region's s-phase2 (copy to NVM) is done
//   release_prev recovery dropped the previous region's buffer: mark it (1,1)
// The register is nonvolatile: only por_n, the first power-on, initialises it, to
// cur = 0 with buffer 0 at (0,0) and buffer 1 at (1,1). The bit meanings follow the
// recovery protocol; the cur bit and the operation set are this design's own.
module persist_status_reg
  import sweepcache_pkg::*;
(
  input  logic   clk,
  input  logic   por_n,
  input  logic   advance,
  input  logic   set_p1,
  input  logic   set_p2,
  input  logic   release_prev,
  output logic   cur,
  output phase_t st [2]
);

  always_ff @(posedge clk) begin
    if (!por_n) begin
      cur   <= 1'b0;
      st[0] <= '{p1: 1'b0, p2: 1'b0};
      st[1] <= '{p1: 1'b1, p2: 1'b1};
    end else if (advance) begin
      cur     <= ~cur;
      st[~cur] <= '{p1: 1'b0, p2: 1'b0};
    end else begin
      if (set_p1)       st[~cur].p1 <= 1'b1;
      if (set_p2)       st[~cur].p2 <= 1'b1;
      if (release_prev) st[~cur] <= '{p1: 1'b1, p2: 1'b1};
    end
  end

endmodule
