// tb_region_workload: the design under a long, failure-free region workload, in the
// configurations the design was evaluated in: the default 4 KB cache with empty-bits,
// the same cache with the variant that reads each buffer's fill pointer from NVM on
// every miss, caches of 512 B, 1 KB, 2 KB, 8 KB and 16 KB with empty-bits, and
// persist buffers of 32, 128 and 256 entries (the store thresholds evaluated besides
// the default 64) with the 4 KB cache.
//
// Every rig runs the same 2000 regions of the same synthetic program (see
// workload_rig: 19.5 instructions and 3.9 stores per region on average) and checks
// every load and, at the end, the NVM contents against a reference. This testbench
// then prints, per configuration, the cycle count, the miss rate, the share of buffer
// consultations (two per miss) the empty-bits skipped and the region-level parallelism
// efficiency (sum T_p - sum T_wait) / sum T_p, and checks: the empty-bit variant skips
// more consultations than the other and takes no more cycles; at least half of the
// consultations are skipped; each efficiency lies between 0 and 100 %; a larger cache
// never misses more often nor takes more cycles than a smaller one. The thresholds are
// this testbench's own; the workload is synthetic, so its numbers are not those of
// real programs. Since the regions are the same at every threshold, the buffer
// size must not change the cycle count.
module tb_region_workload;

  localparam int NV = 10;
  // configuration v: sets of the cache (2 ways x 64 B each), buffer entries, empty-bit use
  localparam int unsigned SETS  [NV] = '{32, 32, 4, 8, 16, 64, 128, 32, 32, 32};
  localparam int unsigned DEPTH [NV] = '{64, 64, 64, 64, 64, 64, 64, 32, 128, 256};
  localparam bit          EBIT  [NV] = '{1'b1, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic   done [NV];
  int     checks_v [NV], failures_v [NV], n_acc [NV], n_miss [NV], n_bypass [NV], n_probe [NV], n_wait [NV];
  longint cycles [NV], sum_tp [NV];

  for (genvar v = 0; v < NV; v++) begin : g_cfg
    workload_rig #(.N_SETS(SETS[v]), .DEPTH(DEPTH[v]), .EMPTY_BIT(EBIT[v])) u_rig (
      .clk, .done(done[v]), .checks(checks_v[v]), .failures(failures_v[v]),
      .cycles(cycles[v]), .n_acc(n_acc[v]), .n_miss(n_miss[v]), .n_bypass(n_bypass[v]),
      .n_probe(n_probe[v]), .n_wait(n_wait[v]), .sum_tp(sum_tp[v])
    );
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    for (int v = 0; v < NV; v++) $display("  configuration %0d: done=%0d accesses=%0d", v, done[v], n_acc[v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  function automatic bit all_done();
    for (int v = 0; v < NV; v++) if (!done[v]) return 1'b0;
    return 1'b1;
  endfunction

  // configurations with empty-bits, from the smallest cache to the largest
  localparam int ORDER [6] = '{2, 3, 4, 0, 5, 6};

  initial begin : main
    real eff [NV], skip [NV], mr [NV];
    repeat (2) @(posedge clk);   // let the rigs clear their outputs first
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      checks   += checks_v[v];
      failures += failures_v[v];
      mr[v]   = 100.0 * real'(n_miss[v]) / real'(n_acc[v]);
      skip[v] = 100.0 * real'(n_bypass[v]) / real'(2 * n_miss[v]);
      eff[v]  = 100.0 * real'(sum_tp[v] - longint'(n_wait[v])) / real'(sum_tp[v]);
      $display("%5d B, %3d entries, %s: cycles=%0d accesses=%0d miss rate=%0.2f%% skipped=%0.1f%% T_p=%0d T_wait=%0d efficiency=%0.1f%%",
               SETS[v] * 128, DEPTH[v], EBIT[v] ? "empty-bit " : "NVM search", cycles[v], n_acc[v], mr[v],
               skip[v], sum_tp[v], n_wait[v], eff[v]);
      check(eff[v] > 0.0 && eff[v] <= 100.0, "efficiency out of range");
      check(n_miss[v] > 0, "no misses");
    end
    check(n_bypass[0] > n_bypass[1], "empty-bit skips no more searches");
    check(cycles[0] <= cycles[1], "empty-bit variant is slower");
    check(skip[0] >= 50.0, "empty-bits skip under half of the consultations");
    for (int i = 1; i < 6; i++) begin
      check(n_miss[ORDER[i]] <= n_miss[ORDER[i-1]], "a larger cache misses more often");
      check(cycles[ORDER[i]] <= cycles[ORDER[i-1]], "a larger cache is slower");
    end
    for (int v = 7; v < NV; v++)
      check(cycles[v] == cycles[0] && n_miss[v] == n_miss[0], "buffer size changed the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
