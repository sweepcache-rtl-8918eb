// workload_rig: one SweepCache data cache, its NVM and a processor model running a
// synthetic region workload without power failures; used by tb_region_workload.
//
// The processor model issues N_REGIONS compiler-style regions. Each region has 4 to 35
// instructions (19.5 on average); an instruction is a store with probability 0.20, a
// load with 0.25, otherwise one cycle of computation. That gives about 3.9 stores per
// region, the average region shape the design was tuned for. Addresses come from a hot
// 1 KB frame (70 %), a sequentially walked 8 KB array (25 %) and a 64 KB range (5 %);
// these mixes are this testbench's own. Every region ends with two checkpoint stores
// (a live-out register and the next region's number) and a region end.
//
// Every load is compared with a reference memory, and after the last region the NVM
// contents are compared with it too. The rig counts accesses, misses, buffer probes,
// empty-bit bypasses, T_wait cycles and, per region, the persistence latency T_p: the
// cycles from the region end until its buffer reaches (1,1). The parallelism
// efficiency is (sum T_p - sum T_wait) / sum T_p.
//
// Interface: clk in; done rises when the run is over, with checks, failures, cycles
// and the counters valid from then on. N_SETS sets the cache size (2 ways of 64-byte
// lines per set), DEPTH the persist buffer entries (the compiler's store threshold)
// and EMPTY_BIT selects the search variant. A region holds at most 37 stores and
// needs at most one buffer entry per store; with DEPTH = 32 the buffer's overflow
// assertion confirms that no region of this workload needs more than 32.
module workload_rig
  import sweepcache_pkg::*;
#(
  parameter int unsigned N_SETS    = CACHE_SETS,
  parameter int unsigned DEPTH     = PB_DEPTH,
  parameter bit          EMPTY_BIT = 1'b1,
  parameter int unsigned N_REGIONS = 2000,
  parameter int unsigned SEED      = 32'h2468_ACE1
) (
  input  logic   clk,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint cycles,
  output int     n_acc,
  output int     n_miss,
  output int     n_bypass,
  output int     n_probe,
  output int     n_wait,
  output longint sum_tp
);

  localparam addr_t CKPT_ADDR = addr_t'(24'h02_0000);

  logic        rst_n = 1'b0, por_n = 1'b0;
  logic        cpu_req = 1'b0, cpu_we = 1'b0;
  addr_t       cpu_addr = '0;
  word_t       cpu_wdata = '0;
  logic [3:0]  cpu_be = '0;
  logic        cpu_ack;
  word_t       cpu_rdata;
  logic        re_req = 1'b0, re_ack, ready;
  rec_action_t rec_action;
  logic        nvm_req, nvm_we, nvm_ack;
  laddr_t      nvm_laddr;
  line_t       nvm_wdata, nvm_rdata;
  logic        cur_buf;
  phase_t      status [2];
  logic [1:0]  pb_empty;
  sc_events_t  events;

  sweepcache_top #(.N_SETS(N_SETS), .DEPTH(DEPTH), .EMPTY_BIT(EMPTY_BIT)) dut (
    .clk, .rst_n, .por_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_be, .cpu_ack, .cpu_rdata,
    .re_req, .re_ack, .ready, .rec_action,
    .nvm_req, .nvm_we, .nvm_laddr, .nvm_wdata, .nvm_ack, .nvm_rdata,
    .cur_buf, .status, .pb_empty, .events
  );

  nvm_model u_nvm (
    .clk, .req(nvm_req), .we(nvm_we), .laddr(nvm_laddr), .wdata(nvm_wdata),
    .ack(nvm_ack), .rdata(nvm_rdata)
  );

  // ---------------- counters ----------------
  longint t_end [2];
  logic   p2_q [2];
  initial begin
    checks = 0; failures = 0; cycles = 0; done = 1'b0;
    n_acc = 0; n_miss = 0; n_bypass = 0; n_probe = 0; n_wait = 0; sum_tp = 0;
    t_end[0] = 0; t_end[1] = 0; p2_q[0] = 1'b1; p2_q[1] = 1'b1;
  end
  always @(posedge clk) if (rst_n && !done) begin
    cycles   <= cycles + 1;
    n_miss   <= n_miss + int'(events.miss);
    n_bypass <= n_bypass + int'(events.search_bypass);
    n_probe  <= n_probe + int'(events.search_probe);
    n_wait   <= n_wait + int'(events.region_wait);
    // a region end hands the running buffer to persistence
    if (re_req && re_ack) t_end[cur_buf] <= cycles;
    for (int b = 0; b < 2; b++) begin
      p2_q[b] <= status[b].p2;
      if (status[b].p2 && !p2_q[b] && status[b].p1) sum_tp <= sum_tp + (cycles - t_end[b]);
    end
  end

  // ---------------- reference memory ----------------
  word_t gold [addr_t];

  function automatic word_t gold_rd(addr_t a);
    return gold.exists(a) ? gold[a] : '0;
  endfunction

  function automatic int unsigned xs(inout int unsigned s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction

  int unsigned walk = 0;   // position in the walked array, in words

  function automatic addr_t pick_addr(inout int unsigned s);
    int unsigned r = xs(s);
    int unsigned m = r % 100;
    if (m < 70) return addr_t'(32'h00_4000 + ((r >> 8) % 256) * 4);    // 1 KB frame
    if (m < 95) begin
      walk = (walk + 1) % 2048;
      return addr_t'(32'h01_0000 + walk * 4);                          // 8 KB array
    end
    return addr_t'(32'h04_0000 + ((r >> 8) % 16384) * 4);              // 64 KB range
  endfunction

  task automatic access(input bit we, input addr_t a, input word_t d);
    @(negedge clk);
    cpu_req   <= 1'b1;
    cpu_we    <= we;
    cpu_addr  <= a;
    cpu_wdata <= d;
    cpu_be    <= 4'hF;
    do @(posedge clk); while (!cpu_ack);
    n_acc++;
    if (!we) begin
      checks++;
      if (cpu_rdata !== gold_rd(a)) begin
        failures++;
        $display("FAIL %m load %h: got %h want %h", a, cpu_rdata, gold_rd(a));
      end
    end else gold[a] = d;
    @(negedge clk);
    cpu_req <= 1'b0;
  endtask

  task automatic region_end();
    @(negedge clk);
    re_req <= 1'b1;
    do @(posedge clk); while (!re_ack);
    @(negedge clk);
    re_req <= 1'b0;
  endtask

  initial begin : main
    automatic int unsigned s = SEED;
    repeat (3) @(negedge clk);
    por_n <= 1'b1;
    rst_n <= 1'b1;
    while (!ready) @(negedge clk);
    for (int r = 0; r < int'(N_REGIONS); r++) begin
      automatic int n_ins = 4 + int'(xs(s) % 32);
      for (int i = 0; i < n_ins; i++) begin
        automatic int unsigned k = xs(s) % 100;
        if (k < 20)      access(1'b1, pick_addr(s), xs(s));
        else if (k < 45) access(1'b0, pick_addr(s), '0);
        else             @(negedge clk);
      end
      access(1'b1, CKPT_ADDR + 4, xs(s));
      access(1'b1, CKPT_ADDR, word_t'(r + 1));
      region_end();
    end
    // let the last region persist, then compare NVM with the reference
    begin
      automatic int guard = 0;
      while (!(status[~cur_buf].p1 && status[~cur_buf].p2) && guard < 20000) begin
        @(negedge clk);
        guard++;
      end
    end
    foreach (gold[a]) begin
      laddr_t la;
      line_t  l;
      la = a[ADDR_W-1:OFFSET_W];
      l  = u_nvm.mem.exists(la) ? u_nvm.mem[la] : '0;
      checks++;
      if (l[a[OFFSET_W-1:2]*32 +: 32] !== gold[a]) begin
        failures++;
        $display("FAIL %m NVM word %h: got %h want %h", a, l[a[OFFSET_W-1:2]*32 +: 32], gold[a]);
      end
    end
    done = 1'b1;
  end

endmodule
