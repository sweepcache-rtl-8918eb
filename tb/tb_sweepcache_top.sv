// tb_sweepcache_top: end-to-end test of the SweepCache data cache at its default size.
//
// The testbench plays the processor. It runs a program of generated regions: each
// region is a deterministic sequence of word loads and stores (at most 60 stores) over
// a 16 KB address range with a hot set of conflicting lines, closed by a checkpoint
// store that writes the number of the next region to a fixed checkpoint word, as the
// compiler's PC checkpoint would, and then a region end. A reference memory checks
// every load. Power failures are injected while the previous region's buffer is in
// each of the three states (0,0), (1,0) and (1,1); after each one the testbench waits
// for recovery, reads the checkpoint word through the cache to find where to resume,
// checks it against the recovery case, restores its reference to that region's start
// and re-runs from there. At the end it waits until everything is persisted and
// compares the NVM contents with the reference. It also counts each mechanism (hits,
// misses, dirty evictions, empty-bit bypasses, buffer hits, WAW stalls, T_wait,
// flushes, DMA copies, each recovery case) and fails if one never happened.
module tb_sweepcache_top;
  import sweepcache_pkg::*;

  localparam int unsigned N_REGIONS = 400;
  localparam addr_t       CKPT_ADDR = addr_t'(24'h00_8000);  // line 512, word 0

  logic        clk = 1'b0;
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

  always #5 clk = ~clk;

  sweepcache_top dut (
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

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- event counters ----------------
  int n_hit, n_miss, n_evict, n_bypass, n_probe, n_shit, n_fill, n_waw, n_re, n_wait;
  int n_flush, n_dma, n_replay, n_discard, n_resume, n_fail;
  initial begin
    n_hit = 0; n_miss = 0; n_evict = 0; n_bypass = 0; n_probe = 0; n_shit = 0;
    n_fill = 0; n_waw = 0; n_re = 0; n_wait = 0; n_flush = 0; n_dma = 0;
    n_replay = 0; n_discard = 0; n_resume = 0; n_fail = 0;
  end
  always @(posedge clk) if (rst_n) begin
    n_hit     <= n_hit     + int'(events.hit);
    n_miss    <= n_miss    + int'(events.miss);
    n_evict   <= n_evict   + int'(events.evict_wb);
    n_bypass  <= n_bypass  + int'(events.search_bypass);
    n_probe   <= n_probe   + int'(events.search_probe);
    n_shit    <= n_shit    + int'(events.search_hit);
    n_fill    <= n_fill    + int'(events.nvm_fill);
    n_waw     <= n_waw     + int'(events.waw_stall);
    n_re      <= n_re      + int'(events.region_end);
    n_wait    <= n_wait    + int'(events.region_wait);
    n_flush   <= n_flush   + int'(events.flush_line);
    n_dma     <= n_dma     + int'(events.dma_line);
    n_replay  <= n_replay  + int'(events.rec_replay);
    n_discard <= n_discard + int'(events.rec_discard);
  end

  // ---------------- reference memory ----------------
  word_t gold [addr_t];
  word_t snap [int][addr_t];

  function automatic word_t gold_rd(addr_t a);
    return gold.exists(a) ? gold[a] : '0;
  endfunction

  // deterministic generator, so a region can be re-run after a rollback
  function automatic int unsigned xs(inout int unsigned s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction

  function automatic addr_t pick_addr(inout int unsigned s);
    int unsigned r = xs(s);
    laddr_t la;
    if (r[0]) la = laddr_t'(((r >> 4) % 8) * 32 + ((r >> 8) % 4));  // 4 sets x 8 tags
    else      la = laddr_t'((r >> 4) % 256);                         // 16 KB range
    return addr_t'({la, 6'd0}) + addr_t'(((r >> 12) % 16) * 4);
  endfunction

  // ---------------- power failure injection ----------------
  logic pf = 1'b0;       // set while a failure is in progress
  logic stop_pf = 1'b0;  // no more failures (final drain)
  initial begin
    int unsigned seed = 32'h1234_5678;
    int target;
    int waited;
    @(posedge por_n);
    forever begin
      repeat (200 + (xs(seed) % 1200)) @(posedge clk);
      target = n_fail % 3;   // 0: prev (0,0), 1: prev (1,0), 2: prev (1,1)
      waited = 0;
      while (waited < 3000) begin
        @(negedge clk);
        waited++;
        if (ready && !re_req && (
            (target == 0 && !status[~cur_buf].p1) ||
            (target == 1 &&  status[~cur_buf].p1 && !status[~cur_buf].p2) ||
            (target == 2 &&  status[~cur_buf].p1 &&  status[~cur_buf].p2)))
          break;
      end
      if (stop_pf) break;
      pf     = 1'b1;
      rst_n <= 1'b0;
      n_fail++;
      repeat (4) @(negedge clk);
      rst_n <= 1'b1;
      pf     = 1'b0;
    end
  end

  // ---------------- processor ----------------
  task automatic access(input bit we, input addr_t a, input word_t d, input logic [3:0] be,
                        output word_t q, output bit aborted);
    aborted = 1'b0;
    q       = '0;
    @(negedge clk);
    if (!rst_n) begin aborted = 1'b1; return; end
    cpu_req   <= 1'b1;
    cpu_we    <= we;
    cpu_addr  <= a;
    cpu_wdata <= d;
    cpu_be    <= be;
    forever begin
      @(posedge clk);
      if (!rst_n) begin
        aborted = 1'b1;
        break;
      end
      if (cpu_ack) begin
        q = cpu_rdata;
        break;
      end
    end
    @(negedge clk);
    cpu_req <= 1'b0;
  endtask

  task automatic region_end(output bit aborted, output int wait_cycles);
    aborted     = 1'b0;
    wait_cycles = 0;
    @(negedge clk);
    if (!rst_n) begin aborted = 1'b1; return; end
    re_req <= 1'b1;
    forever begin
      @(posedge clk);
      if (!rst_n) begin aborted = 1'b1; break; end
      if (re_ack) break;
      wait_cycles++;
    end
    @(negedge clk);
    re_req <= 1'b0;
  endtask

  // Run region r; returns 1 if a power failure cut it short.
  task automatic run_region(int r, output bit aborted);
    int unsigned s = 32'h9E37_79B9 ^ (r * 32'h0101_0101 + 7);
    int n_ops, n_st;
    word_t q, d;
    addr_t a;
    logic [3:0] be;
    n_ops = 4 + int'(xs(s) % 40);
    n_st  = 0;
    aborted = 1'b0;
    for (int i = 0; i < n_ops && !aborted; i++) begin
      int unsigned k = xs(s);
      a = pick_addr(s);
      if (k[1:0] != 2'b00 || n_st >= 60) begin
        access(1'b0, a, '0, 4'hF, q, aborted);
        if (!aborted) begin
          checks++;
          if (q !== gold_rd(a)) begin
            failures++;
            $display("FAIL region %0d load %h: got %h want %h", r, a, q, gold_rd(a));
          end
        end
      end else begin
        d  = xs(s);
        be = (k[5:4] == 2'b00) ? 4'(k >> 8) : 4'hF;
        access(1'b1, a, d, be, q, aborted);
        if (!aborted) begin
          word_t g = gold_rd(a);
          for (int b = 0; b < 4; b++) if (be[b]) g[b*8 +: 8] = d[b*8 +: 8];
          gold[a] = g;
          n_st++;
        end
      end
    end
    if (!aborted) begin
      // checkpoint store: the recovery point of the next region
      access(1'b1, CKPT_ADDR, word_t'(r + 1), 4'hF, q, aborted);
      if (!aborted) gold[CKPT_ADDR] = word_t'(r + 1);
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int    r;
    bit    ab;
    int    wc;
    word_t q;
    int    fails_seen;
    repeat (3) @(negedge clk);
    por_n <= 1'b1;
    rst_n <= 1'b1;
    r = 0;
    fails_seen = 0;
    snap[0] = gold;
    while (r < N_REGIONS) begin
      // wait for power and recovery
      while (!(rst_n && ready)) @(negedge clk);
      if (n_fail != fails_seen) begin
        int k;
        fails_seen = n_fail;
        if (rec_action == REC_RESUME) n_resume++;
        access(1'b0, CKPT_ADDR, '0, 4'hF, q, ab);
        if (ab) continue;
        k = int'(q);
        checks++;
        if (!((rec_action == REC_DISCARD && k == r - 1) ||
              (rec_action != REC_DISCARD && k == r))) begin
          failures++;
          $display("FAIL recovery: action %s resumes region %0d, running region was %0d",
                   rec_action.name(), k, r);
        end
        if (k < 0 || k > r) k = r;
        r    = k;
        gold = snap[r];
      end
      run_region(r, ab);
      if (ab) continue;
      region_end(ab, wc);
      if (ab) continue;
      r++;
      snap[r] = gold;
      if (r >= 2) snap.delete(r - 2);
    end
    // drain: wait until both buffers are persisted
    stop_pf = 1'b1;
    while (!(rst_n && ready)) @(negedge clk);
    begin
      int guard;
      guard = 0;
      while (!(status[0].p1 && status[0].p2) && guard < 10000) begin
        @(negedge clk);
        guard++;
      end
      // the running region's buffer is (0,0) by definition; wait for the other
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
        $display("FAIL NVM word %h: got %h want %h", a, l[a[OFFSET_W-1:2]*32 +: 32], gold[a]);
      end
    end
    $display("events: hit=%0d miss=%0d evict=%0d bypass=%0d probe=%0d buf_hit=%0d nvm_fill=%0d waw=%0d",
             n_hit, n_miss, n_evict, n_bypass, n_probe, n_shit, n_fill, n_waw);
    $display("        region_end=%0d wait_cycles=%0d flush=%0d dma=%0d failures=%0d replay=%0d discard=%0d resume=%0d cycles=%0d",
             n_re, n_wait, n_flush, n_dma, n_fail, n_replay, n_discard, n_resume, cycle);
    checks += 15;
    if (n_hit == 0)     begin failures++; $display("FAIL no cache hit"); end
    if (n_miss == 0)    begin failures++; $display("FAIL no cache miss"); end
    if (n_evict == 0)   begin failures++; $display("FAIL no dirty eviction"); end
    if (n_bypass == 0)  begin failures++; $display("FAIL no empty-bit bypass"); end
    if (n_probe == 0)   begin failures++; $display("FAIL no buffer probe"); end
    if (n_shit == 0)    begin failures++; $display("FAIL no miss served by a buffer"); end
    if (n_fill == 0)    begin failures++; $display("FAIL no NVM fill"); end
    if (n_waw == 0)     begin failures++; $display("FAIL no WAW stall"); end
    if (n_re == 0)      begin failures++; $display("FAIL no region end"); end
    if (n_wait == 0)    begin failures++; $display("FAIL no T_wait"); end
    if (n_flush == 0)   begin failures++; $display("FAIL no region-end flush"); end
    if (n_dma == 0)     begin failures++; $display("FAIL no DMA copy"); end
    if (n_replay == 0)  begin failures++; $display("FAIL no (1,0) recovery"); end
    if (n_discard == 0) begin failures++; $display("FAIL no (0,0) recovery"); end
    if (n_resume == 0)  begin failures++; $display("FAIL no (1,1) recovery"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
