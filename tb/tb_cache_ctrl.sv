// tb_cache_ctrl: the controller with a real dcache_array, a functional model of the
// running region's persist buffer (pushes recorded, youngest-first search) and a model
// NVM. Random word loads and stores over 16 KB are checked against a reference memory;
// the table bits the controller sets and clears must equal the cache's dirty bits.
// Directed parts check the single-cycle hit, the write-after-write stall of a store to
// a dirty line and of a miss with a dirty victim while the previous region is being
// flushed, that clean-line stores are not held back, and that enable gates requests.
module tb_cache_ctrl;
  import sweepcache_pkg::*;
  localparam int IDX_W = 5, SLOT_W = 6, TAG_W = LADDR_W - IDX_W, NS = 64;
  logic clk = 0, rst_n = 0, enable = 0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack;
  addr_t cpu_addr = 0;
  word_t cpu_wdata = 0, cpu_rdata;
  logic [3:0] cpu_be = 4'hF;
  logic prev_p1 = 1, idle;
  logic [IDX_W-1:0] lk_index, touch_index;
  logic [TAG_W-1:0] lk_tag, vic_tag, fl_tag, b_tag;
  logic lk_hit, lk_way, lk_dirty, vic_way, vic_valid, vic_dirty;
  logic [SLOT_W-1:0] a_slot, ww_slot, fl_slot, wbit_set_idx, wbit_clr_idx;
  line_t a_data, fl_data, b_data;
  logic ww_en, fl_en, touch_en, touch_way, wbit_set_en, wbit_clr_en;
  logic [3:0] ww_word, ww_be;
  word_t ww_data;
  logic ev_push_req, ev_push_ack, srch_start, srch_done, srch_found, rd_req, rd_ack;
  laddr_t ev_push_laddr, srch_laddr, rd_laddr;
  line_t ev_push_data, srch_data, rd_data;
  logic ev_hit, ev_miss, ev_evict, ev_nvm_fill, ev_waw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cache_ctrl dut (.*);

  dcache_array u_arr (
    .clk, .rst_n, .lk_index, .lk_tag, .lk_hit, .lk_way, .lk_dirty,
    .vic_way, .vic_valid, .vic_dirty, .vic_tag, .a_slot, .a_data,
    .b_slot(6'd0), .b_data, .b_tag,
    .ww_en, .ww_slot, .ww_word, .ww_data, .ww_be,
    .fl_en, .fl_slot, .fl_tag, .fl_data,
    .cl_en(1'b0), .cl_slot(6'd0),
    .touch_en, .touch_index, .touch_way
  );

  // ---- models ----
  function automatic line_t nvm_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = {a[15:0], 16'(w * 4099 + 1)};
    return l;
  endfunction

  laddr_t pb_a [$];
  line_t  pb_d [$];
  int pcnt = 0, scnt = 0, rcnt = 0;
  logic srch_busy = 0;
  laddr_t s_a;
  logic [NS-1:0] wbit_m;

  assign ev_push_ack = ev_push_req && pcnt == 3;
  assign rd_ack      = rd_req && rcnt == 2;
  assign rd_data     = nvm_line(rd_laddr);
  always @(posedge clk) begin
    pcnt <= (ev_push_req && !ev_push_ack) ? pcnt + 1 : 0;
    rcnt <= (rd_req && !rd_ack) ? rcnt + 1 : 0;
    if (ev_push_ack) begin pb_a.push_back(ev_push_laddr); pb_d.push_back(ev_push_data); end
    if (!rst_n) wbit_m <= '0;
    else begin
      if (wbit_clr_en) wbit_m[wbit_clr_idx] <= 1'b0;
      if (wbit_set_en) wbit_m[wbit_set_idx] <= 1'b1;
    end
  end
  // search: youngest first, answers after 2 cycles
  always @(posedge clk) begin
    srch_done <= 1'b0;
    if (srch_start) begin srch_busy <= 1; s_a <= srch_laddr; scnt <= 0; end
    else if (srch_busy) begin
      scnt <= scnt + 1;
      if (scnt == 1) begin
        srch_busy  <= 0;
        srch_done  <= 1;
        srch_found <= 0;
        for (int i = 0; i < pb_a.size(); i++)
          if (pb_a[i] == s_a) begin srch_found <= 1; srch_data <= pb_d[i]; end
      end
    end
  end
  // invariant between accesses: table bits are exactly the dirty lines (no flush here)
  always @(negedge clk) if (rst_n && prev_p1 && idle) begin
    checks++;
    if (wbit_m !== u_arr.dirty) begin
      failures++; $display("FAIL table %h dirty %h", wbit_m, u_arr.dirty);
    end
  end

  word_t gold [addr_t];
  function automatic word_t gold_rd(addr_t a);
    laddr_t la;
    line_t  l;
    la = a[ADDR_W-1:6];
    l  = nvm_line(la);
    return gold.exists(a) ? gold[a] : l[a[5:2]*32 +: 32];
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // issue one access; returns the number of cycles until ack (1 = same cycle)
  task automatic access(bit we, addr_t a, word_t d, logic [3:0] be, output word_t q,
                        output int cyc);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = be;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!cpu_ack && cyc < 500);
    q = cpu_rdata;
    @(negedge clk);
    cpu_req = 0;
  endtask

  task automatic load_check(addr_t a);
    word_t q;
    int c;
    access(0, a, 0, 4'hF, q, c);
    chk(q == gold_rd(a), $sformatf("load %h got %h want %h", a, q, gold_rd(a)));
  endtask

  task automatic store(addr_t a, word_t d, logic [3:0] be);
    word_t q, g;
    int c;
    access(1, a, d, be, q, c);
    g = gold_rd(a);
    for (int b = 0; b < 4; b++) if (be[b]) g[b*8 +: 8] = d[b*8 +: 8];
    gold[a] = g;
  endtask

  initial begin
    word_t q;
    int c, ev0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // enable gates requests
    @(negedge clk);
    cpu_req = 1; cpu_addr = 24'h40;
    repeat (5) @(negedge clk);
    chk(!cpu_ack && idle, "no service while disabled");
    cpu_req = 0;
    enable = 1;
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      addr_t a;
      a = addr_t'(($urandom % 4096) * 4);
      if ($urandom % 2) store(a, $urandom, ($urandom % 4 == 0) ? 4'($urandom) : 4'hF);
      else              load_check(a);
    end
    chk(pb_a.size() > 0, "dirty victims were written back");
    // single-cycle hit
    load_check(24'h100);
    access(0, 24'h104, 0, 4'hF, q, c);
    chk(c == 1, $sformatf("load hit took %0d cycles", c));
    // WAW: store to a dirty line while the previous region is flushing
    store(24'h100, 32'h1111_2222, 4'hF);      // line now dirty
    prev_p1 = 0;
    ev0 = 0;
    @(negedge clk);
    cpu_req = 1; cpu_we = 1; cpu_addr = 24'h108; cpu_wdata = 32'hCAFE_F00D; cpu_be = 4'hF;
    repeat (20) begin
      @(posedge clk);
      if (cpu_ack) ev0++;
    end
    chk(ev0 == 0, "store to a dirty line waits while phase1Complete = 0");
    @(negedge clk);
    prev_p1 = 1;
    do @(posedge clk); while (!cpu_ack);
    @(negedge clk);
    cpu_req = 0;
    gold[24'h108] = 32'hCAFE_F00D;
    load_check(24'h108);
    // a store to a clean line is not held back
    load_check(24'h2000);
    prev_p1 = 0;
    access(1, 24'h2004, 32'h5555_AAAA, 4'hF, q, c);
    gold[24'h2004] = 32'h5555_AAAA;
    chk(c == 1, "store to a clean line proceeds during the flush");
    // a miss whose victim is dirty waits too: fill both ways of set 0 with dirty lines
    prev_p1 = 1;
    store(24'h0000, 1, 4'hF);
    store(24'h0800, 2, 4'hF);
    prev_p1 = 0;
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = 24'h1000;
    ev0 = 0;
    repeat (20) begin @(posedge clk); if (cpu_ack || ev_miss) ev0++; end
    chk(ev0 == 0, "miss with a dirty victim waits while phase1Complete = 0");
    @(negedge clk);
    prev_p1 = 1;
    do @(posedge clk); while (!cpu_ack);
    chk(cpu_rdata == gold_rd(24'h1000), "load after the stall");
    @(negedge clk);
    cpu_req = 0;
    // everything still reads back
    for (int i = 0; i < 4096; i += 7) load_check(addr_t'(i * 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
