// tb_dcache_array: drives fills, byte-enabled word writes, cleans and LRU touches at
// random against a reference copy of the array, and checks lookups (hit, way, dirty),
// victim choice (invalid way first, then LRU), both read ports, and that reset drops
// all valid and dirty bits.
module tb_dcache_array;
  import sweepcache_pkg::*;
  localparam int SETS = 32, IDX_W = 5, SLOT_W = 6, TAG_W = LADDR_W - IDX_W, NS = 64;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] lk_index = 0, touch_index = 0;
  logic [TAG_W-1:0] lk_tag = 0, vic_tag, b_tag, fl_tag = 0;
  logic lk_hit, lk_way, lk_dirty, vic_way, vic_valid, vic_dirty;
  logic [SLOT_W-1:0] a_slot = 0, b_slot = 0, ww_slot = 0, fl_slot = 0, cl_slot = 0;
  line_t a_data, b_data, fl_data = 0;
  logic ww_en = 0, fl_en = 0, cl_en = 0, touch_en = 0, touch_way = 0;
  logic [3:0] ww_word = 0, ww_be = 0;
  word_t ww_data = 0;
  int checks = 0, failures = 0;

  line_t            m_data [NS];
  logic [TAG_W-1:0] m_tag [NS];
  logic [NS-1:0]    m_valid, m_dirty;
  logic [SETS-1:0]  m_lru;

  always #5 clk = ~clk;

  dcache_array dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic probe(logic [IDX_W-1:0] idx, logic [TAG_W-1:0] tag);
    logic h0, h1, vw;
    lk_index = idx; lk_tag = tag;
    a_slot = $urandom; b_slot = $urandom;
    #1;
    h0 = m_valid[{idx, 1'b0}] && m_tag[{idx, 1'b0}] == tag;
    h1 = m_valid[{idx, 1'b1}] && m_tag[{idx, 1'b1}] == tag;
    vw = !m_valid[{idx, 1'b0}] ? 1'b0 : !m_valid[{idx, 1'b1}] ? 1'b1 : m_lru[idx];
    chk(lk_hit == (h0 || h1), "hit");
    if (h0 || h1) begin
      chk(lk_way == h1, "way");
      chk(lk_dirty == m_dirty[{idx, h1}], "dirty of hit");
    end
    chk(vic_way == vw, $sformatf("victim way set %0d", idx));
    chk(vic_valid == m_valid[{idx, vw}], "victim valid");
    if (m_valid[{idx, vw}]) begin
      chk(vic_dirty == m_dirty[{idx, vw}], "victim dirty");
      chk(vic_tag == m_tag[{idx, vw}], "victim tag");
    end
    chk(a_data == m_data[a_slot] || !m_valid[a_slot], "port A data");
    chk(b_data == m_data[b_slot] || !m_valid[b_slot], "port B data");
    chk(b_tag == m_tag[b_slot] || !m_valid[b_slot], "port B tag");
  endtask

  initial begin
    m_valid = '0; m_dirty = '0; m_lru = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a few tags per set so that lookups hit often
    for (int i = 0; i < 4000; i++) begin
      int op;
      logic [SLOT_W-1:0] s;
      op = $urandom % 4;
      s  = SLOT_W'($urandom);
      fl_en = 0; ww_en = 0; cl_en = 0; touch_en = 0;
      case (op)
        0: begin fl_en = 1; fl_slot = s; fl_tag = TAG_W'($urandom % 4);
                 fl_data = {16{$urandom}}; end
        1: begin ww_en = 1; ww_slot = s; ww_word = 4'($urandom); ww_be = 4'($urandom);
                 ww_data = $urandom; end
        2: begin cl_en = 1; cl_slot = s; end
        default: begin touch_en = 1; touch_index = 5'($urandom); touch_way = 1'($urandom); end
      endcase
      @(negedge clk);
      case (op)
        0: begin m_data[s] = fl_data; m_tag[s] = fl_tag; m_valid[s] = 1; m_dirty[s] = 0; end
        1: begin
          for (int b = 0; b < 4; b++)
            if (ww_be[b]) m_data[s][ww_word*32 + b*8 +: 8] = ww_data[b*8 +: 8];
          m_dirty[s] = 1;
        end
        2: m_dirty[s] = 0;
        default: m_lru[touch_index] = ~touch_way;
      endcase
      fl_en = 0; ww_en = 0; cl_en = 0; touch_en = 0;
      probe(5'($urandom), TAG_W'($urandom % 4));
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_valid = '0; m_dirty = '0; m_lru = '0;
    for (int i = 0; i < 32; i++) probe(5'(i), TAG_W'(i % 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
