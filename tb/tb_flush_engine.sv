// tb_flush_engine: sets random bits in a model write-back-instructive table over a
// model cache and runs region-end flushes; checks that every marked line is pushed
// once, lowest slot first, with its {tag, set} address and data, that each push
// cleans that slot, that the buffer select is latched, and the flush time of
// WR_LAT cycles per line plus two.
module tb_flush_engine;
  import sweepcache_pkg::*;
  localparam int SLOT_W = 6, TAG_W = LADDR_W - 5, NS = 64, WR = 5;
  logic clk = 0, rst_n = 0, start = 0, buf_in = 0, buf_sel, busy, done;
  logic [NS-1:0] bits;
  logic [SLOT_W-1:0] rd_slot, cl_slot;
  line_t rd_data, push_data;
  logic [TAG_W-1:0] rd_tag;
  logic push_req, push_ack, cl_en, ev_line;
  laddr_t push_laddr;
  int checks = 0, failures = 0, wc = 0;
  line_t m_data [NS];
  logic [TAG_W-1:0] m_tag [NS];
  int pushed [$];

  always #5 clk = ~clk;

  flush_engine dut (.*);

  assign rd_data  = m_data[rd_slot];
  assign rd_tag   = m_tag[rd_slot];
  assign push_ack = push_req && (wc == WR - 1);
  always @(posedge clk) begin
    wc <= (push_req && !push_ack) ? wc + 1 : 0;
    if (push_ack) begin
      checks++;
      if (push_laddr != {m_tag[rd_slot], rd_slot[5:1]} || push_data != m_data[rd_slot]) begin
        failures++; $display("FAIL pushed entry of slot %0d", rd_slot);
      end
      pushed.push_back(int'(rd_slot));
    end
    if (cl_en) bits[cl_slot] <= 1'b0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    bits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [NS-1:0] set;
      int n, cyc, k;
      bit b;
      set = (t % 5 == 0) ? '0 : {$urandom, $urandom} & {$urandom, $urandom};
      for (int i = 0; i < NS; i++) begin m_data[i] = {16{$urandom}}; m_tag[i] = TAG_W'($urandom); end
      bits = set;
      n = $countones(set);
      b = 1'($urandom);
      pushed.delete();
      @(negedge clk);
      start = 1; buf_in = b;
      @(negedge clk);
      start = 0; buf_in = ~b;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(buf_sel == b, "buffer select latched");
      chk(bits == '0, "table drained");
      chk(pushed.size() == n, $sformatf("pushed %0d want %0d", pushed.size(), n));
      k = 0;
      for (int i = 0; i < NS; i++)
        if (set[i]) begin
          chk(k < pushed.size() && pushed[k] == i, "ascending slot order");
          k++;
        end
      chk(cyc == n * WR + 2, $sformatf("flush of %0d lines took %0d cycles", n, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
