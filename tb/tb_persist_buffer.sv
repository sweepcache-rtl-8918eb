// tb_persist_buffer: checks the write latency of a push (WR_LAT cycles), FIFO contents
// through both read ports, the empty-bit and count, filling to full, discard, that a
// power-up reset (rst_n) keeps the contents while power-on reset (por_n) clears them.
module tb_persist_buffer;
  import sweepcache_pkg::*;
  localparam int DEPTH = 64, WR_LAT = 12;
  logic clk = 0, rst_n = 0, por_n = 0, discard = 0, push_req = 0, push_ack;
  laddr_t push_laddr = 0, rd0_laddr, rd1_laddr;
  line_t  push_data = 0, rd0_data, rd1_data;
  logic [5:0] rd0_idx = 0, rd1_idx = 0;
  logic [6:0] count;
  logic empty, full;
  int checks = 0, failures = 0;
  laddr_t m_a [DEPTH];
  line_t  m_d [DEPTH];

  always #5 clk = ~clk;

  persist_buffer dut (.*);

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

  task automatic push(laddr_t a, line_t d, output int cycles);
    @(negedge clk);
    push_req = 1; push_laddr = a; push_data = d;
    cycles = 1;
    while (1) begin
      @(posedge clk);
      if (push_ack) break;
      cycles++;
    end
    @(negedge clk);
    push_req = 0;
  endtask

  task automatic check_all(int n);
    chk(count == 7'(n), $sformatf("count %0d want %0d", count, n));
    chk(empty == (n == 0), "empty-bit");
    chk(full == (n == DEPTH), "full");
    for (int i = 0; i < n; i++) begin
      rd0_idx = 6'(i); rd1_idx = 6'(n - 1 - i);
      #1;
      chk(rd0_laddr == m_a[i] && rd0_data == m_d[i], $sformatf("port 0 entry %0d", i));
      chk(rd1_laddr == m_a[n-1-i] && rd1_data == m_d[n-1-i], "port 1 entry");
    end
  endtask

  initial begin
    int c;
    repeat (2) @(negedge clk);
    por_n = 1; rst_n = 1;
    @(negedge clk);
    check_all(0);
    for (int i = 0; i < 20; i++) begin
      m_a[i] = laddr_t'($urandom); m_d[i] = {16{$urandom}};
      push(m_a[i], m_d[i], c);
      chk(c == WR_LAT, $sformatf("push took %0d cycles, want %0d", c, WR_LAT));
    end
    check_all(20);
    // power loss: contents stay
    rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
    check_all(20);
    // discard
    discard = 1; @(negedge clk); discard = 0;
    check_all(0);
    for (int i = 0; i < DEPTH; i++) begin
      m_a[i] = laddr_t'($urandom); m_d[i] = {16{$urandom}};
      push(m_a[i], m_d[i], c);
    end
    check_all(DEPTH);
    // power-on reset clears
    por_n = 0; rst_n = 0; @(negedge clk); por_n = 1; rst_n = 1;
    check_all(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
