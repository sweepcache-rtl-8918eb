// tb_nvm_arbiter: random read and write requesters against a latency-free memory
// stub; checks that each request is acknowledged once with the right data, that the
// memory sees the right address and direction, and that a waiting read beats a
// waiting write.
module tb_nvm_arbiter;
  import sweepcache_pkg::*;
  logic clk = 0, rst_n = 0;
  logic r_req = 0, w_req = 0, r_ack, w_ack, m_req, m_we, m_ack;
  laddr_t r_laddr = 0, w_laddr = 0, m_laddr;
  line_t  r_rdata, w_wdata = 0, m_wdata, m_rdata;
  int checks = 0, failures = 0;
  int lat = 0, n_r = 0, n_w = 0;

  always #5 clk = ~clk;

  nvm_arbiter dut (.*);

  // memory stub: acks after 3 cycles, read data derived from the address
  assign m_ack   = m_req && (lat == 2);
  assign m_rdata = {16{32'(m_laddr) ^ 32'hA5A5_0000}};
  always @(posedge clk) begin
    lat <= (m_req && !m_ack) ? lat + 1 : 0;
    if (m_ack) begin
      checks++;
      if (m_we && (m_laddr !== w_laddr || m_wdata !== w_wdata)) begin
        failures++; $display("FAIL write routed wrong");
      end
      if (!m_we && m_laddr !== r_laddr) begin
        failures++; $display("FAIL read address wrong");
      end
    end
    if (r_ack) begin
      checks++;
      n_r++;
      if (r_rdata !== {16{32'(r_laddr) ^ 32'hA5A5_0000}}) begin
        failures++; $display("FAIL read data");
      end
    end
    if (w_ack) n_w++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : reader
    @(posedge rst_n);
    repeat (300) begin
      @(negedge clk);
      r_req = 1; r_laddr = laddr_t'($urandom);
      do @(posedge clk); while (!r_ack);
      @(negedge clk); r_req = 0;
      repeat ($urandom % 6) @(negedge clk);
    end
  end

  initial begin : writer
    @(posedge rst_n);
    repeat (300) begin
      @(negedge clk);
      w_req = 1; w_laddr = laddr_t'($urandom); w_wdata = {16{$urandom}};
      do @(posedge clk); while (!w_ack);
      @(negedge clk); w_req = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // priority: both raised in the same cycle while idle, the read goes first
    wait (n_r == 300 && n_w == 300);
    @(negedge clk);
    r_req = 1; w_req = 1; r_laddr = 5; w_laddr = 9;
    @(negedge clk);
    checks++;
    if (!(m_req && !m_we && m_laddr == 5)) begin failures++; $display("FAIL read priority"); end
    do @(posedge clk); while (!r_ack);
    @(negedge clk); r_req = 0;
    do @(posedge clk); while (!w_ack);
    @(negedge clk); w_req = 0;
    checks++;
    if (n_r != 301 || n_w != 301) begin failures++; $display("FAIL ack counts %0d %0d", n_r, n_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
