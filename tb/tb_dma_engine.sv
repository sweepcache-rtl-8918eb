// tb_dma_engine: copies buffers of random fill (including duplicate line addresses
// and an empty buffer) to a model NVM and checks the write order (oldest first), the
// final NVM contents (youngest copy wins), done, and the cycle count:
// per entry RD_LAT + the NVM write time.
module tb_dma_engine;
  import sweepcache_pkg::*;
  localparam int DEPTH = 64, RD_LAT = 2, WR = 12;
  logic clk = 0, rst_n = 0, start = 0, buf_in = 0, busy, done, rd_buf, nvm_req, ev_line;
  logic nvm_ack;
  logic [6:0] count = 0;
  logic [5:0] rd_idx;
  laddr_t rd_laddr, nvm_laddr;
  line_t  rd_data, nvm_wdata;
  int checks = 0, failures = 0, wcnt = 0, n_wr = 0;
  laddr_t b_a [2][DEPTH];
  line_t  b_d [2][DEPTH];
  line_t  mem [laddr_t];
  laddr_t order [$];

  always #5 clk = ~clk;

  dma_engine dut (.*);

  assign rd_laddr = b_a[rd_buf][rd_idx];
  assign rd_data  = b_d[rd_buf][rd_idx];
  assign nvm_ack  = nvm_req && (wcnt == WR - 1);
  always @(posedge clk) begin
    wcnt <= (nvm_req && !nvm_ack) ? wcnt + 1 : 0;
    if (nvm_ack) begin mem[nvm_laddr] = nvm_wdata; order.push_back(nvm_laddr); n_wr++; end
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

  task automatic run(bit b, int n);
    int cyc;
    line_t want [laddr_t];
    order.delete();
    mem.delete();
    for (int i = 0; i < n; i++) begin
      b_a[b][i] = laddr_t'($urandom % 16);     // duplicates on purpose
      b_d[b][i] = {16{$urandom}};
      want[b_a[b][i]] = b_d[b][i];
      b_a[~b][i] = '1; b_d[~b][i] = '0;       // the other buffer must not be read
    end
    @(negedge clk);
    start = 1; buf_in = b; count = 7'(n);
    @(negedge clk);
    start = 0; count = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(order.size() == n, $sformatf("wrote %0d lines, want %0d", order.size(), n));
    for (int i = 0; i < n && i < order.size(); i++)
      chk(order[i] == b_a[b][i], "write order");
    foreach (want[a]) chk(mem.exists(a) && mem[a] == want[a], "youngest copy in NVM");
    // one cycle to start, per entry RD_LAT + WR, then done
    chk(cyc == ((n == 0) ? 1 : 1 + n * (RD_LAT + WR)),
        $sformatf("%0d entries took %0d cycles", n, cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 10);
    run(1, 64);
    run(0, 0);
    run(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
