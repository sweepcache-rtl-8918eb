// tb_buffer_search: random contents in two model buffers (with duplicate line
// addresses), random targets; checks found/data against a youngest-first reference
// (running region's buffer first), the number of entries probed, the empty-bit
// bypasses, and the cycle count of every search.
module tb_buffer_search;
  import sweepcache_pkg::*;
  localparam int DEPTH = 64, RD_LAT = 2;
  logic clk = 0, rst_n = 0, start = 0, first_buf = 0;
  laddr_t laddr = 0, rd_laddr;
  logic [1:0] empty;
  logic [1:0][6:0] count;
  logic rd_buf, done, found, ev_bypass, ev_probe;
  logic [5:0] rd_idx;
  line_t rd_data, data;
  int checks = 0, failures = 0, n_probe = 0, n_bypass = 0;
  laddr_t b_a [2][DEPTH];
  line_t  b_d [2][DEPTH];

  always #5 clk = ~clk;

  buffer_search dut (.*);

  assign rd_laddr = b_a[rd_buf][rd_idx];
  assign rd_data  = b_d[rd_buf][rd_idx];
  always @(posedge clk) begin
    n_probe  <= n_probe + int'(ev_probe);
    n_bypass <= n_bypass + int'(ev_bypass);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic search(laddr_t a, bit fb);
    bit    w_found;
    line_t w_data;
    int    w_probe, w_bypass, w_cyc, cyc, p0, b0;
    // reference
    w_found = 0; w_probe = 0; w_bypass = 0; w_cyc = 1; w_data = '0;
    for (int k = 0; k < 2 && !w_found; k++) begin
      bit b;
      int n;
      b = (k == 0) ? fb : ~fb;
      w_cyc++;                              // selection step
      if (count[b] == 0) begin w_bypass++; continue; end
      w_cyc += RD_LAT;                      // pointer read
      for (int i = int'(count[b]) - 1; i >= 0; i--) begin
        w_probe++;
        w_cyc += RD_LAT;
        if (b_a[b][i] == a) begin w_found = 1; w_data = b_d[b][i]; break; end
      end
    end
    p0 = n_probe; b0 = n_bypass;
    @(negedge clk);
    start = 1; laddr = a; first_buf = fb;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(found == w_found, $sformatf("found %0d want %0d", found, w_found));
    if (w_found) chk(data == w_data, "data is the youngest copy");
    @(negedge clk);
    chk(n_probe - p0 == w_probe, $sformatf("probes %0d want %0d", n_probe - p0, w_probe));
    chk(n_bypass - b0 == w_bypass, "empty-bit bypasses");
    chk(cyc == w_cyc, $sformatf("search took %0d cycles, want %0d", cyc, w_cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int b = 0; b < 2; b++) begin
        int r;
        r = $urandom % 4;
        count[b] = (r == 0) ? 7'd0 : (r == 3) ? 7'(DEPTH) : 7'($urandom % 12);
        empty[b] = (count[b] == 0);
        for (int i = 0; i < DEPTH; i++) begin
          b_a[b][i] = laddr_t'($urandom % 24);
          b_d[b][i] = {16{$urandom}};
        end
      end
      search(laddr_t'($urandom % 32), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
