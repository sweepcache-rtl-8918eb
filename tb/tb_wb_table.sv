// tb_wb_table: random set/clear traffic against a reference bit vector; checks the
// bits, the any flag and the lowest-set-bit index every cycle, plus clear_all and reset.
module tb_wb_table;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic set_en = 0, clr_en = 0, clear_all = 0;
  logic [5:0] set_idx = 0, clr_idx = 0;
  logic [N-1:0] bits;
  logic any;
  logic [5:0] first_idx;
  int checks = 0, failures = 0;
  logic [N-1:0] ref_bits;

  always #5 clk = ~clk;

  wb_table #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int f;
    f = 0;
    for (int i = N - 1; i >= 0; i--) if (ref_bits[i]) f = i;
    checks++;
    if (bits !== ref_bits || any !== (|ref_bits) || (|ref_bits && first_idx !== 6'(f))) begin
      failures++;
      $display("FAIL bits %h want %h first %0d want %0d", bits, ref_bits, first_idx, f);
    end
  endtask

  initial begin
    ref_bits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 3000; i++) begin
      set_en  = ($urandom % 3) != 0;
      clr_en  = ($urandom % 3) == 0;
      set_idx = 6'($urandom);
      clr_idx = ($urandom % 2) ? set_idx : 6'($urandom);
      clear_all = ($urandom % 200) == 0;
      @(negedge clk);
      if (clear_all) ref_bits = '0;
      else begin
        if (clr_en) ref_bits[clr_idx] = 1'b0;
        if (set_en) ref_bits[set_idx] = 1'b1;
      end
      compare();
    end
    set_en = 0; clr_en = 0; clear_all = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    ref_bits = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
