// tb_persist_status_reg: checks the power-on state, each operation, that the register
// keeps its value while por_n stays high, and a random operation sequence against a
// reference model.
module tb_persist_status_reg;
  import sweepcache_pkg::*;
  logic clk = 0, por_n = 0;
  logic advance = 0, set_p1 = 0, set_p2 = 0, release_prev = 0;
  logic cur;
  phase_t st [2];
  int checks = 0, failures = 0;
  logic   m_cur;
  phase_t m_st [2];

  always #5 clk = ~clk;

  persist_status_reg dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (cur !== m_cur || st[0] !== m_st[0] || st[1] !== m_st[1]) begin
      failures++;
      $display("FAIL %s: cur %b st0 %b st1 %b, want %b %b %b", what, cur, st[0], st[1],
               m_cur, m_st[0], m_st[1]);
    end
  endtask

  initial begin
    m_cur = 0; m_st[0] = 2'b00; m_st[1] = 2'b11;
    repeat (2) @(negedge clk);
    por_n = 1;
    compare("power-on");
    for (int i = 0; i < 2000; i++) begin
      int op;
      op = $urandom % 5;
      advance = (op == 0); set_p1 = (op == 1); set_p2 = (op == 2); release_prev = (op == 3);
      @(negedge clk);
      case (op)
        0: begin m_cur = ~m_cur; m_st[m_cur] = 2'b00; end
        1: m_st[~m_cur].p1 = 1'b1;
        2: m_st[~m_cur].p2 = 1'b1;
        3: m_st[~m_cur] = 2'b11;
        default: ;
      endcase
      compare($sformatf("op %0d", op));
    end
    advance = 0; set_p1 = 0; set_p2 = 0; release_prev = 0;
    // a region end on the power-on state: buffer 1 becomes the running one
    por_n = 0; @(negedge clk); por_n = 1;
    m_cur = 0; m_st[0] = 2'b00; m_st[1] = 2'b11;
    compare("re-init");
    advance = 1; @(negedge clk); advance = 0;
    m_cur = 1; m_st[1] = 2'b00;
    compare("advance");
    set_p1 = 1; @(negedge clk); set_p1 = 0;
    m_st[0].p1 = 1;
    compare("set_p1 acts on the previous buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
