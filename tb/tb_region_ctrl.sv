// tb_region_ctrl: the region controller with model flush and DMA engines. Checks the
// power-on boot, an immediate region end when the previous buffer is free, T_wait of
// a region end that must wait for the previous region's s-phase1 and s-phase2, the
// buffer hand-over and phase bits, and the three recovery cases after a power loss:
// (0,0) discards both buffers, (1,0) replays the DMA copy before ready, (1,1) only
// drops the running region's buffer.
module tb_region_ctrl;
  import sweepcache_pkg::*;
  localparam int FL = 7, DM = 15;
  logic clk = 0, rst_n = 0, por_n = 0, re_req = 0, re_ack;
  logic flush_start, flush_buf, flush_done, dma_start, dma_buf, dma_busy, dma_done;
  logic [1:0] discard;
  logic cur_buf, prev_p1, prev_busy, ready;
  phase_t status [2];
  rec_action_t rec_action;
  logic ev_region_end, ev_region_wait, ev_rec_replay, ev_rec_discard;
  int checks = 0, failures = 0;
  int fcnt = -1, dcnt = -1, n_dma_start = 0, n_flush_start = 0;
  int n_disc [2];

  always #5 clk = ~clk;

  region_ctrl dut (.*);

  // model engines: volatile, so a power loss stops them
  assign flush_done = (fcnt == 0);
  assign dma_busy   = (dcnt >= 0);
  assign dma_done   = (dcnt == 0);
  always @(posedge clk) begin
    if (!rst_n) begin fcnt <= -1; dcnt <= -1; end
    else begin
      if (flush_start) begin fcnt <= FL; n_flush_start <= n_flush_start + 1; end
      else if (fcnt >= 0) fcnt <= fcnt - 1;
      if (dma_start) begin dcnt <= DM; n_dma_start <= n_dma_start + 1; end
      else if (dcnt >= 0) dcnt <= dcnt - 1;
    end
    for (int b = 0; b < 2; b++) if (discard[b]) n_disc[b] <= n_disc[b] + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wait_ready(output int cyc);
    cyc = 0;
    while (!ready && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  task automatic region_end(output int cyc);
    @(negedge clk);
    re_req = 1;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!re_ack && cyc < 1000);
    @(negedge clk);
    re_req = 0;
  endtask

  task automatic power_cycle();
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    int c, d0, d1, s0;
    n_disc[0] = 0; n_disc[1] = 0;
    repeat (2) @(negedge clk);
    por_n = 1; rst_n = 1;
    wait_ready(c);
    chk(c <= 2 && rec_action == REC_RESUME, "cold boot: resume");
    chk(cur_buf == 0 && status[0] == 2'b00 && status[1] == 2'b11, "power-on status");
    // region 0 ends: buffer 1 is free, no wait
    region_end(c);
    chk(c == 1, $sformatf("first region end waited %0d cycles", c - 1));
    chk(n_flush_start == 1 && cur_buf == 1 && status[0] == 2'b00 && !prev_p1,
        "hand-over to buffer 1, buffer 0 flushing");
    // region 1 ends at once: must wait for buffer 0's s-phase1 and s-phase2
    s0 = n_dma_start;
    region_end(c);
    chk(n_dma_start == s0 + 1, "s-phase2 started after s-phase1");
    chk(c >= FL + DM + 2 && c <= FL + DM + 6, $sformatf("T_wait of %0d cycles", c));
    chk(cur_buf == 0 && status[1] == 2'b00 && status[0] == 2'b00, "buffer 0 reused");
    // power loss during the flush of buffer 1: (0,0)
    repeat (2) @(negedge clk);
    d0 = n_disc[0]; d1 = n_disc[1];
    power_cycle();
    wait_ready(c);
    chk(rec_action == REC_DISCARD, "flush cut short: discard");
    chk(n_disc[0] > d0 && n_disc[1] > d1, "both buffers discarded");
    chk(status[1] == 2'b11 && status[0] == 2'b00 && cur_buf == 0, "status after discard");
    // region end, let the flush finish, lose power while copying: (1,0)
    region_end(c);
    repeat (FL + 5) @(negedge clk);
    chk(status[0] == 2'b10 && dma_busy, "s-phase1 done, copying");
    s0 = n_dma_start;
    power_cycle();
    @(negedge clk);
    chk(!ready, "not ready while replaying");
    wait_ready(c);
    chk(rec_action == REC_REPLAY && n_dma_start == s0 + 1, "s-phase2 replayed");
    chk(c >= DM, $sformatf("ready after the replay (%0d cycles)", c));
    chk(status[0] == 2'b11 && status[1] == 2'b00, "status after replay");
    // idle power loss: (1,1)
    d1 = n_disc[1];
    power_cycle();
    wait_ready(c);
    chk(rec_action == REC_RESUME && n_disc[1] > d1, "resume drops the running buffer");
    chk(status[0] == 2'b11 && status[1] == 2'b00 && cur_buf == 1, "status kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
