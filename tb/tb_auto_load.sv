// tb_auto_load: the auto-load sequencer against a responder that answers
// each request with al_done after a fixed delay. Checks the order and the
// device/page pairs of the commands (after reset: SLD 2 = dev F page 4,
// SLD 3 = dev C page 5; on a DDU_Ctrl request: SLD 0 = dev D page 1,
// SLD 1 = dev E page 7), vme_rdy, auto_sld, that a held request starts only
// one sequence, and that the disable input skips everything.
module tb_auto_load;
  logic clk = 0, rst = 1, enable = 1, ld_req = 0, al_done = 0;
  logic auto_sld, al_req, vme_rdy;
  logic [3:0] al_dev;
  logic [2:0] al_page;
  logic [1:0] sldcmd;
  int checks = 0, failures = 0;
  logic [8:0] log_q [$];   // {sldcmd, dev, page}

  always #5 clk = !clk;

  auto_load dut (.*);

  // responder: al_done one clock, 20 clocks after a request appears
  int wait_n = 0;
  always @(posedge clk) begin
    al_done <= 1'b0;
    if (al_req && !al_done) begin
      if (wait_n == 20) begin
        al_done <= 1'b1;
        wait_n  <= 0;
        log_q.push_back({sldcmd, al_dev, al_page});
        if (!auto_sld) begin failures++; $display("FAIL request without auto_sld"); end
      end else wait_n <= wait_n + 1;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!vme_rdy, "not ready while loading");
    repeat (100) @(negedge clk);
    check(vme_rdy && !auto_sld, "ready after the reset sequence");
    check(log_q.size() == 2, $sformatf("two loads after reset, got %0d", log_q.size()));
    if (log_q.size() == 2) begin
      check(log_q[0] == {2'd2, 4'hF, 3'd4}, $sformatf("first load %h", log_q[0]));
      check(log_q[1] == {2'd3, 4'hC, 3'd5}, $sformatf("second load %h", log_q[1]));
    end
    log_q.delete();
    // DDU_Ctrl request, held high for a long time
    ld_req = 1;
    @(negedge clk); @(negedge clk);
    check(auto_sld && !vme_rdy, "request starts a sequence");
    repeat (150) @(negedge clk);
    check(log_q.size() == 2, $sformatf("two loads on request, got %0d", log_q.size()));
    if (log_q.size() == 2) begin
      check(log_q[0] == {2'd0, 4'hD, 3'd1}, $sformatf("kill-channel load %h", log_q[0]));
      check(log_q[1] == {2'd1, 4'hE, 3'd7}, $sformatf("board-ID load %h", log_q[1]));
    end
    check(vme_rdy, "ready again");
    ld_req = 0;
    log_q.delete();
    // disabled: no loads at all
    enable = 0;
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    check(vme_rdy, "ready at once when disabled");
    ld_req = 1;
    repeat (100) @(negedge clk);
    check(log_q.size() == 0 && !auto_sld, "no loads when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
