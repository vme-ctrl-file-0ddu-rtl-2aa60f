// tb_reset_ctrl: each reset source must assert reset at once and release
// it two clocks after the source goes away; DDU_SRDY must need LD_RDY and
// follow VME_RDY four clocks late.
module tb_reset_ctrl;
  logic clk = 0;
  logic syncrst_n = 1, softrst_n = 1, pwr_on_rst = 1, sysrst_n = 1;
  logic ld_rdy_n = 1, vme_rdy = 0;
  logic sync_rst, soft_rst, reset, ddu_srdy;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  reset_ctrl dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_source(input int which);
    @(negedge clk);
    case (which)
      0: syncrst_n = 0;
      1: softrst_n = 0;
      2: pwr_on_rst = 1;
      default: sysrst_n = 0;
    endcase
    #1;
    check(reset === 1'b1, $sformatf("reset asserted by source %0d", which));
    check(sync_rst === (which == 0), "sync_rst follows SYNCRST*");
    check(soft_rst === (which == 1 || which == 2), "soft_rst follows SOFTRST*/power-on");
    @(negedge clk);
    {syncrst_n, softrst_n, pwr_on_rst, sysrst_n} = 4'b1101;
    @(negedge clk);
    check(reset === 1'b1, "reset still held one clock after release");
    @(negedge clk);
    check(reset === 1'b0, "reset released two clocks after the source");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    pwr_on_rst = 0;
    repeat (3) @(negedge clk);
    check(reset === 1'b0, "no reset when no source");
    for (int s = 0; s < 4; s++) pulse_source(s);
    // DDU_SRDY: VME_RDY+4 and LD_RDY
    ld_rdy_n = 0;
    @(negedge clk); vme_rdy = 1;
    for (int k = 1; k <= 4; k++) begin
      @(negedge clk);
      check(ddu_srdy === (k >= 4), $sformatf("ddu_srdy %0d clocks after vme_rdy", k));
    end
    ld_rdy_n = 1; #1;
    check(ddu_srdy === 1'b0, "ddu_srdy needs LD_RDY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
