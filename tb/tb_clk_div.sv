// tb_clk_div: measures the clock enables and clock waveforms over several
// periods. With MID_DIV = 4: ser_ce every 2 clocks, slow_ce every 16,
// slow2_ce every 32; midclk period 4, slowclk 16, slowclk2 32, each with
// 50 % duty.
module tb_clk_div;
  logic clk = 0, rst = 1;
  logic midclk, slowclk, slowclk2, ser_ce, slow_ce, slow2_ce;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  clk_div dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ser, n_slow, n_slow2, hi_mid, hi_slow, hi_slow2, last_slow, gaps_bad;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (40) @(posedge clk);   // settle
    n_ser = 0; n_slow = 0; n_slow2 = 0; hi_mid = 0; hi_slow = 0; hi_slow2 = 0;
    last_slow = -1; gaps_bad = 0;
    for (int t = 0; t < 320; t++) begin
      @(posedge clk); #1;
      n_ser   += ser_ce;
      n_slow  += slow_ce;
      n_slow2 += slow2_ce;
      hi_mid  += midclk;
      hi_slow += slowclk;
      hi_slow2 += slowclk2;
      if (slow_ce) begin
        if (last_slow >= 0 && t - last_slow != 16) gaps_bad++;
        last_slow = t;
      end
    end
    check(n_ser == 160, $sformatf("ser_ce count %0d", n_ser));
    check(n_slow == 20, $sformatf("slow_ce count %0d", n_slow));
    check(n_slow2 == 10, $sformatf("slow2_ce count %0d", n_slow2));
    check(gaps_bad == 0, "slow_ce spacing 16");
    check(hi_mid == 160, $sformatf("midclk duty %0d", hi_mid));
    check(hi_slow == 160, $sformatf("slowclk duty %0d", hi_slow));
    check(hi_slow2 == 160, $sformatf("slowclk2 duty %0d", hi_slow2));
    // period of midclk: rising edges 4 clocks apart
    begin
      int r0, r1;
      @(posedge midclk); r0 = $time;
      @(posedge midclk); r1 = $time;
      check(r1 - r0 == 40, "midclk period 4 clocks");
      @(posedge slowclk2); r0 = $time;
      @(posedge slowclk2); r1 = $time;
      check(r1 - r0 == 320, "slowclk2 period 32 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
