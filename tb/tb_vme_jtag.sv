// tb_vme_jtag: drives the VME-JTAG engine against a TAP model.
// Checks, with expected values worked out from the JTAG state diagram:
// TAP reset (12 TCK, TMS 111110111110, ends in Run-Test/Idle), a 32-bit
// data register written in two 16-bit pieces (header only, then tailer
// only), TDO read-back of the captured value, instruction shifts with
// commands F and 7, a short 5-bit data shift, the no-operation command,
// the TCK count and duration of each operation (two ce ticks per bit) and
// that an unselected engine ignores the strobe.
module tb_vme_jtag;
  localparam int CE_DIV = 4;
  localparam logic [31:0] CAP = 32'hA5C3_1E0F;

  logic clk = 0, rst = 1, ce = 0;
  logic sel = 0, strobe = 0;
  logic [9:0]  command = '0;
  logic [15:0] indata = '0;
  logic tdo, tdi, tms, tck, dvcenb, dtack, outdata_en;
  logic [15:0] outdata;
  logic load, done_data, done_tail;
  int checks = 0, failures = 0;
  int n_load = 0, n_done_data = 0, n_done_tail = 0;
  string tms_trace;

  always #5 clk = !clk;
  int cediv = 0;
  always @(posedge clk) begin
    cediv <= (cediv == CE_DIV - 1) ? 0 : cediv + 1;
    ce    <= (cediv == 0);
  end

  vme_jtag dut (.*);
  jtag_tap_model #(.DR_CAPTURE(CAP)) tap (.tck, .tms, .tdi, .tdo);

  always @(posedge clk) if (!rst) begin
    n_load      += load;
    n_done_data += done_data;
    n_done_tail += done_tail;
  end
  always @(posedge tck) tms_trace = {tms_trace, tms ? "1" : "0"};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One VME-JTAG access; returns clocks from strobe to DTACK and TCK count.
  logic last_oe;
  task automatic jcmd(input logic [3:0] cmd, input logic [3:0] bitcnt,
                      input logic [15:0] data, output int clocks, output int tcks);
    int t0;
    t0 = tap.n_tck;
    tms_trace = "";
    @(negedge clk);
    command = {bitcnt, 2'b00, cmd};
    indata  = data;
    strobe  = 1;
    clocks  = 0;
    while (!dtack && clocks < 5000) begin
      @(negedge clk);
      clocks++;
    end
    tcks = tap.n_tck - t0;
    last_oe = outdata_en;
    check(dtack, $sformatf("dtack for command %h", cmd));
    strobe = 0;
    @(negedge clk);
    check(!dtack, "dtack released with the strobe");
    repeat (3) @(negedge clk);
  endtask

  int clocks, tcks;
  initial begin
    sel = 1;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // TAP reset
    jcmd(4'h6, 4'h0, 16'h0, clocks, tcks);
    check(tcks == 12, $sformatf("reset TCK count %0d", tcks));
    check(tms_trace == "111110111110", {"reset TMS ", tms_trace});
    check(tap.st == tap.RTI, "TAP in Run-Test/Idle after reset");
    check(tap.n_tlr >= 2, "TAP passed Test-Logic-Reset");
    check(clocks >= 23 * CE_DIV && clocks <= 24 * CE_DIV + 4,
          $sformatf("reset took %0d clocks", clocks));

    // 16 data bits with header, TAP stays in Shift-DR
    jcmd(4'h1, 4'hF, 16'h1234, clocks, tcks);
    check(tcks == 19, $sformatf("header+16 TCK count %0d", tcks));
    check(tms_trace == "1000000000000000000", {"header TMS ", tms_trace});
    check(tap.st == tap.SH_DR, "TAP left in Shift-DR");
    check(clocks >= 37 * CE_DIV && clocks <= 38 * CE_DIV + 4,
          $sformatf("header+16 took %0d clocks", clocks));
    jcmd(4'h5, 4'h0, 16'h0, clocks, tcks);
    check(outdata == CAP[15:0], $sformatf("TDO low half %h", outdata));
    check(last_oe, "read data enabled");
    check(tcks == 0, "read TDO makes no TCK");

    // 16 more data bits with tailer: DR = {ABCD, 1234}
    jcmd(4'h2, 4'hF, 16'hABCD, clocks, tcks);
    check(tcks == 18, $sformatf("16+tailer TCK count %0d", tcks));
    check(tms_trace == "000000000000000110", {"tailer TMS ", tms_trace});
    check(tap.st == tap.RTI, "TAP back in Idle after tailer");
    check(tap.dr_upd == 32'hABCD_1234, $sformatf("DR updated to %h", tap.dr_upd));
    jcmd(4'h5, 4'h0, 16'h0, clocks, tcks);
    check(outdata == CAP[31:16], $sformatf("TDO high half %h", outdata));

    // instruction, 8 bits, command F
    jcmd(4'hF, 4'h7, 16'h00E8, clocks, tcks);
    check(tcks == 14, $sformatf("IR TCK count %0d", tcks));
    check(tms_trace == "11000000000110", {"IR TMS ", tms_trace});
    check(tap.ir_upd == 8'hE8, $sformatf("IR updated to %h", tap.ir_upd));
    check(tap.st == tap.RTI, "Idle after IR");
    // instruction with command 7
    jcmd(4'h7, 4'h7, 16'h005A, clocks, tcks);
    check(tap.ir_upd == 8'h5A, $sformatf("IR (cmd 7) updated to %h", tap.ir_upd));

    // 5-bit data with header and tailer
    jcmd(4'h3, 4'h4, 16'h0015, clocks, tcks);
    check(tcks == 10, $sformatf("5-bit TCK count %0d", tcks));
    check(tap.dr_upd == ((CAP >> 5) | (32'h15 << 27)), $sformatf("5-bit DR %h", tap.dr_upd));
    jcmd(4'h5, 4'h0, 16'h0, clocks, tcks);
    check(outdata[15:11] == CAP[4:0], $sformatf("5 TDO bits at the top %h", outdata));

    // no-operation command
    jcmd(4'h4, 4'h0, 16'h0, clocks, tcks);
    check(tcks == 0 && clocks < 5, "command 4 acknowledged at once");

    check(n_load == 5, $sformatf("load pulses %0d", n_load));
    check(n_done_data == 5, $sformatf("done_data pulses %0d", n_done_data));
    check(n_done_tail == 4, $sformatf("done_tail pulses %0d", n_done_tail));

    // unselected engine ignores the strobe
    sel = 0;
    @(negedge clk);
    command = {4'hF, 2'b00, 4'h3};
    strobe = 1;
    repeat (200) @(negedge clk);
    check(!dtack && !dvcenb, "unselected engine stays idle");
    strobe = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
