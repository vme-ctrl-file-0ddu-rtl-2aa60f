// tb_vme_command: VME cycles into the slave front end with the board in
// slot 13. Checks selection for its own slot and for the broadcast slot
// 28, rejection of a wrong slot, a non-A24 address modifier, a 32-bit
// (LWORD low) transfer, a wrong geographic-address parity and an
// interrupt-acknowledge cycle; the type strobes for JTAG, serial and
// parallel addresses; the one-hot JTAG device; the dev and command fields;
// TOVME; latched write data; STROBE three clocks after the data strobes.
module tb_vme_command;
  logic clk = 0, rst = 1;
  logic as_n = 1, ds0_n = 1, ds1_n = 1, write_n = 1, lword_n = 1, iack_n = 1, berr_n = 1;
  logic [5:0]  am = '0, ga_n;
  logic [23:1] adr = '0;
  logic [15:0] data_in = '0;
  logic        valid_am, valid_ga, slot_enb, broadcast_enb;
  logic [4:0]  slot;
  logic        strobe, jtag_strobe, ser_strobe, par_strobe, tovme;
  logic [9:0]  device;
  logic [3:0]  dev;
  logic [9:0]  command;
  logic [15:0] indata;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  vme_command dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] ga_pins(input logic [4:0] s, input logic good);
    logic p;
    p = ~(^s);            // odd parity over the six bits
    if (!good) p = ~p;
    return ~{p, s};
  endfunction

  // one cycle; reports whether it was selected and the strobe delay
  logic got_sel;
  int   delay;
  logic got_j, got_s, got_p, got_tovme;
  logic [9:0] got_device;
  task automatic cycle(input logic [23:0] a, input logic [5:0] m, input logic rd,
                       input logic lw_n, input logic ia_n, input logic [15:0] d);
    @(negedge clk);
    adr = a[23:1]; am = m; write_n = rd; lword_n = lw_n; iack_n = ia_n; data_in = d;
    @(negedge clk);
    as_n = 0;
    repeat (3) @(negedge clk);
    ds0_n = 0; ds1_n = 0;
    delay = 0; got_sel = 0;
    for (int i = 1; i <= 8 && !got_sel; i++) begin
      @(posedge clk); #1;
      if (strobe) begin got_sel = 1; delay = i; end
    end
    got_j = jtag_strobe; got_s = ser_strobe; got_p = par_strobe;
    got_tovme = tovme; got_device = device;
    @(negedge clk);
    ds0_n = 1; ds1_n = 1;
    @(negedge clk);
    as_n = 1;
    repeat (4) @(negedge clk);
    check(!strobe, "strobe gone after the cycle");
  endtask

  localparam logic [5:0] AM_A24_NP_DATA = 6'h39, AM_A24_SUP_DATA = 6'h3D,
                         AM_A24_NP_PROG = 6'h3A, AM_A24_SUP_PROG = 6'h3E,
                         AM_A32 = 6'h09, AM_A16 = 6'h29;
  function automatic logic [23:0] va(input logic [4:0] s, input logic [2:0] t,
                                      input logic [3:0] d, input logic [9:0] c);
    return {s, t, d, c, 2'b00};
  endfunction

  initial begin
    ga_n = ga_pins(5'd13, 1'b1);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    check(valid_ga && slot == 5'd13, "geographic address 13 valid");

    // JTAG write, device 5, own slot, each A24 modifier
    cycle(va(5'd13, 3'b000, 4'd5, 10'h3C5), AM_A24_NP_DATA, 1'b0, 1'b1, 1'b1, 16'hBEEF);
    check(got_sel && got_j && !got_s && !got_p, "JTAG cycle selected");
    check(delay == 3, $sformatf("strobe delay %0d", delay));
    check(got_device == 10'b00_0010_0000, $sformatf("device one-hot %b", got_device));
    check(dev == 4'd5 && command == 10'h3C5, "dev and command fields");
    check(!got_tovme, "write cycle: TOVME low");
    check(indata == 16'hBEEF, "write data latched");
    cycle(va(5'd13, 3'b000, 4'd2, 10'h001), AM_A24_SUP_DATA, 1'b1, 1'b1, 1'b1, 16'h0);
    check(got_sel && got_tovme && got_device == 10'b00_0000_0100, "read, supervisory data AM");
    cycle(va(5'd13, 3'b100, 4'd4, 10'h00F), AM_A24_NP_PROG, 1'b0, 1'b1, 1'b1, 16'h1);
    check(got_sel && got_s && !got_j && got_device == '0, "serial cycle, program AM");
    check(command[3:0] == 4'hF, "serial command field");
    cycle(va(5'd13, 3'b011, 4'd8, 10'h080), AM_A24_SUP_PROG, 1'b0, 1'b1, 1'b1, 16'h2);
    check(got_sel && got_p && !got_s && !got_j, "parallel cycle");
    check(command[7:0] == 8'h80, "parallel command field");
    // broadcast
    cycle(va(5'd28, 3'b011, 4'd8, 10'h080), AM_A24_NP_DATA, 1'b0, 1'b1, 1'b1, 16'h3);
    check(got_sel && broadcast_enb, "broadcast slot 28 selected");
    // rejections
    cycle(va(5'd12, 3'b011, 4'd0, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel, "other slot ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), AM_A32, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel && !valid_am, "A32 modifier ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), AM_A16, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel, "A16 modifier ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), 6'h3F, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel, "A24 block-transfer modifier 3F ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), 6'h3B, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel, "A24 block-transfer modifier 3B ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b0, 1'b1, 16'h0);
    check(!got_sel, "32-bit transfer ignored");
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b1, 1'b0, 16'h0);
    check(!got_sel, "interrupt acknowledge ignored");
    cycle(va(5'd13, 3'b000, 4'd12, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b1, 1'b1, 16'h0);
    check(got_sel && got_j && got_device == '0, "JTAG device 12 has no enable");
    ga_n = ga_pins(5'd13, 1'b0);
    cycle(va(5'd13, 3'b011, 4'd0, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel && !valid_ga, "bad GA parity: board not selected");
    cycle(va(5'd28, 3'b011, 4'd0, 10'h0), AM_A24_NP_DATA, 1'b1, 1'b1, 1'b1, 16'h0);
    check(!got_sel, "bad GA parity: no broadcast either");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
