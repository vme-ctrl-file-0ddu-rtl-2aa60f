// tb_vme_parallel: VME-Parallel register access. Reads every register
// (FMM registers 0..3 built from random DMB and DDU STAT bits, input
// register words 0..2, mode switch, info word) and compares with values
// assembled here from the inputs; checks that DTACK comes exactly two
// clocks after the strobe and drops with it, that a write of device 8
// command 80h gives one write pulse carrying the data, and that other
// writes and reads give none.
module tb_vme_parallel;
  logic clk = 0, rst = 1;
  logic strobe = 0, tovme = 0;
  logic [3:0]  dev = '0;
  logic [7:0]  command = '0;
  logic [15:0] indata = '0;
  logic [3:0][14:0] dmb_stat;
  logic [3:0]  ddu_stat, ddu_fmm;
  logic [47:0] in_vmedat;
  logic [7:0]  mode;
  logic [4:0]  slot;
  logic        vme_rdy;
  logic        dtack, outdata_en, in_wr;
  logic [15:0] outdata, in_wdata;
  int checks = 0, failures = 0, n_wr = 0;
  logic [15:0] last_wr;

  always #5 clk = !clk;

  vme_parallel dut (.*);

  always @(posedge clk) if (in_wr) begin n_wr++; last_wr = in_wdata; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] rdata;
  task automatic access(input logic rd, input logic [3:0] d, input logic [7:0] c,
                        input logic [15:0] wd);
    int n;
    @(negedge clk);
    tovme = rd; dev = d; command = c; indata = wd; strobe = 1;
    n = 0;
    @(negedge clk);
    while (!dtack && n < 20) begin @(negedge clk); n++; end
    // dtack seen at the second falling edge after the strobe was raised
    check(n == 1, $sformatf("DTACK after %0d extra clocks", n));
    rdata = outdata;
    if (rd) check(outdata_en, "read data enabled");
    else    check(!outdata_en, "write drives no data");
    strobe = 0;
    #1;
    check(!dtack, "DTACK drops with the strobe");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) dmb_stat[k] = 15'($urandom);
    ddu_stat  = 4'b1010;
    ddu_fmm   = 4'b0100;
    in_vmedat = 48'h1111_2222_3333;
    mode      = 8'hA5;
    slot      = 5'd13;
    vme_rdy   = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 4; k++) begin
      access(1, 4'(k), 8'h00, 16'h0);
      check(rdata == {ddu_stat[k], dmb_stat[k]}, $sformatf("FMM register %0d = %h", k, rdata));
    end
    access(1, 4'd8, 8'h00, 16'h0); check(rdata == 16'h1111, "input register 0");
    access(1, 4'd8, 8'h01, 16'h0); check(rdata == 16'h2222, "input register 1");
    access(1, 4'd8, 8'h02, 16'h0); check(rdata == 16'h3333, "input register 2");
    access(1, 4'd8, 8'h03, 16'h0); check(rdata == 16'h0000, "input register 3 absent");
    access(1, 4'd14, 8'h00, 16'h0); check(rdata == 16'h00A5, "mode switch");
    access(1, 4'd15, 8'h00, 16'h0);
    check(rdata == {1'b1, 3'b0, 4'b0100, 3'b0, 5'd13}, $sformatf("info word %h", rdata));
    access(1, 4'd5, 8'h00, 16'h0); check(rdata == 16'h0000, "unused device reads 0");
    check(n_wr == 0, "no writes from reads");
    access(0, 4'd8, 8'h80, 16'hBEEF);
    check(n_wr == 1 && last_wr == 16'hBEEF, $sformatf("one write pulse, %0d", n_wr));
    access(0, 4'd8, 8'h00, 16'h1234);
    access(0, 4'd3, 8'h80, 16'h1234);
    access(1, 4'd8, 8'h80, 16'h1234);
    check(n_wr == 1, "no pulse for other accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
