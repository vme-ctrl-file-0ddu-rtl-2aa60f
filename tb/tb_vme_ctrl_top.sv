// tb_vme_ctrl_top: end-to-end test of the VME interface FPGA at its
// default parameters, with a VME master, a serial flash model, models of
// the serially loaded devices and JTAG TAP models on chain 1 and on the
// shared DDU_Ctrl chain (device 5). The board sits in slot 13.
// It makes each mechanism happen and counts it:
//   auto-load after reset (DDR FIFOs from page 4, GbE from page 5),
//   auto-load on DDU_Ctrl request (kill channel page 1, board ID page 7),
//   DDU_SRDY, VME-Parallel reads (FMM registers, mode, info) and input
//   register writes, broadcast write, a cycle for another slot left
//   unanswered, VME-Serial flash status read, page program, input FIFO
//   read and DDR load, VME-JTAG reset, shift and TDO read on chain 1, a
//   10-bit IDCODE instruction and a data shift on the shared chain with
//   the PROM TDI held high, LED decode.
// Every result is compared with values set up here; a mechanism that never
// happened counts as a failure.
module tb_vme_ctrl_top;
  localparam logic [4:0]  SLOT = 5'd13;
  localparam logic [5:0]  AM   = 6'h39;
  localparam logic [31:0] CAP1 = 32'h1357_2468, CAP5 = 32'hFEDC_0123;

  logic clk = 0;
  logic pwr_on_rst = 1, syncrst_n = 1, softrst_n = 1, sysrst_n = 1;
  logic as_n = 1, ds0_n = 1, ds1_n = 1, write_n = 1, lword_n = 1, iack_n = 1, berr_n = 1;
  logic [5:0]  am = '0, ga_n;
  logic [23:1] adr = '0;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, tovme, dtack_n;
  logic [7:0]  mode = 8'h35, led_par;
  logic        auto_sld_en_n, ld_rdy_n = 1, ddu_srdy;
  logic [3:0]  ddu_fmm = 4'b0100;
  logic [3:0][14:0] dmb_stat;
  logic [8:1]  jtag_tdi, jtag_tms, jtag_tck, jtag_tdo;
  logic        devload, devdonedata, devdonetail;
  logic        m_cs_n, m_sck, m_sdi, m_sdo, s_clk, s_do;
  logic [15:0] s_sen;
  logic [3:0]  s_di;

  int checks = 0, failures = 0;
  typedef enum int {M_AUTO_RESET, M_AUTO_REQ, M_SRDY, M_PAR_READ, M_PAR_WRITE,
                    M_BROADCAST, M_REJECT, M_SER_STATUS, M_SER_PROG, M_SER_FIFO,
                    M_SER_LOAD, M_JTAG_RESET, M_JTAG_SHIFT, M_JTAG_TDO,
                    M_JTAG_SHARED, M_LED, M_COUNT} mech_e;
  int mech [M_COUNT];

  always #12.5 clk = !clk;   // 40 MHz

  vme_ctrl_top dut (.*);

  flash_model #(.STATUS(8'hAC)) flash (.cs_n(m_cs_n), .sck(m_sck), .si(m_sdi), .so(m_sdo));
  serial_dev_model sdev (.s_clk, .s_do, .s_sen, .s_di);
  logic tdo1, tdo5;
  jtag_tap_model #(.DR_CAPTURE(CAP1)) tap1 (.tck(jtag_tck[1]), .tms(jtag_tms[1]), .tdi(jtag_tdi[1]), .tdo(tdo1));
  jtag_tap_model #(.DR_CAPTURE(CAP5), .IR_LEN(10)) tap5 (.tck(jtag_tck[3]), .tms(jtag_tms[3]), .tdi(jtag_tdi[5]), .tdo(tdo5));
  always_comb begin
    jtag_tdo    = '0;
    jtag_tdo[1] = tdo1;
    jtag_tdo[3] = tdo5;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- VME master ----
  logic [15:0] rdata;
  logic        acked;
  int          aclocks;
  task automatic vme(input logic [4:0] slot, input logic [2:0] typ, input logic [3:0] dev,
                     input logic [9:0] cmd, input logic rd, input logic [15:0] wd,
                     input int limit = 20000);
    @(negedge clk);
    adr = {slot, typ, dev, cmd, 1'b0}; am = AM; write_n = rd; vme_d_in = wd;
    @(negedge clk);
    as_n = 0;
    @(negedge clk);
    ds0_n = 0; ds1_n = 0;
    aclocks = 0;
    while (dtack_n && aclocks < limit) begin @(negedge clk); aclocks++; end
    acked = !dtack_n;
    rdata = vme_d_out;
    if (acked && rd) check(vme_d_oe, "data buffer enabled on a read");
    ds0_n = 1; ds1_n = 1;
    @(negedge clk);
    as_n = 1;
    repeat (6) @(negedge clk);
    check(dtack_n, "DTACK released after the cycle");
  endtask

  task automatic par_rd(input logic [3:0] dev, input logic [7:0] cmd);
    vme(SLOT, 3'b011, dev, {2'b00, cmd}, 1'b1, 16'h0);
    check(acked, $sformatf("parallel read dev %0d acknowledged", dev));
  endtask
  task automatic par_wr(input logic [4:0] slot, input logic [15:0] wd);
    vme(slot, 3'b011, 4'd8, 10'h080, 1'b0, wd);
    check(acked, "parallel write acknowledged");
  endtask

  // the PROM TDI must stay high whenever the FPGA engine runs
  int tdi6_low_while_dev5 = 0;
  int tck1_base;
  always @(posedge clk) if (dut.j_en[5] && !jtag_tdi[3]) tdi6_low_while_dev5++;

  initial begin
    ga_n = ~{~(^SLOT), SLOT};
    for (int k = 0; k < 4; k++) dmb_stat[k] = 15'(16'h1111 * (k + 1));
    // flash contents
    flash.page_data[4] = 64'h0F0F_1234;        flash.page_w[4] = 32;
    flash.page_data[5] = 64'h2_5555_AAAA;      flash.page_w[5] = 34;
    flash.page_data[1] = 64'h00FF;             flash.page_w[1] = 16;
    flash.page_data[7] = 64'h0A0B;             flash.page_w[7] = 16;

    repeat (10) @(negedge clk);
    pwr_on_rst = 0;

    // ---- auto-load after reset; poll the info word for VME ready ----
    begin
      int polls = 0;
      do begin
        par_rd(4'd15, 8'h00);
        polls++;
      end while (!rdata[15] && polls < 200);
      check(rdata[15], "VME ready after auto-load");
      check(rdata[4:0] == SLOT && rdata[11:8] == ddu_fmm, $sformatf("info word %h", rdata));
    end
    for (int k = 8; k < 12; k++)
      check(sdev.cnt[k] == 32 && sdev.cap[k][31:0] == 32'h0F0F_1234,
            $sformatf("DDR FIFO %0d auto-loaded %h", k - 8, sdev.cap[k]));
    check(sdev.cnt[12] == 34 && sdev.cap[12][33:0] == 34'h2_5555_AAAA, "GbE FIFO auto-loaded");
    if (sdev.cnt[8] == 32 && sdev.cnt[12] == 34) mech[M_AUTO_RESET]++;

    // ---- DDU_Ctrl request: kill channel and board ID ----
    ld_rdy_n = 0;
    repeat (2000) @(negedge clk);
    check(sdev.cnt[13] == 16 && sdev.cap[13][15:0] == 16'h00FF, "kill channel loaded");
    check(sdev.cnt[14] == 16 && sdev.cap[14][15:0] == 16'h0A0B, "board ID loaded");
    if (sdev.cnt[13] == 16 && sdev.cnt[14] == 16) mech[M_AUTO_REQ]++;
    check(ddu_srdy, "DDU_SRDY with LD_RDY and VME ready");
    if (ddu_srdy) mech[M_SRDY]++;
    check(flash.n_read == 4 && flash.bad_addr == 0, "four flash page reads");

    // ---- VME-Parallel ----
    for (int k = 0; k < 4; k++) begin
      par_rd(4'(k), 8'h00);
      check(rdata == {k == 0, dmb_stat[k]}, $sformatf("FMM register %0d = %h", k, rdata));
      if (acked) mech[M_PAR_READ]++;
    end
    check(aclocks >= 4 && aclocks <= 6, $sformatf("parallel DTACK after %0d clocks", aclocks));
    par_rd(4'd14, 8'h00);
    check(rdata == {8'h00, mode}, "mode switch register");
    par_wr(SLOT, 16'hCAFE);
    par_wr(SLOT, 16'hD00D);
    par_rd(4'd8, 8'h01); check(rdata == 16'hCAFE, "input register word 1");
    par_rd(4'd8, 8'h02); check(rdata == 16'hD00D, "input register word 2");
    if (rdata == 16'hD00D) mech[M_PAR_WRITE]++;

    // ---- VME-Serial: program page 4, status, FIFO read, DDR load ----
    vme(SLOT, 3'b100, 4'd4, 10'h00C, 1'b0, 16'h0);
    check(acked && flash.page_w[4] == 32 && flash.page_data[4][31:0] == 32'hCAFE_D00D,
          $sformatf("page 4 programmed %h", flash.page_data[4]));
    if (flash.n_prog == 1) mech[M_SER_PROG]++;
    vme(SLOT, 3'b100, 4'd4, 10'h000, 1'b1, 16'h0);
    check(acked && rdata[7:0] == 8'hAC, $sformatf("flash status %h", rdata[7:0]));
    if (flash.n_status == 1) mech[M_SER_STATUS]++;
    sdev.fifo_word[1] = 32'h1357_9BDF;
    vme(SLOT, 3'b100, 4'd1, 10'h000, 1'b1, 16'h0);
    check(acked && rdata == 16'h9BDF, "FIFO 1 low word");
    par_rd(4'd8, 8'h01);
    check(rdata == 16'h1357, "FIFO 1 high word through parallel register");
    if (rdata == 16'h1357) mech[M_SER_FIFO]++;
    sdev.clear();
    vme(SLOT, 3'b100, 4'hF, 10'h000, 1'b0, 16'h0);
    for (int k = 8; k < 12; k++)
      check(sdev.cnt[k] == 32 && sdev.cap[k][31:0] == 32'h1357_9BDF, "DDR FIFO loaded from VME");
    if (sdev.cnt[8] == 32) mech[M_SER_LOAD]++;

    // ---- VME-JTAG on chain 1 (TCK edges counted from here) ----
    tck1_base = tap1.n_tck;
    vme(SLOT, 3'b000, 4'd1, {4'h0, 2'b00, 4'h6}, 1'b0, 16'h0);
    check(acked && int'(tap1.st) == 1 /* Run-Test/Idle */ && tap1.n_tck - tck1_base == 12, $sformatf("chain 1 reset acked=%0d st=%0d tck=%0d", acked, tap1.st, tap1.n_tck - tck1_base));
    if (tap1.n_tck - tck1_base == 12) mech[M_JTAG_RESET]++;
    vme(SLOT, 3'b000, 4'd1, {4'hF, 2'b00, 4'h3}, 1'b0, 16'h5A5A);
    check(acked && tap1.dr_upd == {16'h5A5A, CAP1[31:16]}, $sformatf("chain 1 DR %h", tap1.dr_upd));
    check(aclocks > 20 * 32 && aclocks < 22 * 32, $sformatf("21-bit JTAG access took %0d clocks", aclocks));
    if (tap1.n_upd_dr == 1) mech[M_JTAG_SHIFT]++;
    vme(SLOT, 3'b000, 4'd1, {4'h0, 2'b00, 4'h5}, 1'b1, 16'h0);
    check(acked && rdata == CAP1[15:0], $sformatf("chain 1 TDO %h", rdata));
    if (rdata == CAP1[15:0]) mech[M_JTAG_TDO]++;
    // ---- shared DDU_Ctrl chain, FPGA engine (device 5) ----
    vme(SLOT, 3'b000, 4'd5, {4'h0, 2'b00, 4'h6}, 1'b0, 16'h0);
    // 10-bit IDCODE instruction of a Virtex-II Pro: 1111001001
    vme(SLOT, 3'b000, 4'd5, {4'h9, 2'b00, 4'hF}, 1'b0, 16'h03C9);
    check(acked && tap5.ir_upd == 10'b11_1100_1001, $sformatf("DDU_Ctrl FPGA IR %b", tap5.ir_upd));
    vme(SLOT, 3'b000, 4'd5, {4'hF, 2'b00, 4'h3}, 1'b0, 16'hC3C3);
    check(acked && tap5.dr_upd == {16'hC3C3, CAP5[31:16]}, $sformatf("DDU_Ctrl FPGA DR %h", tap5.dr_upd));
    check(tdi6_low_while_dev5 == 0, "PROM TDI held high while the FPGA engine runs");
    check(tap1.n_tck - tck1_base == 12 + 21, "chain 1 quiet during device 5 access");
    if (tap5.n_upd_dr == 1 && tap5.n_upd_ir == 1 && tdi6_low_while_dev5 == 0) mech[M_JTAG_SHARED]++;

    // ---- broadcast write, and a cycle for another slot ----
    par_wr(5'd28, 16'h4242);
    par_rd(4'd8, 8'h02);
    check(rdata == 16'h4242, "broadcast write reached the input register");
    if (rdata == 16'h4242) mech[M_BROADCAST]++;
    vme(5'd7, 3'b011, 4'd15, 10'h0, 1'b1, 16'h0, 200);
    check(!acked, "other slot not acknowledged");
    if (!acked) mech[M_REJECT]++;

    // ---- LEDs ----
    check(led_par == 8'h20, $sformatf("LED decode %b", led_par));
    if (led_par == 8'h20) mech[M_LED]++;
    check(!auto_sld_en_n, "VME1 follows mode bit 6");

    for (int m = 0; m < M_COUNT; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
      $display("mechanism %-14s happened %0d time(s)", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
