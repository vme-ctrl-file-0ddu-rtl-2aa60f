// tb_vme_serial: drives the VME-Serial engine against a flash model and a
// model of the serially loaded devices. Checks: flash status read (opcode
// D7h, 8 bits back, duration 16 serial bits), filling the 48-bit input
// register by 16-bit writes, programming flash pages 5, 4, 1 and 7 with
// their widths (34, 32, 16, 16), auto-load reads of pages 4 and 5 streamed
// into the DDR FIFOs (all four at once) and the GbE FIFO, an input FIFO
// read, device loads from the input register, an auto-load-only flash
// command refused at once, and that VME accesses wait while auto-load owns
// the engine. Expected values come from the data the test writes.
module tb_vme_serial;
  localparam logic [7:0] STAT = 8'h9C;
  logic clk = 0, rst = 1, ce = 0;
  logic strobe = 0, tovme = 0;
  logic [3:0]  dev = '0, cmd = '0;
  logic        dtack, outdata_en;
  logic [15:0] outdata;
  logic        auto_sld = 0, al_req = 0, al_done;
  logic [3:0]  al_dev = '0;
  logic [2:0]  al_page = '0;
  logic        in_wr = 0;
  logic [15:0] in_wdata = '0;
  logic [47:0] in_vmedat;
  logic        busy, m_cs_n, m_sck, m_sdi, m_sdo, s_clk, s_do;
  logic [15:0] s_sen;
  logic [3:0]  s_di;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  always @(posedge clk) ce <= !ce;   // one tick every 2 clocks

  vme_serial dut (.*);
  flash_model #(.STATUS(STAT)) flash (.cs_n(m_cs_n), .sck(m_sck), .si(m_sdi), .so(m_sdo));
  serial_dev_model sdev (.s_clk, .s_do, .s_sen, .s_di);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] last_out;
  task automatic vme(input logic rd, input logic [3:0] d, input logic [3:0] c, output int clocks);
    @(negedge clk);
    tovme = rd; dev = d; cmd = c; strobe = 1;
    clocks = 0;
    while (!dtack && clocks < 20000) begin
      @(negedge clk);
      clocks++;
    end
    check(dtack, $sformatf("dtack for dev %h cmd %h", d, c));
    last_out = outdata;
    if (rd) check(outdata_en, "read data enabled");
    strobe = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic push(input logic [15:0] w);
    @(negedge clk);
    in_wr = 1; in_wdata = w;
    @(negedge clk);
    in_wr = 0;
  endtask

  task automatic autold(input logic [3:0] d, input logic [2:0] p);
    int n;
    @(negedge clk);
    auto_sld = 1; al_req = 1; al_dev = d; al_page = p;
    n = 0;
    while (!al_done && n < 20000) begin @(negedge clk); n++; end
    check(al_done, "al_done");
    al_req = 0; auto_sld = 0;
    repeat (3) @(negedge clk);
  endtask

  int clocks, nprog;
  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // status read
    vme(1, 4'h4, 4'h0, clocks);
    check(last_out[7:0] == STAT, $sformatf("status %h", last_out[7:0]));
    check(flash.n_status == 1, "one status transaction");
    check(clocks >= 62 && clocks <= 70, $sformatf("status read took %0d clocks", clocks));

    // fill the input register
    push(16'h0003); push(16'hDEAD); push(16'hBEEF);
    check(in_vmedat == 48'h0003_DEAD_BEEF, $sformatf("input register %h", in_vmedat));

    // program page 5 (34 bits)
    vme(0, 4'h4, 4'hD, clocks);
    check(flash.page_w[5] == 34, $sformatf("page 5 width %0d", flash.page_w[5]));
    check(flash.page_data[5][33:0] == 34'h3_DEAD_BEEF, $sformatf("page 5 data %h", flash.page_data[5]));
    check(clocks >= 2 * 2 * 66 - 4 && clocks <= 2 * 2 * 66 + 6, $sformatf("program page 5 took %0d clocks", clocks));
    // page 4 (32 bits)
    push(16'h1234); push(16'h5678);
    vme(0, 4'h4, 4'hC, clocks);
    check(flash.page_w[4] == 32 && flash.page_data[4][31:0] == 32'h1234_5678,
          $sformatf("page 4 %0d bits %h", flash.page_w[4], flash.page_data[4]));
    // page 1 and page 7 (16 bits)
    push(16'hC0DE);
    vme(0, 4'h4, 4'h9, clocks);
    push(16'hB1D0);
    vme(0, 4'h4, 4'hF, clocks);
    check(flash.page_w[1] == 16 && flash.page_data[1][15:0] == 16'hC0DE, "page 1");
    check(flash.page_w[7] == 16 && flash.page_data[7][15:0] == 16'hB1D0, "page 7");
    check(flash.bad_addr == 0 && flash.bad_op == 0, "flash addresses and opcodes");

    // auto-load page 4 into all DDR FIFOs, page 5 into GbE
    sdev.clear();
    autold(4'hF, 3'd4);
    for (int k = 8; k < 12; k++)
      check(sdev.cnt[k] == 32 && sdev.cap[k][31:0] == 32'h1234_5678,
            $sformatf("DDR FIFO %0d got %0d bits %h", k - 8, sdev.cnt[k], sdev.cap[k]));
    check(sdev.cnt[12] == 0 && sdev.cnt[0] == 0, "other devices untouched");
    check(in_vmedat[31:0] == 32'h1234_5678, "auto-load data copied into input register");
    autold(4'hC, 3'd5);
    check(sdev.cnt[12] == 34 && sdev.cap[12][33:0] == 34'h3_DEAD_BEEF,
          $sformatf("GbE got %0d bits %h", sdev.cnt[12], sdev.cap[12]));
    check(flash.n_read == 2, "two page reads");

    // read input FIFO 2
    sdev.fifo_word[2] = 32'hCAFE_F00D;
    vme(1, 4'h2, 4'h0, clocks);
    check(in_vmedat[31:0] == 32'hCAFE_F00D, $sformatf("FIFO 2 read %h", in_vmedat[31:0]));
    check(last_out == 16'hF00D, "FIFO read returns low word");

    // load DDR FIFO 1 and board ID from the input register
    sdev.clear();
    push(16'h0BAD); push(16'hF00D);
    vme(0, 4'h9, 4'h0, clocks);
    check(sdev.cnt[9] == 32 && sdev.cap[9][31:0] == 32'h0BAD_F00D, $sformatf("DDR FIFO 1 load %h", sdev.cap[9]));
    check(sdev.cnt[8] == 0 && sdev.cnt[10] == 0, "only FIFO 1 enabled");
    vme(0, 4'hE, 4'h0, clocks);
    check(sdev.cnt[14] == 16 && sdev.cap[14][15:0] == 16'hF00D, "board ID load");

    // auto-load-only flash command is refused without a transaction
    nprog = flash.n_read + flash.n_status + flash.n_prog;
    vme(1, 4'h4, 4'h1, clocks);
    check(clocks < 4, "refused command acknowledged at once");
    check(flash.n_read + flash.n_status + flash.n_prog == nprog, "no flash transaction");

    // VME waits while auto-load owns the engine
    @(negedge clk);
    auto_sld = 1;
    tovme = 1; dev = 4'h4; cmd = 4'h0; strobe = 1;
    repeat (100) @(negedge clk);
    check(!dtack && !busy, "VME access held off during auto-load");
    strobe = 0; auto_sld = 0;
    repeat (3) @(negedge clk);
    vme(1, 4'h4, 4'h0, clocks);
    check(last_out[7:0] == STAT, "status after auto-load released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
