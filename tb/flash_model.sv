// flash_model: behavioural model of a serial (DataFlash-style) flash
// memory for the testbenches; not synthesizable.
// SPI mode 0: SI sampled on the rising SCK edge, SO changed on the falling
// edge, one transaction per CS* low period. Opcodes:
//   D7h  status read: STATUS is returned, repeated every 8 bits;
//   82h  page program: 24 address bits, then data bits; on CS* rising the
//        data (up to 64 bits, last bit in bit 0) and its bit count are
//        stored for the page in address bits 11:9;
//   D2h  page read: 24 address bits, 32 don't-care bits, then the stored
//        bits of the page, first-programmed bit first.
// Address bits 23:12 and 8:0 must be zero (the pages used by the design);
// anything else counts in bad_addr. Counters let a testbench see what
// happened.
module flash_model #(
  parameter logic [7:0] STATUS = 8'h9C
) (
  input  logic cs_n,
  input  logic sck,
  input  logic si,
  output logic so
);
  logic [7:0]  op;
  logic [23:0] addr;
  logic [63:0] shin;
  int          nbits, dcount;
  logic [63:0] page_data [8];
  int          page_w [8];
  int          n_status = 0, n_prog = 0, n_read = 0, bad_addr = 0, bad_op = 0;

  initial begin
    so = 1'b0;
    for (int p = 0; p < 8; p++) begin
      page_data[p] = '0;
      page_w[p]    = 0;
    end
  end

  always @(negedge cs_n) begin
    nbits  = 0;
    dcount = 0;
    shin   = '0;
    op     = '0;
    addr   = '0;
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      if (nbits < 8)                        op   = {op[6:0], si};
      else if (nbits < 32 && op != 8'hD7)   addr = {addr[22:0], si};
      else if (op == 8'h82) begin
        shin   = {shin[62:0], si};
        dcount = dcount + 1;
      end
      nbits = nbits + 1;
      if (nbits == 8) begin
        if (op == 8'hD7) n_status++;
        else if (op == 8'hD2) n_read++;
        else if (op != 8'h82) bad_op++;
      end
      if (nbits == 32 && op != 8'hD7 && (addr[23:12] != 0 || addr[8:0] != 0)) bad_addr++;
    end
  end

  always @(negedge sck) begin
    if (!cs_n) begin
      if (op == 8'hD7 && nbits >= 8) begin
        so = STATUS[7 - ((nbits - 8) % 8)];
      end else if (op == 8'hD2 && nbits >= 64) begin
        int idx, w;
        logic [2:0] pg;
        pg  = addr[11:9];
        w   = page_w[pg];
        idx = nbits - 64;
        so  = (idx < w) ? page_data[pg][w - 1 - idx] : 1'b0;
      end else begin
        so = 1'b0;
      end
    end
  end

  always @(posedge cs_n) begin
    if (op == 8'h82 && nbits >= 32) begin
      page_data[addr[11:9]] = shin;
      page_w[addr[11:9]]    = dcount;
      n_prog++;
    end
  end
endmodule
