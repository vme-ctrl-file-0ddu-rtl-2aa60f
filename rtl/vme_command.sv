// vme_command: VME A24/D16 slave front end of the DDU VME FPGA.
//
// When address strobe AS* is asserted the module latches the address
// ADR[23:2], the address modifier AM[5:0] and LWORD*. It then checks:
//   * the address modifier: AM5&AM4&AM3 and AM0 xor AM1, i.e. one of the
//     four A24 program/data codes (supervisory or non-privileged), and
//     LWORD* high (16-bit transfer);
//   * the geographic address: GA*[5:0] inverted, the six bits must have odd
//     parity (VALIDGA);
//   * the slot field ADR[23:19] against the inverted GA[4:0] (SLOT_ENB), or
//     against the broadcast slot 28 (BROADCAST_ENB).
// A selected cycle is split by the type field ADR[18:16] into VME-JTAG
// (000, device decoded one-hot into DEVICE[9:0]), VME-Serial (100) and
// VME-Parallel (011). While the board is selected and both data strobes are
// asserted, STROBE is high together with the strobe of the addressed path;
// TOVME is high for a read cycle. Write data is latched into INDATA at the
// start of the data phase. The cycle ends when the master releases DS*.
//
// Timing: everything runs on one clock. AS*, DS0* and DS1* pass a two-flop
// synchroniser; address, AM, LWORD* and WRITE* are sampled in the clock
// where the synchronised AS* is first seen low (the bus keeps them stable
// while AS* is asserted). STROBE rises three clocks after both DS* fall.
// The checks and field positions follow the board's schematics; the
// synchroniser and the single-clock sampling are this design's choice (the
// board latches address and AM in input flip-flops clocked by AS).
module vme_command
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // VME bus (active-low control signals as on the backplane)
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        ds1_n,
  input  logic        write_n,
  input  logic        lword_n,
  input  logic        iack_n,
  input  logic        berr_n,
  input  logic [5:0]  am,
  input  logic [5:0]  ga_n,
  input  logic [23:1] adr,
  input  logic [15:0] data_in,
  // address checks
  output logic        valid_am,
  output logic        valid_ga,
  output logic        slot_enb,
  output logic        broadcast_enb,
  output logic [4:0]  slot,           // own slot number (inverted GA)
  // decoded access
  output logic        strobe,         // selected data phase, any type
  output logic        jtag_strobe,
  output logic        ser_strobe,
  output logic        par_strobe,
  output logic        tovme,          // 1 = read cycle (data to VME)
  output logic [9:0]  device,         // VME-JTAG device one-hot (dev 0..9)
  output logic [3:0]  dev,            // ADR[15:12]
  output logic [9:0]  command,        // ADR[11:2]
  output logic [15:0] indata          // latched write data
);

  // ---- synchronisers ----
  logic [1:0] as_s, ds0_s, ds1_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      as_s  <= '1;
      ds0_s <= '1;
      ds1_s <= '1;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds0_n};
      ds1_s <= {ds1_s[0], ds1_n};
    end
  end
  wire as_act = !as_s[1];
  wire ds_act = !ds0_s[1] && !ds1_s[1];

  // ---- address latch (taken when AS is first seen asserted) ----
  logic        as_act_q;
  logic [23:2] adrs;
  logic [5:0]  ams;
  logic        lword_q, write_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      as_act_q <= 1'b0;
      adrs     <= '0;
      ams      <= '0;
      lword_q  <= 1'b0;
      write_q  <= 1'b1;
    end else begin
      as_act_q <= as_act;
      if (as_act && !as_act_q) begin
        adrs    <= adr[23:2];
        ams     <= am;
        lword_q <= lword_n;
        write_q <= write_n;
      end
    end
  end

  // ---- address modifier and geographic address checks ----
  logic [5:0] cga;
  assign cga      = ~ga_n;
  assign slot     = cga[4:0];
  assign valid_ga = ^cga;
  assign valid_am = (ams[0] ^ ams[1]) && ams[3] && ams[4] && ams[5] && lword_q;

  assign slot_enb      = valid_ga && (adrs[23:19] == cga[4:0]);
  assign broadcast_enb = valid_ga && (adrs[23:19] == BROADCAST_SLOT);

  wire selected = as_act && as_act_q && valid_am && (slot_enb || broadcast_enb)
                  && iack_n && berr_n;

  // ---- field decode ----
  addr_type_e atype;
  assign atype   = addr_type_e'(adrs[18:16]);
  assign dev     = adrs[15:12];
  assign command = adrs[11:2];

  logic strobe_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_q <= 1'b0;
      tovme    <= 1'b0;
      indata   <= '0;
    end else begin
      strobe_q <= selected && ds_act;
      tovme    <= selected && ds_act && write_q;
      if (selected && ds_act && !strobe_q && !write_q)
        indata <= data_in;
    end
  end

  assign strobe      = strobe_q;
  assign jtag_strobe = strobe_q && (atype == ADDR_JTAG);
  assign ser_strobe  = strobe_q && (atype == ADDR_SERIAL);
  assign par_strobe  = strobe_q && (atype == ADDR_PARALLEL);

  always_comb begin
    device = '0;
    if (atype == ADDR_JTAG && dev < 4'd10)
      device[dev] = 1'b1;
  end

endmodule
