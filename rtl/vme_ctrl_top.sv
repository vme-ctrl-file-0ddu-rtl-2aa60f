// vme_ctrl_top: VME interface FPGA of the CMS CSC DDU board.
//
// The board sits in a VME crate as an A24/D16 slave. Its address carries
// the slot (checked against the geographic address, or the broadcast slot
// 28), an access type and a device/command field. Three access paths hang
// off the slave front end (vme_command):
//   * VME-JTAG (type 000): eight JTAG masters (vme_jtag), one per device
//     code 1..8, drive the board's JTAG chains: 1 output FIFO, 2 VME_Ctrl
//     PROM, 3 DDU_Ctrl PROMs, 4 InCtrl PROMs, 5 DDU_Ctrl FPGA, 6/7 InCtrl
//     FPGA 0/1, 8 input FIFOs. Codes 3 and 5 share one physical chain
//     (jtag_port_mux): its TMS/TCK/PROM-TDI come out on index 3, the FPGA's
//     own TDI on jtag_tdi[5], and both engines read jtag_tdo[3];
//     jtag_tms[5] and jtag_tck[5] stay low.
//   * VME-Serial (type 100): vme_serial reads the input FIFOs and the flash
//     status, programs flash pages, and loads FIFO offsets and DDU_Ctrl
//     settings; auto_load runs the flash-to-device loads after reset and on
//     request of the DDU_Ctrl FPGA.
//   * VME-Parallel (type 011): vme_parallel reads the FMM status registers,
//     the 48-bit input shift register, the mode switch and a status word,
//     and writes the input register.
// reset_ctrl combines the reset sources, clk_div makes the slower clock
// enables, fmm_decode turns this DDU's FMM code into its STAT bits and
// led_par_decode decodes the mode switch onto LED outputs.
//
// Interface: one clock `clk` (CLK, 40 MHz by default; the divider assumes
// MIDCLK = clk/4). VME control inputs are active low as on the backplane;
// the data bus is split into vme_d_in / vme_d_out with vme_d_oe for the
// bus transceiver, and dtack_n is driven low to acknowledge. A cycle is
// acknowledged only after its path has finished: 2 clocks for a parallel
// access, the full serial or JTAG shift otherwise.
// Not built: the emergency PROM path (JTAG code F) and the "all I/O high"
// switch setting.
module vme_ctrl_top
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        pwr_on_rst,
  input  logic        syncrst_n,
  input  logic        softrst_n,
  input  logic        sysrst_n,
  // VME bus
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
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        tovme,
  output logic        dtack_n,
  // board controls
  input  logic [7:0]  mode,
  output logic [7:0]  led_par,
  output logic        auto_sld_en_n,   // VME1 pin: mode bit 6 to DDU_Ctrl
  input  logic        ld_rdy_n,        // VME3 pin from DDU_Ctrl
  output logic        ddu_srdy,
  // FMM status
  input  logic [3:0]  ddu_fmm,
  input  logic [3:0][14:0] dmb_stat,
  // JTAG chains, index = VME-JTAG device code
  output logic [8:1]  jtag_tdi,
  output logic [8:1]  jtag_tms,
  output logic [8:1]  jtag_tck,
  input  logic [8:1]  jtag_tdo,
  output logic        devload,         // a JTAG shift has started
  output logic        devdonedata,     // a JTAG data segment has ended
  output logic        devdonetail,     // a JTAG tailer has ended
  // serial flash
  output logic        m_cs_n,
  output logic        m_sck,
  output logic        m_sdi,
  input  logic        m_sdo,
  // serially loaded devices, index = VME-Serial device code
  output logic        s_clk,
  output logic        s_do,
  output logic [15:0] s_sen,
  input  logic [3:0]  s_di
);

  // ---------------- reset and clocks ----------------
  logic rst, vme_rdy, sync_rst, soft_rst;
  reset_ctrl u_reset (
    .clk, .syncrst_n, .softrst_n, .pwr_on_rst, .sysrst_n, .ld_rdy_n,
    .vme_rdy, .sync_rst, .soft_rst, .reset(rst), .ddu_srdy
  );

  logic midclk, slowclk, slowclk2, ser_ce, slow_ce, slow2_ce;
  clk_div u_clk (
    .clk, .rst, .midclk, .slowclk, .slowclk2, .ser_ce, .slow_ce, .slow2_ce
  );

  // ---------------- VME slave front end ----------------
  logic        valid_am, valid_ga, slot_enb, broadcast_enb;
  logic [4:0]  slot;
  logic        strobe, jtag_strobe, ser_strobe, par_strobe;
  logic [9:0]  device;
  logic [3:0]  dev;
  logic [9:0]  command;
  logic [15:0] indata;
  vme_command u_cmd (
    .clk, .rst, .as_n, .ds0_n, .ds1_n, .write_n, .lword_n, .iack_n, .berr_n,
    .am, .ga_n, .adr, .data_in(vme_d_in),
    .valid_am, .valid_ga, .slot_enb, .broadcast_enb, .slot,
    .strobe, .jtag_strobe, .ser_strobe, .par_strobe, .tovme,
    .device, .dev, .command, .indata
  );

  // ---------------- VME-JTAG ----------------
  logic [8:1]        j_tdi, j_tms, j_tck, j_en, j_dtack, j_oe;
  logic [8:1]        j_load, j_done_data, j_done_tail;
  logic [8:1][15:0]  j_out;

  for (genvar i = 1; i <= 8; i++) begin : g_jtag
    // device 5 (DDU_Ctrl FPGA) shares the chain of device 3
    localparam int TDO_IDX = (i == 5) ? 3 : i;
    vme_jtag u_jtag (
      .clk, .rst, .ce(slow_ce), .sel(device[i]), .strobe(jtag_strobe),
      .command, .indata, .tdo(jtag_tdo[TDO_IDX]),
      .tdi(j_tdi[i]), .tms(j_tms[i]), .tck(j_tck[i]), .dvcenb(j_en[i]),
      .dtack(j_dtack[i]), .outdata_en(j_oe[i]), .outdata(j_out[i]),
      .load(j_load[i]), .done_data(j_done_data[i]), .done_tail(j_done_tail[i])
    );
  end

  assign devload     = |j_load;
  assign devdonedata = |j_done_data;
  assign devdonetail = |j_done_tail;

  logic otdi6, otms6, otck6;
  jtag_port_mux u_jmux (
    .dvcenb6(j_en[3]), .tdi6(j_tdi[3]), .tms6(j_tms[3]), .tck6(j_tck[3]),
    .dvcenb8(j_en[5]), .tms8(j_tms[5]), .tck8(j_tck[5]),
    .otdi6, .otms6, .otck6
  );

  always_comb begin
    for (int i = 1; i <= 8; i++) begin
      jtag_tdi[i] = !j_en[i] || j_tdi[i];
      jtag_tms[i] = j_en[i] && j_tms[i];
      jtag_tck[i] = j_en[i] && j_tck[i];
    end
    jtag_tdi[3] = otdi6;
    jtag_tms[3] = otms6;
    jtag_tck[3] = otck6;
    jtag_tms[5] = 1'b0;
    jtag_tck[5] = 1'b0;
  end

  // ---------------- VME-Serial and auto-load ----------------
  logic        auto_sld, al_req, al_done;
  logic [3:0]  al_dev;
  logic [2:0]  al_page;
  logic [1:0]  sldcmd;
  logic        s_dtack, s_oe, s_busy;
  logic [15:0] s_out;
  logic        in_wr;
  logic [15:0] in_wdata;
  logic [47:0] in_vmedat;

  auto_load u_auto (
    .clk, .rst, .enable(!mode[6]), .ld_req(!ld_rdy_n), .al_done,
    .auto_sld, .al_req, .al_dev, .al_page, .sldcmd, .vme_rdy
  );

  vme_serial u_ser (
    .clk, .rst, .ce(ser_ce),
    .strobe(ser_strobe), .tovme, .dev, .cmd(command[3:0]),
    .dtack(s_dtack), .outdata_en(s_oe), .outdata(s_out),
    .auto_sld, .al_req, .al_dev, .al_page, .al_done,
    .in_wr, .in_wdata, .in_vmedat, .busy(s_busy),
    .m_cs_n, .m_sck, .m_sdi, .m_sdo,
    .s_clk, .s_do, .s_sen, .s_di
  );

  // ---------------- VME-Parallel ----------------
  logic [3:0]  ddu_stat;
  logic        fmm_invalid;
  fmm_decode u_fmm (.fmm(ddu_fmm), .stat(ddu_stat), .invalid(fmm_invalid));

  logic        p_dtack, p_oe;
  logic [15:0] p_out;
  vme_parallel u_par (
    .clk, .rst, .strobe(par_strobe), .tovme, .dev, .command(command[7:0]),
    .indata, .dmb_stat, .ddu_stat, .ddu_fmm, .in_vmedat, .mode, .slot,
    .vme_rdy, .dtack(p_dtack), .outdata_en(p_oe), .outdata(p_out),
    .in_wr, .in_wdata
  );

  // ---------------- mode switch ----------------
  led_par_decode u_led (.mode, .led_par);
  assign auto_sld_en_n = mode[6];

  // ---------------- VME data and acknowledge ----------------
  always_comb begin
    vme_d_out = '0;
    for (int i = 1; i <= 8; i++)
      if (j_oe[i]) vme_d_out |= j_out[i];
    if (s_oe) vme_d_out |= s_out;
    if (p_oe) vme_d_out |= p_out;
  end
  assign vme_d_oe = tovme;
  assign dtack_n  = !(|j_dtack || s_dtack || p_dtack);

endmodule
