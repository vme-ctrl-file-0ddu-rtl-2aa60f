// vme_parallel: VME-Parallel register access (address type 011).
//
// Address fields: dev = ADR[15:12], cmd = ADR[9:2]. Devices 0..7 are read
// only and need no command; devices 8 and up need a command, and a command
// of 128 or more is a write. All data is 16 bits.
//   dev 0..3  FMM registers, one per STAT condition (0 busy, 1 warning,
//             2 lost sync, 3 error): bit 15 = this DDU, bits 14:0 = DMB 14..0
//   dev 8     input shift register (48 bits, kept in vme_serial):
//             cmd 00/01/02 read bits 47:32 / 31:16 / 15:0,
//             cmd 80 write register 0 (see vme_serial for how it is stored)
//   dev 14    bits 7:0 = mode switch
//   dev 15    info/status: bit 15 = VME ready, bits 11:8 = DDU FMM code,
//             bits 4:0 = geographic slot
// Other addresses read as 0 and ignore writes.
//
// Timing (as on the board): PEN0 is the parallel strobe; PEN1 is PEN0
// registered; PEN = PEN0 & PEN1 enables the read data; P_DATEN is PEN
// registered and drives DTACK, i.e. DTACK two clocks after the strobe. All
// three flops clear as soon as the strobe (data strobes) drops. A write
// produces one pulse of PCMD_WR, registered from cmd[7] & PEN0 & !PEN1 for
// a write cycle. The register assignment of dev 15 is this design's choice.
module vme_parallel
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        strobe,        // VME_PEN0
  input  logic        tovme,         // read cycle
  input  logic [3:0]  dev,
  input  logic [7:0]  command,       // ADR[9:2]
  input  logic [15:0] indata,
  // register sources
  input  logic [3:0][14:0] dmb_stat,  // [STAT condition][DMB]
  input  logic [3:0]  ddu_stat,
  input  logic [3:0]  ddu_fmm,
  input  logic [47:0] in_vmedat,
  input  logic [7:0]  mode,
  input  logic [4:0]  slot,
  input  logic        vme_rdy,
  // outputs
  output logic        dtack,
  output logic        outdata_en,
  output logic [15:0] outdata,
  output logic        in_wr,         // write input register 0
  output logic [15:0] in_wdata
);

  logic pen1, p_daten, pcmd_wr;
  wire  pen0 = strobe;
  wire  pen  = pen0 && pen1;

  always_ff @(posedge clk) begin
    if (rst || !pen0) begin
      pen1    <= 1'b0;
      p_daten <= 1'b0;
      pcmd_wr <= 1'b0;
    end else begin
      pen1    <= pen0;
      p_daten <= pen;
      pcmd_wr <= command[7] && pen0 && !pen1 && !tovme;
    end
  end
  assign dtack = p_daten && pen0;   // the board clears these flops asynchronously

  // Command decoder (PCMD one-hot of cmd[3:0], enabled by PEN0).
  logic [15:0] pcmd;
  always_comb begin
    pcmd = '0;
    if (pen0) pcmd[command[3:0]] = 1'b1;
  end

  always_comb begin
    outdata = '0;
    unique case (dev)
      4'd0, 4'd1, 4'd2, 4'd3: outdata = {ddu_stat[dev[1:0]], dmb_stat[dev[1:0]]};
      4'd8: begin
        if (command[7:4] == 4'h0) begin
          if (pcmd[0])      outdata = in_vmedat[47:32];
          else if (pcmd[1]) outdata = in_vmedat[31:16];
          else if (pcmd[2]) outdata = in_vmedat[15:0];
        end
      end
      4'd14: outdata = {8'h00, mode};
      4'd15: outdata = {vme_rdy, 3'b000, ddu_fmm, 3'b000, slot};
      default: outdata = '0;
    endcase
  end
  assign outdata_en = pen && tovme;

  assign in_wr    = pcmd_wr && dev == 4'd8 && command == 8'h80;
  assign in_wdata = indata;

endmodule
