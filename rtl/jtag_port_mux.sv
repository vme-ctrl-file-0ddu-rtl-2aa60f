// jtag_port_mux: shared JTAG pins of the DDU_Ctrl PROMs and DDU_Ctrl FPGA.
//
// The DDU_Ctrl PROM chain (engine dvc6, VME-JTAG device 3) and the DDU_Ctrl
// FPGA (engine dvc8, VME-JTAG device 5) sit on one physical chain with one
// TMS and one TCK pin. TMS and TCK come from whichever engine is enabled
// and are held low when neither is. The PROM-side TDI pin is driven by the
// PROM engine when it is enabled and held high otherwise: with the FPGA
// engine active the PROMs then see all ones, i.e. the BYPASS instruction,
// which the board needs. The FPGA engine's TDI has its own pin.
// Combinational; the gating follows the board's schematic.
module jtag_port_mux (
  input  logic dvcenb6,
  input  logic tdi6,
  input  logic tms6,
  input  logic tck6,
  input  logic dvcenb8,
  input  logic tms8,
  input  logic tck8,
  output logic otdi6,
  output logic otms6,
  output logic otck6
);

  wire dvcenb_6 = dvcenb6 || dvcenb8;
  wire tms_6    = (dvcenb6 && tms6) || (dvcenb8 && tms8);
  wire tck_6    = (dvcenb6 && tck6) || (dvcenb8 && tck8);

  assign otdi6 = !dvcenb6 || tdi6;
  assign otms6 = dvcenb_6 && tms_6;
  assign otck6 = dvcenb_6 && tck_6;

endmodule
