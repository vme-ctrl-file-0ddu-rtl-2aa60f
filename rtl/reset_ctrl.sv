// reset_ctrl: reset combination and serial-ready output of the VME FPGA.
//
// Reset sources: the SYNCRST* and SOFTRST* inputs (active low, inverted at
// the pads), the power-on reset, and the VME SYSRESET*. SOFT_RST is SOFTRST
// or power-on reset; RESET is SYNC_RST or SOFT_RST or SYSRESET. The
// combination follows the board's schematic. This design adds a reset
// synchroniser: RESET is applied at once (asynchronously) and released two
// clocks after all sources are gone, so that the rest of the design can use
// a plain synchronous reset.
//
// DDU_SRDY tells the DDU_Ctrl FPGA that serial loading is ready: it is
// LD_RDY (the inverted VME3 input) and VME_RDY delayed by four clocks
// (VME_RDY+4 in the board's naming).
module reset_ctrl (
  input  logic clk,
  input  logic syncrst_n,
  input  logic softrst_n,
  input  logic pwr_on_rst,
  input  logic sysrst_n,
  input  logic ld_rdy_n,     // VME3 input
  input  logic vme_rdy,
  output logic sync_rst,
  output logic soft_rst,
  output logic reset,        // synchronised reset for the design
  output logic ddu_srdy
);

  assign sync_rst = !syncrst_n;
  assign soft_rst = !softrst_n || pwr_on_rst;
  wire   reset_any = sync_rst || soft_rst || !sysrst_n;

  logic [1:0] rst_sync;
  always_ff @(posedge clk or posedge reset_any) begin
    if (reset_any) rst_sync <= 2'b11;
    else           rst_sync <= {rst_sync[0], 1'b0};
  end
  assign reset = rst_sync[1];

  logic [3:0] rdy_dly;
  always_ff @(posedge clk) begin
    if (reset) rdy_dly <= '0;
    else       rdy_dly <= {rdy_dly[2:0], vme_rdy};
  end
  assign ddu_srdy = !ld_rdy_n && rdy_dly[3];

endmodule
