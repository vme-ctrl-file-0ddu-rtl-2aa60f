// clk_div: clock-enable generator for the slower clocks of the VME FPGA.
//
// The board runs from CLK (40 MHz). MIDCLK (also called SCLK, 10 MHz) is the
// highest serial rate the FIFOs accept; SLOWCLK (2.5 MHz) is MIDCLK / 4, made
// by two toggle flip-flops; SLOWCLK2 (1.25 MHz) is SLOWCLK / 2 and is what
// the PROMs' in-system programming needs. On the board the divided clock is
// re-registered on MIDCLK and then on the fast clock so that its edges are
// aligned with the fast clock.
//
// This module keeps everything in the fast-clock domain: a free-running
// counter produces the three clock waveforms as registered levels (midclk,
// slowclk, slowclk2) and one-cycle enables:
//   ser_ce   - twice the MIDCLK rate: one serial bit takes two ser_ce ticks
//              (clock low, clock high), so serial clocks run at MIDCLK;
//   slow_ce  - twice the SLOWCLK2 rate: one JTAG bit takes two ticks, so TCK
//              runs at SLOWCLK2 (1.25 MHz);
//   slow2_ce - once per SLOWCLK2 period.
// The ratios follow the board's clock list; using enables instead of
// derived clocks is this design's choice.
module clk_div #(
  parameter int unsigned MID_DIV = 4   // fast clocks per MIDCLK period (40/10)
) (
  input  logic clk,
  input  logic rst,
  output logic midclk,
  output logic slowclk,
  output logic slowclk2,
  output logic ser_ce,
  output logic slow_ce,
  output logic slow2_ce
);

  localparam int unsigned PERIOD = MID_DIV * 8;  // one SLOWCLK2 period
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      midclk   <= 1'b0;
      slowclk  <= 1'b0;
      slowclk2 <= 1'b0;
      ser_ce   <= 1'b0;
      slow_ce  <= 1'b0;
      slow2_ce <= 1'b0;
    end else begin
      midclk   <= (cnt % CW'(MID_DIV))     >= CW'(MID_DIV / 2);
      slowclk  <= (cnt % CW'(MID_DIV * 4)) >= CW'(MID_DIV * 2);
      slowclk2 <= cnt >= CW'(MID_DIV * 4);
      ser_ce   <= (cnt % CW'(MID_DIV / 2)) == '0;
      slow_ce  <= (cnt % CW'(MID_DIV * 4)) == '0;
      slow2_ce <= cnt == '0;
    end
  end

endmodule
