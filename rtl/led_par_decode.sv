// led_par_decode: mode-switch display decoder.
//
// The 8-position mode switch selects, among other things, what the front
// LEDs show. When mode bits 5:4 are 11 (VME-Parallel) and bit 7 (all I/O
// high) is clear, mode bits 3:0 are decoded one-hot and outputs 0..7 of the
// decoder drive LED_PAR[7:0]; codes 8..15 light nothing. Otherwise all
// LED_PAR outputs are low. Combinational, as in the board's schematic
// (a 4-to-16 decoder enabled by MODE4 & MODE5 & !MODE7).
module led_par_decode (
  input  logic [7:0] mode,
  output logic [7:0] led_par
);

  wire ledpar = mode[4] && mode[5] && !mode[7];

  always_comb begin
    led_par = '0;
    if (ledpar && !mode[3])
      led_par[mode[2:0]] = 1'b1;
  end

endmodule
