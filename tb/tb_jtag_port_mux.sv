// tb_jtag_port_mux: all input combinations of the shared DDU_Ctrl chain
// pins. Expected: the pins follow the enabled engine; with no engine
// enabled TMS and TCK are low; PROM TDI is high unless the PROM engine is
// enabled.
module tb_jtag_port_mux;
  logic dvcenb6, tdi6, tms6, tck6, dvcenb8, tms8, tck8;
  logic otdi6, otms6, otck6;
  int checks = 0, failures = 0;

  jtag_port_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic et, em, ec;
      {dvcenb6, tdi6, tms6, tck6, dvcenb8, tms8, tck8} = 7'(v);
      #1;
      // only one engine is ever enabled; with both, either may win
      if (dvcenb6 && dvcenb8) continue;
      if (dvcenb6)      begin et = tdi6; em = tms6; ec = tck6; end
      else if (dvcenb8) begin et = 1'b1; em = tms8; ec = tck8; end
      else              begin et = 1'b1; em = 1'b0; ec = 1'b0; end
      checks++;
      if ({otdi6, otms6, otck6} !== {et, em, ec}) begin
        failures++;
        $display("in=%b out=%b%b%b exp %b%b%b", 7'(v), otdi6, otms6, otck6, et, em, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
