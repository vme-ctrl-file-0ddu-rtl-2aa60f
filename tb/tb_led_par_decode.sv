// tb_led_par_decode: all 256 mode-switch settings; LED_PAR must be one-hot
// of mode[3:0] for codes 0..7 when mode[5:4] = 11 and mode[7] = 0, else 0.
module tb_led_par_decode;
  logic [7:0] mode, led_par;
  int checks = 0, failures = 0;

  led_par_decode dut (.mode, .led_par);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      logic [7:0] exp;
      mode = 8'(m);
      #1;
      exp = 8'h00;
      if (m[5:4] == 2'b11 && m[7] == 1'b0 && m[3:0] < 8) exp = 8'h01 << m[3:0];
      checks++;
      if (led_par !== exp) begin
        failures++;
        $display("mode=%b led_par=%b exp %b", mode, led_par, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
