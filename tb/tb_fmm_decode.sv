// tb_fmm_decode: exhaustive check of the FMM code to STAT bit decoder
// against the code table (busy 0100, warning 0001, lost sync 0010,
// error 1100, ready 1000; every other code invalid).
module tb_fmm_decode;
  logic [3:0] fmm, stat;
  logic       invalid;
  int checks = 0, failures = 0;

  fmm_decode dut (.fmm, .stat, .invalid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      logic [3:0] exp_stat;
      logic       exp_inv;
      fmm = 4'(c);
      #1;
      case (c)
        4'b0100: begin exp_stat = 4'b0001; exp_inv = 0; end
        4'b0001: begin exp_stat = 4'b0010; exp_inv = 0; end
        4'b0010: begin exp_stat = 4'b0100; exp_inv = 0; end
        4'b1100: begin exp_stat = 4'b1000; exp_inv = 0; end
        4'b1000: begin exp_stat = 4'b0000; exp_inv = 0; end
        default: begin exp_stat = 4'b0000; exp_inv = 1; end
      endcase
      checks++;
      if (stat !== exp_stat || invalid !== exp_inv) begin
        failures++;
        $display("fmm=%b stat=%b exp %b invalid=%b exp %b", fmm, stat, exp_stat, invalid, exp_inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
