// serial_dev_model: behavioural model of the serially loaded devices of
// the board for the testbenches; not synthesizable. Device k captures
// s_do on each rising s_clk while s_sen[k] is high (cap[k], bit count
// cnt[k], last bit in bit 0). Devices 0..3 (input FIFOs) also drive
// s_di[k] from fifo_word[k], most significant bit first, changing on the
// falling edge; the first bit is presented when the enable rises.
module serial_dev_model (
  input  logic        s_clk,
  input  logic        s_do,
  input  logic [15:0] s_sen,
  output logic [3:0]  s_di
);
  logic [63:0] cap [16];
  int          cnt [16];
  logic [31:0] fifo_word [4];
  int          rd_idx [4];

  initial begin
    for (int k = 0; k < 16; k++) begin cap[k] = '0; cnt[k] = 0; end
    for (int k = 0; k < 4; k++) begin fifo_word[k] = 32'h0; rd_idx[k] = 0; end
    s_di = '0;
  end

  task automatic clear();
    for (int k = 0; k < 16; k++) begin cap[k] = '0; cnt[k] = 0; end
  endtask

  for (genvar k = 0; k < 4; k++) begin : g_fifo
    always @(posedge s_sen[k]) begin
      rd_idx[k] = 0;
      s_di[k]   = fifo_word[k][31];
    end
    always @(negedge s_clk) begin
      if (s_sen[k]) begin
        rd_idx[k] = rd_idx[k] + 1;
        s_di[k]   = (rd_idx[k] < 32) ? fifo_word[k][31 - rd_idx[k]] : 1'b0;
      end
    end
  end

  always @(posedge s_clk) begin
    for (int k = 0; k < 16; k++) begin
      if (s_sen[k]) begin
        cap[k] = {cap[k][62:0], s_do};
        cnt[k] = cnt[k] + 1;
      end
    end
  end
endmodule
