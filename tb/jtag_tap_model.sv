// jtag_tap_model: behavioural model of one JTAG device for the
// testbenches; not synthesizable. It follows the IEEE 1149.1 TAP state
// diagram on rising TCK edges, shifts a 32-bit data register and an
// IR_LEN-bit instruction register (TDI enters at the top, TDO is bit 0,
// changed on the falling edge), loads DR_CAPTURE / 1 in the capture states and
// copies the registers to dr_upd / ir_upd in the update states. It counts
// TCK edges, updates and visits of Test-Logic-Reset.
module jtag_tap_model #(
  parameter logic [31:0] DR_CAPTURE = 32'hA5C3_1E0F,
  parameter int          IR_LEN     = 8
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;
  tap_e        st = RTI;
  logic [31:0] dr = '0, dr_upd = '0;
  logic [IR_LEN-1:0] ir = '0, ir_upd = '0;
  int          n_tck = 0, n_upd_dr = 0, n_upd_ir = 0, n_tlr = 0;

  initial tdo = 1'b0;

  always @(posedge tck) begin
    n_tck++;
    if (st == SH_DR) dr = {tdi, dr[31:1]};
    if (st == SH_IR) ir = {tdi, ir[IR_LEN-1:1]};
    if (st == CAP_DR) dr = DR_CAPTURE;
    if (st == CAP_IR) ir = IR_LEN'(1);
    if (st == UPD_DR) begin dr_upd = dr; n_upd_dr++; end
    if (st == UPD_IR) begin ir_upd = ir; n_upd_ir++; end
    case (st)
      TLR:    st = tms ? TLR    : RTI;
      RTI:    st = tms ? SEL_DR : RTI;
      SEL_DR: st = tms ? SEL_IR : CAP_DR;
      CAP_DR: st = tms ? EX1_DR : SH_DR;
      SH_DR:  st = tms ? EX1_DR : SH_DR;
      EX1_DR: st = tms ? UPD_DR : PA_DR;
      PA_DR:  st = tms ? EX2_DR : PA_DR;
      EX2_DR: st = tms ? UPD_DR : SH_DR;
      UPD_DR: st = tms ? SEL_DR : RTI;
      SEL_IR: st = tms ? TLR    : CAP_IR;
      CAP_IR: st = tms ? EX1_IR : SH_IR;
      SH_IR:  st = tms ? EX1_IR : SH_IR;
      EX1_IR: st = tms ? UPD_IR : PA_IR;
      PA_IR:  st = tms ? EX2_IR : PA_IR;
      EX2_IR: st = tms ? UPD_IR : SH_IR;
      default: st = tms ? SEL_DR : RTI;   // UPD_IR
    endcase
    if (st == TLR) n_tlr++;
  end

  always @(negedge tck) begin
    tdo = (st == SH_DR) ? dr[0] : (st == SH_IR) ? ir[0] : 1'b0;
  end
endmodule
