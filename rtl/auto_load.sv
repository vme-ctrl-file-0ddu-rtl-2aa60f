// auto_load: automatic serial load of the board's settings from flash.
//
// Four auto-load commands (SLD) copy a flash page into a serially loaded
// device through vme_serial:
//   SLD 0: page 1 (kill channel) -> DDU_Ctrl FPGA, device D
//   SLD 1: page 7 (board ID)     -> DDU_Ctrl FPGA, device E (after SLD 0)
//   SLD 2: page 4 (DDR offsets)  -> all four DDR input FIFOs, device F
//   SLD 3: page 5 (GbE offsets)  -> GbE output FIFO, device C
// After reset, SLD 2 and SLD 3 run in turn; then the board reports ready
// (vme_rdy). When the DDU_Ctrl FPGA requests its data (rising edge of
// ld_req), SLD 0 and SLD 1 run. Mode switch bit 6 (enable low) disables the
// automatic load; vme_rdy is then high at once and requests are ignored.
// auto_sld is high while a sequence owns the serial engine.
//
// Timing: a command's request stays high until vme_serial reports al_done;
// the next command is requested the clock after. The device/page pairs and
// the trigger of SLD 0/1 follow the board's tables; the order of SLD 2 and
// 3 and the use of ld_req as the DDU_Ctrl request are this design's choice.
module auto_load
  import vme_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       ld_req,
  input  logic       al_done,
  output logic       auto_sld,
  output logic       al_req,
  output logic [3:0] al_dev,
  output logic [2:0] al_page,
  output logic [1:0] sldcmd,
  output logic       vme_rdy
);

  typedef enum logic [2:0] {A_START, A_SLD2, A_SLD3, A_READY, A_SLD0, A_SLD1} state_e;
  state_e state;
  logic   ld_req_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= A_START;
      ld_req_q <= 1'b0;
    end else begin
      ld_req_q <= ld_req;
      unique case (state)
        A_START: state <= enable ? A_SLD2 : A_READY;
        A_SLD2:  if (al_done) state <= A_SLD3;
        A_SLD3:  if (al_done) state <= A_READY;
        A_READY: if (enable && ld_req && !ld_req_q) state <= A_SLD0;
        A_SLD0:  if (al_done) state <= A_SLD1;
        A_SLD1:  if (al_done) state <= A_READY;
        default: state <= A_START;
      endcase
    end
  end

  always_comb begin
    al_dev  = SDEV_ALLDDR;
    al_page = PAGE_DDR;
    sldcmd  = 2'd2;
    unique case (state)
      A_SLD3: begin al_dev = SDEV_GBE;     al_page = PAGE_GBE;     sldcmd = 2'd3; end
      A_SLD0: begin al_dev = SDEV_KILLCH;  al_page = PAGE_KILLCH;  sldcmd = 2'd0; end
      A_SLD1: begin al_dev = SDEV_BOARDID; al_page = PAGE_BOARDID; sldcmd = 2'd1; end
      default: ;
    endcase
  end

  assign auto_sld = state inside {A_SLD0, A_SLD1, A_SLD2, A_SLD3};
  assign al_req   = auto_sld && !al_done;
  assign vme_rdy  = state == A_READY;

endmodule
