// vme_serial: VME-Serial engine of the DDU VME FPGA (address type 100).
//
// It moves data over serial lines between a 48-bit input shift register
// (IN_VMEDAT), the serial flash memory and the serially loaded devices of
// the board. Operations, chosen by the device ADR[15:12] and, for the flash
// (device 4), the command ADR[5:2]:
//   read  dev 0..3   read input FIFO n: 32 bits from its serial output
//   read  dev 4 cmd 0  flash status: opcode D7h, then 8 bits in
//   write dev 4 cmd 9/C/D/F  program flash page 1/4/5/7 with the low 16/32/
//                    34/16 bits of IN_VMEDAT, after a 32-bit opcode
//                    (82h and a 24-bit page address)
//   write dev 8..B   load DDR input FIFO 0..3 with 32 bits of IN_VMEDAT
//   write dev C      load the GbE output FIFO (34 bits)
//   write dev D / E  load DDU_Ctrl kill-channel / board-ID word (16 bits)
//   write dev F      load all four DDR input FIFOs at once (32 bits)
// Anything else is acknowledged without action. The auto-load request
// (from auto_load) reads a flash page with a 64-bit opcode (D2h, 24-bit
// address, 32 don't-care bits) and streams its data bits straight from the
// flash output to the serial input of the destination device, copying them
// into IN_VMEDAT too. While auto-load owns the engine, VME-Serial accesses
// wait.
//
// IN_VMEDAT: received bits enter at bit 0 (MSb first on the line). A
// VME-Parallel write of input register 0 shifts the register up by 16 bits
// and puts the new word in bits 15:0, so two writes place a 32-bit word,
// three a 48-bit one. Transmitted data is sent MSb first, starting at bit
// W-1 of IN_VMEDAT. A VME-Serial read returns IN_VMEDAT[15:0] when its
// shifting is done; the rest is read through the VME-Parallel device 8.
//
// Timing: a serial bit takes two `ce` ticks, clock low then clock high, so
// serial clocks run at half the tick rate (MIDCLK with the default clk_div).
// Data out changes while the clock is low; data in is sampled on the tick
// that raises the clock. The flash is selected (m_cs_n low) for opcode and
// data; a device enable s_sen[dev] is high for its data bits. DTACK rises
// after the last bit and stays until the strobe drops.
// The operation list, widths, the status opcode and the device/page pairs
// follow the board's tables; the program/read opcodes, page addressing,
// shift order and IN_VMEDAT write rule are this design's choice.
module vme_serial
  import vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // VME side
  input  logic        strobe,
  input  logic        tovme,
  input  logic [3:0]  dev,
  input  logic [3:0]  cmd,
  output logic        dtack,
  output logic        outdata_en,
  output logic [15:0] outdata,
  // auto-load side
  input  logic        auto_sld,      // auto-load owns the engine
  input  logic        al_req,
  input  logic [3:0]  al_dev,
  input  logic [2:0]  al_page,
  output logic        al_done,
  // input shift register
  input  logic        in_wr,
  input  logic [15:0] in_wdata,
  output logic [47:0] in_vmedat,
  output logic        busy,
  // serial flash
  output logic        m_cs_n,
  output logic        m_sck,
  output logic        m_sdi,
  input  logic        m_sdo,
  // serial devices
  output logic        s_clk,
  output logic        s_do,
  output logic [15:0] s_sen,
  input  logic [3:0]  s_di
);

  typedef enum logic [1:0] {S_IDLE, S_OPC, S_DATA, S_DONE} state_e;
  typedef enum logic [2:0] {OP_NONE, OP_RDFIFO, OP_RDSTAT, OP_PROG, OP_LOAD, OP_AUTO} op_e;

  state_e      state;
  op_e         op;
  logic        sck;
  logic [63:0] opc_sr;
  logic [5:0]  opc_cnt;     // opcode bits left - 1
  logic [47:0] dat_sr;
  logic [5:0]  dat_cnt;     // data bits left - 1
  logic [3:0]  tdev;        // device whose enable / input is used
  logic        strobe_q;

  wire vme_start = strobe && !strobe_q && state == S_IDLE && !auto_sld;
  wire al_start  = al_req && state == S_IDLE && !vme_start && auto_sld;

  // Serial enable mask of a load or read device.
  function automatic logic [15:0] sen_mask(input logic [3:0] d);
    logic [15:0] m;
    m = '0;
    if (d == SDEV_ALLDDR) m[11:8] = 4'hF;
    else                  m[d] = 1'b1;
    return m;
  endfunction

  // Data bits of the selected width, aligned to the top of a 48-bit word.
  function automatic logic [47:0] align_top(input logic [47:0] v, input logic [5:0] w);
    return v << (6'd48 - w);
  endfunction

  wire rx_bit = (op == OP_RDFIFO) ? s_di[tdev[1:0]] : m_sdo;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      op        <= OP_NONE;
      sck       <= 1'b0;
      opc_sr    <= '0;
      opc_cnt   <= '0;
      dat_sr    <= '0;
      dat_cnt   <= '0;
      tdev      <= '0;
      strobe_q  <= 1'b0;
      in_vmedat <= '0;
      al_done   <= 1'b0;
    end else begin
      strobe_q <= strobe;
      al_done  <= 1'b0;
      if (vme_start) begin
        sck  <= 1'b0;
        tdev <= dev;
        if (tovme && dev < 4'd4) begin
          op      <= OP_RDFIFO;
          dat_cnt <= 6'd31;
          state   <= S_DATA;
        end else if (tovme && dev == SDEV_FLASH && cmd == 4'h0) begin
          op      <= OP_RDSTAT;
          opc_sr  <= {FLASH_OP_STATUS, 56'h0};
          opc_cnt <= 6'd7;
          dat_cnt <= 6'd7;
          state   <= S_OPC;
        end else if (!tovme && dev == SDEV_FLASH && cmd[3] && cmd[2:0] inside {3'd1, 3'd4, 3'd5, 3'd7}) begin
          op      <= OP_PROG;
          opc_sr  <= {FLASH_OP_PROGRAM, page_addr(cmd[2:0]), 32'h0};
          opc_cnt <= 6'd31;
          dat_sr  <= align_top(in_vmedat, page_width(cmd[2:0]));
          dat_cnt <= page_width(cmd[2:0]) - 6'd1;
          state   <= S_OPC;
        end else if (!tovme && dev[3]) begin
          op      <= OP_LOAD;
          dat_sr  <= align_top(in_vmedat, load_width(dev));
          dat_cnt <= load_width(dev) - 6'd1;
          state   <= S_DATA;
        end else begin
          op    <= OP_NONE;
          state <= S_DONE;
        end
      end else if (al_start) begin
        sck     <= 1'b0;
        tdev    <= al_dev;
        op      <= OP_AUTO;
        opc_sr  <= {FLASH_OP_READ, page_addr(al_page), 32'h0};
        opc_cnt <= 6'd63;
        dat_cnt <= page_width(al_page) - 6'd1;
        state   <= S_OPC;
      end else if (ce && (state == S_OPC || state == S_DATA)) begin
        if (!sck) begin
          sck <= 1'b1;
          if (state == S_DATA && op inside {OP_RDFIFO, OP_RDSTAT, OP_AUTO})
            in_vmedat <= {in_vmedat[46:0], rx_bit};
        end else begin
          sck <= 1'b0;
          if (state == S_OPC) begin
            opc_sr <= {opc_sr[62:0], 1'b0};
            if (opc_cnt == '0) state <= S_DATA;
            else               opc_cnt <= opc_cnt - 1'b1;
          end else begin
            dat_sr <= {dat_sr[46:0], 1'b0};
            if (dat_cnt == '0) begin
              if (op == OP_AUTO) begin
                al_done <= 1'b1;
                state   <= S_IDLE;
              end else begin
                state <= S_DONE;
              end
            end else begin
              dat_cnt <= dat_cnt - 1'b1;
            end
          end
        end
      end else if (state == S_DONE && !strobe) begin
        state <= S_IDLE;
      end
      if (in_wr && state == S_IDLE)
        in_vmedat <= {in_vmedat[31:0], in_wdata};
    end
  end

  wire flash_op = op inside {OP_RDSTAT, OP_PROG, OP_AUTO};
  wire active   = state == S_OPC || state == S_DATA;
  wire dev_data = state == S_DATA && op inside {OP_RDFIFO, OP_LOAD, OP_AUTO};

  assign m_cs_n = !(active && flash_op);
  assign m_sck  = active && flash_op && sck;
  assign m_sdi  = active && ((state == S_OPC) ? opc_sr[63] : (op == OP_PROG && dat_sr[47]));
  assign s_clk  = dev_data && sck;
  assign s_do   = dev_data && ((op == OP_AUTO) ? m_sdo : dat_sr[47]);
  assign s_sen  = dev_data ? sen_mask(tdev) : '0;

  assign dtack      = state == S_DONE && strobe;
  assign outdata_en = dtack && tovme;
  assign outdata    = in_vmedat[15:0];
  assign busy       = state != S_IDLE;

endmodule
