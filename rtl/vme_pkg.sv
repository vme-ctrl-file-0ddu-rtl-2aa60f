// vme_pkg: types and constants shared by the DDU VME-interface FPGA.
//
// The VME address of this board is split into fields:
//   slot[23:19] type[18:16] dev[15:12] ... cmd ... res[1:0]
// The type field selects one of three access paths (VME-JTAG, VME-Serial,
// VME-Parallel); the device and command fields are then read per path.
// Codes below follow the board's device and command tables; the serial
// flash opcodes other than the status-read opcode are this design's choice
// (the usual DataFlash page-program and page-read opcodes).
package vme_pkg;

  // Address type field ADR[18:16].
  typedef enum logic [2:0] {
    ADDR_JTAG     = 3'b000,
    ADDR_PARALLEL = 3'b011,
    ADDR_SERIAL   = 3'b100
  } addr_type_e;

  // Broadcast slot number (DDU broadcast address 28 = 11100b).
  localparam logic [4:0] BROADCAST_SLOT = 5'd28;

  // JTAG commands (ADR[5:2]); bit 0 = header, bit 1 = tailer, bit 3 = IR.
  localparam logic [3:0] JCMD_READ_TDO = 4'h5;
  localparam logic [3:0] JCMD_RESET    = 4'h6;
  localparam logic [3:0] JCMD_IR_HT    = 4'h7;

  // FMM 4-bit codes.
  localparam logic [3:0] FMM_WARN  = 4'b0001;
  localparam logic [3:0] FMM_OOS   = 4'b0010;
  localparam logic [3:0] FMM_BUSY  = 4'b0100;
  localparam logic [3:0] FMM_READY = 4'b1000;
  localparam logic [3:0] FMM_ERROR = 4'b1100;

  // STAT bit positions (index of the four parallel FMM registers).
  localparam int STAT_BUSY  = 0;
  localparam int STAT_WARN  = 1;
  localparam int STAT_OOS   = 2;
  localparam int STAT_ERROR = 3;

  // Serial flash opcodes.
  localparam logic [7:0] FLASH_OP_STATUS  = 8'hD7;  // read status register
  localparam logic [7:0] FLASH_OP_PROGRAM = 8'h82;  // page program, 32-bit opcode
  localparam logic [7:0] FLASH_OP_READ    = 8'hD2;  // page read, 64-bit opcode

  // Serial device codes (ADR[15:12] of a VME-Serial access).
  localparam logic [3:0] SDEV_FLASH   = 4'h4;
  localparam logic [3:0] SDEV_GBE     = 4'hC;
  localparam logic [3:0] SDEV_KILLCH  = 4'hD;
  localparam logic [3:0] SDEV_BOARDID = 4'hE;
  localparam logic [3:0] SDEV_ALLDDR  = 4'hF;

  // Flash pages.
  localparam logic [2:0] PAGE_KILLCH  = 3'd1;
  localparam logic [2:0] PAGE_DDR     = 3'd4;
  localparam logic [2:0] PAGE_GBE     = 3'd5;
  localparam logic [2:0] PAGE_BOARDID = 3'd7;

  // Data width stored in each flash page: 16 (kill channel), 32 (DDR
  // offsets), 34 (GbE offsets), 16 (board ID).
  function automatic logic [5:0] page_width(input logic [2:0] page);
    case (page)
      PAGE_DDR: return 6'd32;
      PAGE_GBE: return 6'd34;
      default:  return 6'd16;
    endcase
  endfunction

  // Data width loaded into a serial load device (codes 8..F).
  function automatic logic [5:0] load_width(input logic [3:0] dev);
    case (dev)
      SDEV_GBE:                  return 6'd34;
      SDEV_KILLCH, SDEV_BOARDID: return 6'd16;
      default:                   return 6'd32;
    endcase
  endfunction

  // 24-bit flash address of a page: page number in bits [19:9],
  // byte offset 0.
  function automatic logic [23:0] page_addr(input logic [2:0] page);
    return {4'b0, 8'b0, page, 9'b0};
  endfunction

endpackage
