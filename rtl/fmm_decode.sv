// fmm_decode: DDU FMM state to STAT bits.
//
// The DDU reports its state on a 4-bit FMM code: 0001 warning/near full,
// 0010 lost sync (needs a sync reset), 0100 busy, 1000 ready, 1100 error
// (needs a hard reset). The VME-Parallel FMM registers hold one bit per
// board for each of four STAT conditions: 0 busy (not ready), 1 warning,
// 2 lost sync, 3 error. This module turns the DDU's own code into its four
// STAT bits. Each bit is set for an exact code match; a code outside the
// table (for example 0000, an unconnected bus) sets none of them and raises
// `invalid`, which is this design's choice. Purely combinational.
module fmm_decode
  import vme_pkg::*;
(
  input  logic [3:0] fmm,
  output logic [3:0] stat,
  output logic       invalid
);

  always_comb begin
    stat = '0;
    stat[STAT_BUSY]  = (fmm == FMM_BUSY);
    stat[STAT_WARN]  = (fmm == FMM_WARN);
    stat[STAT_OOS]   = (fmm == FMM_OOS);
    stat[STAT_ERROR] = (fmm == FMM_ERROR);
    invalid = (stat == '0) && (fmm != FMM_READY);
  end

endmodule
