// fmm_status: the DDU's 4-bit status to the FMM (fast merging module) of
// the trigger throttling system.
//
// Bit 0 BUSY (not ready), bit 1 WARNING (near full, slow the triggers down),
// bit 2 LOST SYNC (needs a sync reset), bit 3 ERROR (needs a hard reset).
// BUSY follows reset (held high while any reset is active) and the busy
// input; WARNING follows near_full. LOST SYNC is set by a sync_err pulse and
// held until sync_rst or hard_rst; ERROR is set by a hard_err pulse and held
// until hard_rst. All outputs are registered (one clock of latency). The bit
// meanings are the DDU's; which events set them and the sticky behaviour
// are this design's choice.
module fmm_status
  import ddu5ctrl_pkg::*;
(
  input  logic       clk,
  input  logic       hard_rst,
  input  logic       sync_rst,
  input  logic       busy,
  input  logic       near_full,
  input  logic       sync_err,
  input  logic       hard_err,
  output logic [3:0] fmm
);
  always_ff @(posedge clk)
    if (hard_rst) fmm <= 4'b0001;
    else begin
      fmm[FMM_BUSY]  <= sync_rst | busy;
      fmm[FMM_WARN]  <= near_full;
      fmm[FMM_SYNC]  <= sync_rst ? 1'b0 : (fmm[FMM_SYNC] | sync_err);
      fmm[FMM_ERROR] <= fmm[FMM_ERROR] | hard_err;
    end
endmodule
