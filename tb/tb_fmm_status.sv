// tb_fmm_status: BUSY during reset and sync reset, WARNING following near
// full, sticky LOST SYNC cleared by a sync reset, sticky ERROR cleared only
// by a hard reset.
`include "tb_check.svh"
module tb_fmm_status;
  int checks = 0, failures = 0;
  logic clk = 0, hrst = 1, srst = 0, busy = 0, nf = 0, se = 0, he = 0;
  logic [3:0] fmm;
  fmm_status dut (.clk(clk), .hard_rst(hrst), .sync_rst(srst), .busy(busy), .near_full(nf),
                  .sync_err(se), .hard_err(he), .fmm(fmm));
  always #5 clk = ~clk;
  `WATCHDOG(2000)
  task automatic tick; @(posedge clk); #1; endtask
  initial begin
    tick;
    `CHECK(fmm == 4'b0001, "busy in hard reset")
    hrst = 0; tick;
    `CHECK(fmm == 4'b0000, "ready")
    nf = 1; tick;
    `CHECK(fmm == 4'b0010, "warning")
    nf = 0; se = 1; tick; se = 0; tick;
    `CHECK(fmm == 4'b0100, "lost sync is sticky")
    he = 1; tick; he = 0; tick;
    `CHECK(fmm == 4'b1100, "error is sticky")
    srst = 1; tick;
    `CHECK(fmm == 4'b1001, "sync reset: busy, sync cleared, error kept")
    srst = 0; tick;
    `CHECK(fmm == 4'b1000, "error kept after sync reset")
    busy = 1; tick;
    `CHECK(fmm[0] == 1'b1, "busy input")
    busy = 0; hrst = 1; tick; hrst = 0; tick;
    `CHECK(fmm == 4'b0000, "hard reset clears everything")
    `TB_DONE
  end
endmodule
