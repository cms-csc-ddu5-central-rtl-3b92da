// tb_fiber_led: FOK lit when present and ready, blinking with the divider's
// top bit when present but not ready, off when absent; DAV follows dav.
`include "tb_check.svh"
module tb_fiber_led;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [14:0] present, ready, dav, fok, davl;
  fiber_led #(.N(15), .BLINK_W(4)) dut (.clk(clk), .rst(rst), .present(present), .ready(ready),
    .dav(dav), .fok_led(fok), .dav_led(davl));
  always #5 clk = ~clk;
  `WATCHDOG(3000)
  int cyc, on_cnt, off_cnt;
  logic blink;
  initial begin
    present = 15'h7F00; ready = 15'h0FF0; dav = 0;
    @(posedge clk); #1 rst = 0; cyc = 0; on_cnt = 0; off_cnt = 0;
    for (int n = 0; n < 200; n++) begin
      dav = 15'($urandom);
      @(posedge clk); #1; cyc++;
      // divider value used for this edge was cyc-1 (it counted from 0)
      blink = ((cyc - 1) >> 3) & 1;
      `CHECK(fok == (present & (ready | {15{blink}})), "FOK LED")
      `CHECK(davl == dav, "DAV LED")
      if (fok[14]) on_cnt++; else off_cnt++;
    end
    `CHECK(on_cnt > 50 && off_cnt > 50, "not-ready LED blinks")
    `TB_DONE
  end
endmodule
