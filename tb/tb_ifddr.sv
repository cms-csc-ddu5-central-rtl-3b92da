// tb_ifddr: DDR input register. The pins carry one random value while clk
// is high and another while it is low; after the next rising edge q_fall
// must hold the high-phase value and q_rise the low-phase value. Checks the
// clock-enable hold and the asynchronous clear.
`include "tb_check.svh"
module tb_ifddr;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0, ce = 1;
  logic [35:0] d = '0, q_rise, q_fall;
  logic [35:0] hi_v, lo_v, exp_r, exp_f;
  ifddr #(.W(36)) dut (.clk(clk), .clr(clr), .ce(ce), .d(d), .q_rise(q_rise), .q_fall(q_fall));
  always #5 clk = ~clk;
  `WATCHDOG(1000)
  initial begin
    #1 clr = 1;
    #1;
    `CHECK(q_rise == 0 && q_fall == 0, "clear")
    @(posedge clk); #1 clr = 0;
    for (int n = 0; n < 60; n++) begin
      hi_v = {$urandom, $urandom};
      lo_v = {$urandom, $urandom};
      ce   = (n % 7 != 3);
      exp_r = ce ? lo_v : q_rise;
      exp_f = ce ? hi_v : q_fall;
      d = hi_v;
      @(negedge clk); #1 d = lo_v;
      @(posedge clk); #1;
      `CHECK(q_fall == exp_f, "falling-edge half")
      `CHECK(q_rise == exp_r, "rising-edge half")
    end
    clr = 1; #1;
    `CHECK(q_rise == 0 && q_fall == 0, "asynchronous clear")
    `TB_DONE
  end
endmodule
