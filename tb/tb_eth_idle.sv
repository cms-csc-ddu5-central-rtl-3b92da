// tb_eth_idle: after ld the generator must alternate K28.5 (1BC) and D16.2
// (050) on enabled clocks, hold on disabled ones, and read 0 when oe is low.
`include "tb_check.svh"
module tb_eth_idle;
  int checks = 0, failures = 0;
  logic clk = 0, ld = 1, ce = 0, oe = 1;
  logic [8:0] q;
  eth_idle dut (.clk(clk), .ld(ld), .ce(ce), .oe(oe), .q(q));
  always #5 clk = ~clk;
  `WATCHDOG(2000)
  int ph;
  initial begin
    @(posedge clk); #1 ld = 0; ph = 0;
    for (int n = 0; n < 100; n++) begin
      oe = 1; #1;
      `CHECK(q == (ph ? 9'h050 : 9'h1BC), "idle character")
      oe = ($urandom % 5) != 0; #1;
      if (!oe) `CHECK(q == 9'h000, "output disabled")
      ce = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (ce) ph ^= 1;
    end
    `TB_DONE
  end
endmodule
