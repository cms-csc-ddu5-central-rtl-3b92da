// tb_eth_sync: after ld the generator must loop K28.5 D21.5 K28.5 D2.2
// (1BC 0B5 1BC 042) on enabled clocks, and read 0 when oe is low.
`include "tb_check.svh"
module tb_eth_sync;
  int checks = 0, failures = 0;
  logic clk = 0, ld = 1, ce = 0, oe = 1;
  logic [8:0] q;
  logic [8:0] seq [4] = '{9'h1BC, 9'h0B5, 9'h1BC, 9'h042};
  eth_sync dut (.clk(clk), .ld(ld), .ce(ce), .oe(oe), .q(q));
  always #5 clk = ~clk;
  `WATCHDOG(2000)
  int ph;
  initial begin
    @(posedge clk); #1 ld = 0; ph = 0;
    for (int n = 0; n < 100; n++) begin
      oe = 1; #1;
      `CHECK(q == seq[ph], $sformatf("sync character %0d", ph))
      oe = 0; #1;
      `CHECK(q == 9'h000, "output disabled")
      ce = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (ce) ph = (ph + 1) % 4;
    end
    `TB_DONE
  end
endmodule
