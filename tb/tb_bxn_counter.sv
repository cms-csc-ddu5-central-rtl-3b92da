// tb_bxn_counter: bunch-crossing counter. After reset the limit must be
// 3563 and the counter must run 0..3563 (an orbit of 3564 clocks); after
// loading 923 (the SPS value) the orbit must be 924 clocks.
`include "tb_check.svh"
module tb_bxn_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, lim_load = 0;
  logic [11:0] lim_d = '0, bx_lim, bxn;
  bxn_counter dut (.clk(clk), .rst(rst), .lim_load(lim_load), .lim_d(lim_d), .bx_lim(bx_lim), .bxn(bxn));
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  int t0, t1, maxv;
  task automatic orbit(output int len, output int mx);
    int n; n = 0; mx = 0;
    while (bxn != 0) begin @(posedge clk); #1; end
    do begin
      if (32'(bxn) > mx) mx = 32'(bxn);
      `CHECK(bxn == 12'(n), "bxn counts up by one")
      @(posedge clk); #1; n++;
    end while (bxn != 0);
    len = n;
  endtask
  initial begin
    @(posedge clk); #1;
    `CHECK(bx_lim == 12'd3563 && bxn == 0, "reset values")
    rst = 0;
    orbit(t0, maxv);
    `CHECK(t0 == 3564 && maxv == 3563, $sformatf("LHC orbit length %0d max %0d", t0, maxv))
    lim_d = 12'd923; lim_load = 1; @(posedge clk); #1 lim_load = 0;
    `CHECK(bx_lim == 12'd923, "limit loaded")
    orbit(t1, maxv);
    orbit(t1, maxv);
    `CHECK(t1 == 924 && maxv == 923, $sformatf("SPS orbit length %0d", t1))
    `TB_DONE
  end
endmodule
