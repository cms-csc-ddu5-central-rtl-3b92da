// tb_l1a_counter: L1A counter against a count of the random pulses sent,
// including a reset in the middle.
`include "tb_check.svh"
module tb_l1a_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, l1a = 0;
  logic [23:0] evt_cnt;
  int model;
  l1a_counter dut (.clk(clk), .rst(rst), .l1a(l1a), .evt_cnt(evt_cnt));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  initial begin
    @(posedge clk); #1 rst = 0; model = 0;
    `CHECK(evt_cnt == 0, "reset")
    for (int n = 0; n < 300; n++) begin
      l1a = ($urandom % 3) == 0;
      if (n == 150) rst = 1;
      @(posedge clk); #1;
      if (rst) model = 0; else if (l1a) model++;
      rst = 0;
      `CHECK(evt_cnt == 24'(model), "count")
    end
    `TB_DONE
  end
endmodule
