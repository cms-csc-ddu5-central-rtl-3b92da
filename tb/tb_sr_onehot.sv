// tb_sr_onehot: one-hot shift registers. A 4-bit ring (sli = q[3]) with a
// synchronous reset must step 0001, 0010, 0100, 1000, 0001 on enabled
// clocks and hold otherwise; an 8-bit register with asynchronous clear is
// fed random serial data and compared with a shift model.
`include "tb_check.svh"
module tb_sr_onehot;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0, arst = 0, ce8 = 0, sli8 = 0;
  logic [3:0] q;
  logic [7:0] q8, m8;
  sr_onehot #(.W(4), .ASYNC(1'b0)) dut4 (.clk(clk), .rst(rst), .ce(ce), .sli(q[3]), .q(q));
  sr_onehot #(.W(8), .ASYNC(1'b1)) dut8 (.clk(clk), .rst(arst), .ce(ce8), .sli(sli8), .q(q8));
  always #5 clk = ~clk;
  `WATCHDOG(2000)
  int pos;
  initial begin
    #1 arst = 1;
    #1;
    `CHECK(q8 == 8'h01, "async clear loads one")
    @(posedge clk); #1;
    `CHECK(q == 4'b0001, "sync reset loads one")
    rst = 0; arst = 0; pos = 0; m8 = 8'h01;
    for (int n = 0; n < 200; n++) begin
      ce = $urandom % 2; ce8 = $urandom % 2; sli8 = $urandom % 2;
      @(posedge clk); #1;
      if (ce) pos = (pos + 1) % 4;
      if (ce8) m8 = {m8[6:0], sli8};
      `CHECK(q == 4'(1 << pos), "ring position")
      `CHECK(q8 == m8, "8-bit shift")
    end
    rst = 1; @(posedge clk); #1;
    `CHECK(q == 4'b0001, "sync reset again")
    `TB_DONE
  end
endmodule
