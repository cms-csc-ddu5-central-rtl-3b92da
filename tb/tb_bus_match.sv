// tb_bus_match: 16-to-64 bit bus matching. Random 16-bit words with random
// clock-enable gaps; right after the edge that takes the fourth word, dv
// must be high and q must hold the four words, first word lowest. Also
// checks an 8+1-to-18 bit instance (the transceiver pairing) with ce high.
`include "tb_check.svh"
module tb_bus_match;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0, ce = 0;
  logic [15:0] d = '0;
  logic [63:0] q;
  logic dv;
  logic [8:0] d9 = '0;
  logic [17:0] q18;
  logic dv18;
  bus_match dut (.clk(clk), .clr(clr), .ce(ce), .d(d), .q(q), .dv(dv));
  bus_match #(.IN_W(9), .RATIO(2)) dut2 (.clk(clk), .clr(clr), .ce(1'b1), .d(d9), .q(q18), .dv(dv18));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  logic [63:0] acc;
  logic [8:0]  first9;
  int nacc, nexp, n9;
  initial begin
    nacc = 0; nexp = 0; n9 = 0;
    #1 clr = 1;
    @(posedge clk); #1 clr = 0;
    for (int n = 0; n < 400; n++) begin
      ce = ($urandom % 3) != 0;
      d  = 16'($urandom);
      d9 = 9'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        acc[16*nacc +: 16] = d;
        nacc++;
      end
      if (ce && nacc == 4) begin
        nacc = 0; nexp++;
        `CHECK(dv == 1'b1 && q == acc, "dv with packed word")
      end else begin
        `CHECK(dv == 1'b0, "no dv")
      end
      if (n9 == 1) begin
        `CHECK(dv18 == 1'b1 && q18 == {d9, first9}, "9-bit pair")
        n9 = 0;
      end else begin
        `CHECK(dv18 == 1'b0, "no pair dv")
        first9 = d9;
        n9 = 1;
      end
    end
    `CHECK(nexp > 50, "enough words")
    clr = 1; #1;
    `CHECK(q == '0 && dv == 1'b0, "asynchronous clear")
    `TB_DONE
  end
endmodule
