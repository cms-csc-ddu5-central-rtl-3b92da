// tb_timeout_counter: the watchdog must expire exactly `limit` clocks after
// run rises (128 for an event start, 288 for a calibration start), stay
// expired, and restart from zero after clr.
`include "tb_check.svh"
module tb_timeout_counter;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, run = 0, expired;
  logic [15:0] limit;
  timeout_counter dut (.clk(clk), .clr(clr), .run(run), .limit(limit), .expired(expired));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  task automatic measure(input int lim);
    int n;
    limit = 16'(lim);
    clr = 1; run = 0; @(posedge clk); #1;
    clr = 0; run = 1; n = 0;
    #0;
    while (!expired) begin @(posedge clk); #1; n++; end
    `CHECK(n == lim, $sformatf("expired after %0d clocks, limit %0d", n, lim))
    repeat (5) @(posedge clk); #1;
    `CHECK(expired, "stays expired")
    run = 0; #1;
    `CHECK(!expired, "run low clears")
  endtask
  initial begin
    measure(128);
    measure(288);
    measure(7);
    // interrupted by clr
    limit = 16'd20; clr = 0; run = 1;
    repeat (15) @(posedge clk); #1 clr = 1; @(posedge clk); #1 clr = 0;
    repeat (15) @(posedge clk); #1;
    `CHECK(!expired, "clr restarts the count")
    repeat (5) @(posedge clk); #1;
    `CHECK(expired, "expires after restart")
    `TB_DONE
  end
endmodule
