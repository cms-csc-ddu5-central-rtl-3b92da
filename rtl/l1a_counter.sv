// l1a_counter: 24-bit level-1 accept (event) counter, EVT_CNT[23:0].
//
// Counts l1a pulses; the value after an L1A is that event's number, so the
// first event after reset is number 1. rst (sync or hard reset) clears it.
// The JTAG "Read Current DDU L1A Number" instruction reads it and the event
// header carries it. Wraps from 2^24-1 to 0.
module l1a_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,
  output logic [23:0] evt_cnt
);
  always_ff @(posedge clk)
    if (rst)      evt_cnt <= '0;
    else if (l1a) evt_cnt <= evt_cnt + 1'b1;
endmodule
