// timeout_counter: watchdog counter for the event start and FIFO-done
// timeouts.
//
// While run is high the counter counts clock periods; clr (or run low)
// brings it back to zero. When the count reaches limit, expired goes high
// and stays high until clr or run falls. With the 40 MHz clock the DDU's
// limits are 128 periods (3.2 us) for an event start, 288 (7.2 us) for a
// calibration-event start and 38914 (972 us) for a FIFO to finish its
// event. The counter stops at limit, so it never wraps.
module timeout_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         run,
  input  logic [W-1:0] limit,
  output logic         expired
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk)
    if (clr || !run)       cnt <= '0;
    else if (cnt != limit) cnt <= cnt + 1'b1;

  always_comb expired = run && (cnt == limit);
endmodule
