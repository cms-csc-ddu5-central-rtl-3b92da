// ifddr: double-data-rate input register with clock enable and asynchronous
// clear (the IFDDR4CE / IFDDR8CE / IFDDR36C family).
//
// Each input pin carries two bits per clock period. q_rise captures the pin
// on the rising edge of clk, q_fall on the falling edge; both hold when ce is
// low and go to zero at once when clr is high. The DDU moves the 72-bit
// input-FIFO read data over 36 pins this way: the falling-edge half holds the
// lowest 36 bits. Width is a parameter; 36 is the widest instance in the
// design. Timing: q_rise is valid after the rising edge, q_fall after the
// falling edge of the same period.
module ifddr #(
  parameter int unsigned W = 36
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_rise,
  output logic [W-1:0] q_fall
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     q_rise <= '0;
    else if (ce) q_rise <= d;

  always_ff @(negedge clk or posedge clr)
    if (clr)     q_fall <= '0;
    else if (ce) q_fall <= d;
endmodule
