// eth_idle: Gigabit Ethernet idle ordered-set generator.
//
// A 9-bit register, {K flag, byte}, that loops through the /I2/ idle pair
// K28.5 (9'h1BC) then D16.2 (9'h050). ld puts it on K28.5; each clock with
// ce high steps to the other character. q shows the register when oe is
// high and 0 otherwise, so several such sources can be ORed onto one bus.
// Time-ordered bytes 1BC, 050 appear as 16'h50BC once two bytes are paired
// into the 16-bit transceiver word. Characters are the DDU's; the ld input
// is this design's way to start the loop.
module eth_idle
  import ddu5ctrl_pkg::*;
(
  input  logic       clk,
  input  logic       ld,
  input  logic       ce,
  input  logic       oe,
  output logic [8:0] q
);
  logic [8:0] r;
  always_ff @(posedge clk)
    if (ld)      r <= K28_5;
    else if (ce) r <= (r == K28_5) ? D16_2 : K28_5;
  always_comb q = oe ? r : 9'h000;
endmodule
