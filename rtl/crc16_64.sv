// crc16_64: CRC-16 accumulator over 64-bit words.
//
// Polynomial x^16 + x^15 + x^2 + 1 (the USB / CMS readout CRC-16), one
// 64-bit word per clock: while en is high the register moves to
// crc16_next(crc, d), bit 63 of the word entering first. init loads INIT
// (synchronously, taking priority over en). crc_nxt is the combinational
// value the register would take with the current word, so a caller can
// fold in a last word and use the result in the same cycle. The polynomial
// is the DDU's; the bit order and the all-ones start value are this
// design's choice.
module crc16_64
  import ddu5ctrl_pkg::*;
#(
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] d,
  output logic [15:0] crc,
  output logic [15:0] crc_nxt
);
  always_comb crc_nxt = crc16_next(crc, d);

  always_ff @(posedge clk)
    if (init)    crc <= INIT;
    else if (en) crc <= crc_nxt;
endmodule
