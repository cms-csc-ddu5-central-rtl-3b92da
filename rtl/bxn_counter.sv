// bxn_counter: bunch-crossing counter with a loadable bunches-per-orbit limit.
//
// bxn counts clock periods (25 ns bunch crossings) from 0 up to bx_lim and
// returns to 0 one cycle after reaching it, so an orbit is bx_lim+1
// crossings: 0..3563 for the LHC, 0..923 for the SPS test beam. bx_lim is a
// 12-bit register preset to LIM_DEFAULT (3563) by reset and written with
// lim_d when lim_load is high; the JTAG "Set BX per Orbit" instruction
// drives it and "Read BX per Orbit" reads it back. rst also clears bxn.
// A limit written below the current count takes effect when the count next
// reaches it or wraps past 4095. Limits and default follow the DDU; the
// synchronous reset is this design's choice.
module bxn_counter #(
  parameter logic [11:0] LIM_DEFAULT = 12'd3563
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lim_load,
  input  logic [11:0] lim_d,
  output logic [11:0] bx_lim,
  output logic [11:0] bxn
);
  always_ff @(posedge clk)
    if (rst)           bx_lim <= LIM_DEFAULT;
    else if (lim_load) bx_lim <= lim_d;

  always_ff @(posedge clk)
    if (rst || bxn == bx_lim) bxn <= '0;
    else                      bxn <= bxn + 1'b1;
endmodule
