// fiber_led: front-panel LED drive for the fibre inputs (FIBERLED).
//
// One FOK LED and one DAV LED per fibre. FOK is lit while the link is
// present and ready, blinks slowly while it is present but not ready, and
// is off when no link is present. DAV is lit while that fibre is sending
// data (dav high). The blink comes from the top bit of a free-running
// BLINK_W-bit counter; at 40 MHz the default 24 bits blink about every
// 0.4 s. Outputs are registered and active high ("non-inverted LEDs").
// The three FOK states and the DAV rule are the DDU's; the blink rate is
// this design's choice.
module fiber_led #(
  parameter int unsigned N       = 15,
  parameter int unsigned BLINK_W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] present,
  input  logic [N-1:0] ready,
  input  logic [N-1:0] dav,
  output logic [N-1:0] fok_led,
  output logic [N-1:0] dav_led
);
  logic [BLINK_W-1:0] div;
  always_ff @(posedge clk)
    if (rst) div <= '0;
    else     div <= div + 1'b1;

  always_ff @(posedge clk)
    if (rst) begin
      fok_led <= '0;
      dav_led <= '0;
    end else begin
      fok_led <= present & (ready | {N{div[BLINK_W-1]}});
      dav_led <= dav;
    end
endmodule
