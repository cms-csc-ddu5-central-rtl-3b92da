// bus_match: bus-matching register (FD16-64CE / FD8-16CE).
//
// Collects RATIO consecutive IN_W-bit words into one RATIO*IN_W-bit word.
// While ce is high one input word is taken per clock; the first word taken
// lands in the least significant slice. When the last slice is written, dv
// pulses for one clock with the completed word on q (registered, so q is
// valid in the cycle after the last input word). clr is an asynchronous
// clear of the word and the slice counter. Defaults are the 16-to-64 bit
// instance; which slice comes first is this design's choice.
module bus_match #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned RATIO = 4
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  ce,
  input  logic [IN_W-1:0]       d,
  output logic [IN_W*RATIO-1:0] q,
  output logic                  dv
);
  localparam int unsigned SW = (RATIO > 1) ? $clog2(RATIO) : 1;
  logic [SW-1:0] slice;

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      q     <= '0;
      slice <= '0;
      dv    <= 1'b0;
    end else begin
      dv <= 1'b0;
      if (ce) begin
        q[slice*IN_W +: IN_W] <= d;
        if (slice == SW'(RATIO-1)) begin
          slice <= '0;
          dv    <= 1'b1;
        end else begin
          slice <= slice + 1'b1;
        end
      end
    end
endmodule
