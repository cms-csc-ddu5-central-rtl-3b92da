// anyorall: four-input agreement detector.
//
// ANY is the OR of the four inputs, ALL their AND, and NOTALL is ANY xor ALL,
// so NOTALL is high exactly when the inputs disagree (some but not all set).
// The DDU uses it to check that a bit repeated in the four 16-bit lanes of a
// 64-bit word is consistent. The block and its use follow the DDU; the
// gates inside are this design's choice. Purely combinational, no clock.
module anyorall (
  input  logic [3:0] b,
  output logic       any,
  output logic       all,
  output logic       notall
);
  always_comb begin
    any    = |b;
    all    = &b;
    notall = any ^ all;
  end
endmodule
