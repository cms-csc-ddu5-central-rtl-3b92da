// or5p1: OR of a 5-bit bus with one common input (the "OR5+1" bus gate).
//
// O is high when any bit of B[4:0] or the common input A is high. Used to
// merge a group of five status bits with a shared override. Combinational.
module or5p1 (
  input  logic [4:0] b,
  input  logic       a,
  output logic       o
);
  always_comb o = (|b) | a;
endmodule
