// vote3: two-out-of-three majority vote.
//
// The DMB repeats critical flags three times in its header and trailer words;
// the DDU takes the majority of the three copies so that a single flipped bit
// does not change the decision. VOTE is high when at least two of the inputs
// are high. Combinational.
module vote3 (
  input  logic [2:0] b,
  output logic       vote
);
  always_comb vote = (b[0] & b[1]) | (b[0] & b[2]) | (b[1] & b[2]);
endmodule
