// tb_vote3: exhaustive test of the two-of-three majority vote.
`include "tb_check.svh"
module tb_vote3;
  int checks = 0, failures = 0;
  logic [2:0] b;
  logic vote;
  vote3 dut (.b(b), .vote(vote));
  initial begin
    for (int i = 0; i < 8; i++) begin
      b = 3'(i);
      #1;
      `CHECK(vote == ($countones(b) >= 2), $sformatf("vote for %b", b))
    end
    `TB_DONE
  end
endmodule
