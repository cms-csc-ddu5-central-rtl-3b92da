// tb_or5p1: exhaustive test of the OR5+1 bus gate.
`include "tb_check.svh"
module tb_or5p1;
  int checks = 0, failures = 0;
  logic [4:0] b;
  logic a, o;
  or5p1 dut (.b(b), .a(a), .o(o));
  initial begin
    for (int i = 0; i < 64; i++) begin
      {a, b} = 6'(i);
      #1;
      `CHECK(o == (i != 0), $sformatf("o for a=%b b=%b", a, b))
    end
    `TB_DONE
  end
endmodule
