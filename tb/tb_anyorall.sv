// tb_anyorall: exhaustive test of the four-input agreement detector.
`include "tb_check.svh"
module tb_anyorall;
  int checks = 0, failures = 0;
  logic [3:0] b;
  logic any, all, notall;
  anyorall dut (.b(b), .any(any), .all(all), .notall(notall));
  initial begin
    for (int i = 0; i < 16; i++) begin
      b = 4'(i);
      #1;
      `CHECK(any == (i != 0), $sformatf("any for %b", b))
      `CHECK(all == (i == 15), $sformatf("all for %b", b))
      `CHECK(notall == (i != 0 && i != 15), $sformatf("notall for %b", b))
    end
    `TB_DONE
  end
endmodule
