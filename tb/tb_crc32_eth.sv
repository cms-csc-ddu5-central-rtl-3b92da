// tb_crc32_eth: the standard check value (the FCS of ASCII "123456789" is
// CBF43926) and random byte streams against a bit-serial model of the
// non-reflected polynomial 04C11DB7 applied to bit-reversed bytes.
`include "tb_check.svh"
module tb_crc32_eth;
  int checks = 0, failures = 0;
  logic clk = 0, init = 1, en = 0;
  logic [7:0] d = '0;
  logic [31:0] crc, fcs;
  crc32_eth dut (.clk(clk), .init(init), .en(en), .d(d), .crc(crc), .fcs(fcs));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  function automatic logic [31:0] rev32(input logic [31:0] x);
    for (int i = 0; i < 32; i++) rev32[i] = x[31-i];
  endfunction
  // model keeps the register in non-reflected form
  function automatic logic [31:0] step_nr(input logic [31:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb; fb = c[31] ^ b[i];
      c = {c[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
    return c;
  endfunction
  logic [31:0] m;
  string s = "123456789";
  initial begin
    @(posedge clk); #1 init = 0;
    for (int i = 0; i < 9; i++) begin
      d = s[i]; en = 1; @(posedge clk); #1;
    end
    en = 0;
    `CHECK(fcs == 32'hCBF4_3926, $sformatf("check value %h", fcs))
    init = 1; @(posedge clk); #1 init = 0; m = 32'hFFFF_FFFF;
    for (int n = 0; n < 300; n++) begin
      d = 8'($urandom); en = $urandom % 2;
      @(posedge clk); #1;
      if (en) m = step_nr(m, d);
      `CHECK(crc == rev32(m), "register against model")
    end
    `TB_DONE
  end
endmodule
