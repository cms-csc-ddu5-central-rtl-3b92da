// tb_crc16_64: the 64-bit-per-clock CRC-16 against a bit-serial model of
// x^16 + x^15 + x^2 + 1 written as explicit register taps, over random
// word streams with random enable gaps and re-initialisation.
`include "tb_check.svh"
module tb_crc16_64;
  int checks = 0, failures = 0;
  logic clk = 0, init = 1, en = 0;
  logic [63:0] d = '0;
  logic [15:0] crc, crc_nxt;
  crc16_64 dut (.clk(clk), .init(init), .en(en), .d(d), .crc(crc), .crc_nxt(crc_nxt));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  function automatic logic [15:0] serial(input logic [15:0] c, input logic [63:0] w);
    logic [15:0] n; logic fb;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ w[i];
      for (int k = 15; k >= 1; k--) n[k] = c[k-1];
      n[0]  = fb;
      n[2]  = c[1]  ^ fb;
      n[15] = c[14] ^ fb;
      c = n;
    end
    return c;
  endfunction
  logic [15:0] m;
  initial begin
    @(posedge clk); #1 init = 0; m = 16'hFFFF;
    `CHECK(crc == 16'hFFFF, "init value")
    for (int n = 0; n < 500; n++) begin
      d = {$urandom, $urandom};
      en = ($urandom % 4) != 0;
      init = (n % 61) == 60;
      #1;
      `CHECK(crc_nxt == serial(m, d), "combinational next value")
      @(posedge clk); #1;
      if (init) m = 16'hFFFF; else if (en) m = serial(m, d);
      `CHECK(crc == m, "register")
    end
    // a single one in bit 0 from a zero register gives the polynomial
    `CHECK(16'(crc16_zero(64'h1)) == 16'h8005, "impulse response")
    `TB_DONE
  end
  function automatic logic [15:0] crc16_zero(input logic [63:0] w);
    return serial(16'h0000, w);
  endfunction
endmodule
