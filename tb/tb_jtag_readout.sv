// tb_jtag_readout: capture a random word, shift it out least significant
// bit first while shifting a second word in, and check both; then a 24-bit
// instance as used for the L1A number.
`include "tb_check.svh"
module tb_jtag_readout;
  int checks = 0, failures = 0;
  logic clk = 0, cap = 0, sh = 0, tdi = 0;
  logic [15:0] pdin, sr; logic tdo;
  logic [23:0] pdin24, sr24; logic tdo24;
  jtag_readout dut (.clk(clk), .capture(cap), .shift(sh), .tdi(tdi), .pdin(pdin), .sr(sr), .tdo(tdo));
  jtag_readout #(.W(24)) dut24 (.clk(clk), .capture(cap), .shift(sh), .tdi(tdi), .pdin(pdin24), .sr(sr24), .tdo(tdo24));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  logic [15:0] in16, got16; logic [23:0] got24;
  initial begin
    for (int r = 0; r < 10; r++) begin
      pdin = 16'($urandom); pdin24 = 24'($urandom); in16 = 16'($urandom);
      cap = 1; @(posedge clk); #1 cap = 0;
      `CHECK(sr == pdin && sr24 == pdin24, "capture")
      for (int i = 0; i < 24; i++) begin
        if (i < 16) got16[i] = tdo;
        got24[i] = tdo24;
        tdi = (i < 16) ? in16[i] : 1'b0;
        sh = 1; @(posedge clk); #1 sh = 0;
        if (i == 15) `CHECK(sr == in16, "shifted-in word")
        @(posedge clk); #1;   // idle clock, register must hold
      end
      `CHECK(got16 == pdin, "16-bit read-out, LSB first")
      `CHECK(got24 == pdin24, "24-bit read-out, LSB first")
    end
    `TB_DONE
  end
endmodule
