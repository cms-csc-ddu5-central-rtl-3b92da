// jtag_readout: capture-and-shift JTAG data register (the 15-, 16- and
// 24-bit "JTAG Register Read out" pages).
//
// On capture the register loads the parallel word pdin. On each clock with
// shift high (the schematic's CLKENA = DVCENB and SEL2: the user data chain
// is selected and in its shift phase) it shifts one place towards bit 0,
// taking tdi into the top bit; tdo is bit 0, so the word leaves least
// significant bit first. After W shifts sr holds the W bits shifted in,
// which load-type instructions (kill register, BX per orbit) copy into their
// holding register on update. Capture wins over shift. Width defaults to 16.
module jtag_readout #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         capture,
  input  logic         shift,
  input  logic         tdi,
  input  logic [W-1:0] pdin,
  output logic [W-1:0] sr,
  output logic         tdo
);
  always_ff @(posedge clk)
    if (capture)    sr <= pdin;
    else if (shift) sr <= {tdi, sr[W-1:1]};

  always_comb tdo = sr[0];
endmodule
