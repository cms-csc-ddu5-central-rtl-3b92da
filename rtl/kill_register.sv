// kill_register: 20-bit readout-path enable ("kill") register.
//
// A zero kills, a one is alive. Bits 14:0 enable the 15 DMB input fibres.
// Bit 15 arms the check-disable bits: only while it is one do zeros in
// bit 16 (ALCT), 17 (TMB) and 18 (CFEB) switch off the data checks of that
// board type. Bit 19 is stored but has no function. The JTAG "Load
// KILL_Register" instruction writes d when load is high; "Check
// KILL_Register" reads kill back. Reset makes everything alive (all ones).
// Bit meanings follow the DDU; the reset value is this design's choice.
module kill_register
  import ddu5ctrl_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [KILL_W-1:0] d,
  output logic [KILL_W-1:0] kill,
  output logic [NFIBER-1:0] fiber_en,
  output logic              alct_chk_en,
  output logic              tmb_chk_en,
  output logic              cfeb_chk_en
);
  always_ff @(posedge clk)
    if (rst)       kill <= '1;
    else if (load) kill <= d;

  always_comb begin
    fiber_en    = kill[NFIBER-1:0];
    alct_chk_en = ~kill[KILL_CHKDIS] | kill[KILL_ALCT];
    tmb_chk_en  = ~kill[KILL_CHKDIS] | kill[KILL_TMB];
    cfeb_chk_en = ~kill[KILL_CHKDIS] | kill[KILL_CFEB];
  end
endmodule
