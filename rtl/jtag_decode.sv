// jtag_decode: JTAG user-instruction register and opcode decoder.
//
// The instruction chain (user chain 1) is an 8-bit shift register: while
// ir_shift is high it shifts tdi in towards bit 0, and ir_update copies it
// into the current opcode. op_sel is the one-hot decode of the opcode over
// the NUM_OPS instructions of the DDU control FPGA (opcodes 21 and 28 are
// unused and never selected; opcodes of NUM_OPS and above select nothing).
//
// Two instructions are toggled functions: FPGA reset (1) and "Toggle
// CFEB_Cal Auto_L1" (31). They act once, when the opcode is updated to
// them, and only if a NOOP was loaded since the last toggled function
// fired; this is the DDU's "must do NOOP after RESET" glitch protection.
// fpga_reset pulses for one clock; cal_auto_l1 flips (it is enabled after
// reset). The 8-bit opcode width and the tdi-at-bit-7 shift direction are
// this design's choice.
module jtag_decode
  import ddu5ctrl_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                ir_shift,
  input  logic                ir_update,
  input  logic                tdi,
  output logic [7:0]          opcode,
  output logic                ir_tdo,
  output logic [NUM_OPS-1:0]  op_sel,
  output logic                fpga_reset,
  output logic                cal_auto_l1
);
  logic [7:0] ir;
  logic       armed;

  always_ff @(posedge clk)
    if (rst)           ir <= '0;
    else if (ir_shift) ir <= {tdi, ir[7:1]};

  always_comb ir_tdo = ir[0];

  always_ff @(posedge clk)
    if (rst) begin
      opcode      <= OP_NOOP;
      armed       <= 1'b1;
      fpga_reset  <= 1'b0;
      cal_auto_l1 <= 1'b1;
    end else begin
      fpga_reset <= 1'b0;
      if (ir_update) begin
        opcode <= ir;
        if (ir == OP_NOOP) armed <= 1'b1;
        else if (armed && ir == OP_FPGA_RESET) begin
          fpga_reset <= 1'b1;
          armed      <= 1'b0;
        end else if (armed && ir == OP_TOG_CAL_L1) begin
          cal_auto_l1 <= ~cal_auto_l1;
          armed       <= 1'b0;
        end
      end
    end

  always_comb begin
    op_sel = '0;
    if (32'(opcode) < NUM_OPS && opcode != 8'd21 && opcode != 8'd28)
      op_sel[opcode[5:0]] = 1'b1;
  end
endmodule
