// tb_jtag_decode: shift every opcode 0..40 into the instruction register
// and check the one-hot decode (none for 21, 28 and above 33); check that
// the toggled functions (FPGA reset, CFEB_Cal Auto_L1) act once and only
// again after a NOOP.
`include "tb_check.svh"
module tb_jtag_decode;
  import ddu5ctrl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ir_shift = 0, ir_update = 0, tdi = 0;
  logic [7:0] opcode; logic ir_tdo, fpga_reset, cal;
  logic [NUM_OPS-1:0] op_sel;
  jtag_decode dut (.clk(clk), .rst(rst), .ir_shift(ir_shift), .ir_update(ir_update), .tdi(tdi),
    .opcode(opcode), .ir_tdo(ir_tdo), .op_sel(op_sel), .fpga_reset(fpga_reset), .cal_auto_l1(cal));
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  int resets;
  always @(posedge clk) if (fpga_reset) resets++;
  task automatic load_ir(input logic [7:0] op);
    for (int i = 0; i < 8; i++) begin
      tdi = op[i]; ir_shift = 1; @(posedge clk); #1;
    end
    ir_shift = 0; ir_update = 1; @(posedge clk); #1 ir_update = 0;
    @(posedge clk); #1;
  endtask
  logic [NUM_OPS-1:0] exp_sel;
  initial begin
    resets = 0;
    @(posedge clk); #1 rst = 0;
    `CHECK(opcode == 0 && cal == 1'b1, "reset state")
    for (int op = 0; op <= 40; op++) begin
      if (op == 1 || op == 31) continue;
      load_ir(8'(op));
      exp_sel = '0;
      if (op < 34 && op != 21 && op != 28) exp_sel[op] = 1'b1;
      `CHECK(opcode == 8'(op), $sformatf("opcode %0d latched", op))
      `CHECK(op_sel == exp_sel, $sformatf("decode of %0d", op))
    end
    load_ir(8'd0);
    resets = 0;
    load_ir(8'd1);
    `CHECK(resets == 1, "reset fires after NOOP")
    `CHECK(op_sel[1], "reset opcode selected")
    load_ir(8'd1);
    `CHECK(resets == 1, "second reset without NOOP is ignored")
    load_ir(8'd2);
    load_ir(8'd1);
    `CHECK(resets == 1, "a non-NOOP opcode does not re-arm")
    load_ir(8'd0); load_ir(8'd1);
    `CHECK(resets == 2, "re-armed by NOOP")
    load_ir(8'd0); load_ir(8'd31);
    `CHECK(cal == 1'b0, "Cal Auto_L1 toggled off")
    load_ir(8'd31);
    `CHECK(cal == 1'b0, "no toggle without NOOP")
    load_ir(8'd0); load_ir(8'd31);
    `CHECK(cal == 1'b1, "toggled on again")
    `TB_DONE
  end
endmodule
