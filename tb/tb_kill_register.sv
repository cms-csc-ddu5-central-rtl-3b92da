// tb_kill_register: reset value (all alive), loads of random words and the
// decoded fibre enables and check enables, including the arming bit 15.
`include "tb_check.svh"
module tb_kill_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [19:0] d = '0, kill;
  logic [14:0] fiber_en;
  logic a_en, t_en, c_en;
  kill_register dut (.clk(clk), .rst(rst), .load(load), .d(d), .kill(kill), .fiber_en(fiber_en),
                     .alct_chk_en(a_en), .tmb_chk_en(t_en), .cfeb_chk_en(c_en));
  always #5 clk = ~clk;
  `WATCHDOG(3000)
  logic [19:0] m;
  initial begin
    @(posedge clk); #1 rst = 0;
    `CHECK(kill == 20'hFFFFF && fiber_en == 15'h7FFF && a_en && t_en && c_en, "reset: all alive")
    m = kill;
    for (int n = 0; n < 200; n++) begin
      d = 20'($urandom); load = ($urandom % 2);
      @(posedge clk); #1;
      if (load) m = d;
      `CHECK(kill == m, "register")
      `CHECK(fiber_en == m[14:0], "fibre enables")
      `CHECK(a_en == !(m[15] == 1 && m[16] == 0), "ALCT check enable")
      `CHECK(t_en == !(m[15] == 1 && m[17] == 0), "TMB check enable")
      `CHECK(c_en == !(m[15] == 1 && m[18] == 0), "CFEB check enable")
    end
    `TB_DONE
  end
endmodule
