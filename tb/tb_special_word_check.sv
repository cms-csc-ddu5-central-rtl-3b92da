// tb_special_word_check: random 64-bit words, biased so that bits 12..15
// of the four lanes often agree; the voted bits (2 or more of 4 lanes),
// the sticky per-bit disagreement flags and the A-T-switch vote are
// compared with a model.
`include "tb_check.svh"
module tb_special_word_check;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, gold = 0;
  logic [63:0] din = '0;
  logic [3:0] voted, err; logic sp_err, ats;
  special_word_check dut (.clk(clk), .clr(clr), .gold(gold), .din(din), .voted(voted),
                          .err(err), .sp_err(sp_err), .a_t_switch(ats));
  always #5 clk = ~clk;
  `WATCHDOG(5000)
  logic [3:0] m_voted, m_err, nib;
  int nagree, ndis;
  initial begin
    m_voted = 0; m_err = 0; nagree = 0; ndis = 0;
    @(posedge clk); #1 clr = 0;
    for (int n = 0; n < 400; n++) begin
      din = {$urandom, $urandom};
      if ($urandom % 2) begin
        nib = 4'($urandom);
        for (int l = 0; l < 4; l++) din[16*l+12 +: 4] = nib;
      end
      gold = ($urandom % 4) != 0;
      clr  = (n % 97) == 96;
      @(posedge clk); #1;
      if (clr) begin m_voted = 0; m_err = 0; end
      else if (gold) begin
        for (int b = 0; b < 4; b++) begin
          int c; c = din[12+b] + din[28+b] + din[44+b] + din[60+b];
          m_voted[b] = (c >= 2);
          if (c != 0 && c != 4) begin m_err[b] = 1; ndis++; end else nagree++;
        end
      end
      `CHECK(voted == m_voted, "voted bits")
      `CHECK(err == m_err, "per-bit disagreement")
      `CHECK(sp_err == (m_err != 0), "sticky error")
      `CHECK(ats == (clr ? 1'b0 : ((din[11] + din[27] + din[43]) >= 2)), "A-T switch vote")
    end
    `CHECK(nagree > 100 && ndis > 100, "both cases seen")
    `TB_DONE
  end
endmodule
