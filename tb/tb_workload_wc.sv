// tb_workload_wc: the DDU event sizes of the word-count table, run through
// the whole controller at its default parameters.
//
// For each case (number of DMBs, number of CFEBs, 8 time samples) the
// test loads the input FIFOs with the DMB data an event of that size
// carries, DMB k on input FIFO k/4, with 25 words per CFEB and sample plus
// 4 DMB header/trailer words (DDU word count = 6 + 25*Nts*nCFEB + 4*nDMB).
// It checks that the trailer's word count equals the table's value, that
// the DCC stream carries exactly that many words and that no timeout
// occurred (FIFOs without DMBs report no fibre OK), and reports whether the
// Gigabit Ethernet spy copy kept the whole event (the spy FIFO holds 512
// words and the link drains one 64-bit word per 8 clocks) and how many
// Ethernet frames carried it.
`include "tb_check.svh"
module tb_workload_wc;
  import ddu5ctrl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync_rst = 0, l1a_in = 0, cal_mode = 0, dcc_stop = 0;
  logic [15:0] board_id = 16'h0123;
  logic [14:0] dmb_live = 15'h7FFF;
  logic [3:0]  in_empty = 4'hF, in_fok = 4'hF, in_ren, in_oe;
  logic [35:0] rdat_pin;
  logic        out_valid, out_first, out_last;
  logic [63:0] out_data;
  logic [15:0] gt_txdata; logic [1:0] gt_txcharisk; logic gt_tx_dv;
  logic [3:0]  fmm;
  logic jt_sel1 = 0, jt_sel2 = 0, jt_capture = 0, jt_shift = 0, jt_update = 0, jt_tdi = 0, jt_tdo;
  logic [14:0] fiber_present = '1, fiber_ready = '1, fiber_dav = '0, fok_led, dav_led;
  logic sp_err, a_t_switch, cal_auto_l1, spy_drop;
  logic [11:0] bxn; logic [23:0] evt_cnt;

  ddu5ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2_000_000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_DONE end

  // input FIFO models on the DDR bus (see tb_ddu5ctrl)
  logic [71:0] fq [4][$];
  logic [71:0] fhead [4];
  task automatic upd_fifos();
    for (int i = 0; i < 4; i++) begin
      in_empty[i] = (fq[i].size() == 0);
      fhead[i]    = (fq[i].size() == 0) ? 72'h0 : fq[i][0];
    end
  endtask
  initial upd_fifos();
  logic ph = 0;
  always @(clk) ph <= #1 clk;
  logic [71:0] head;
  always_comb begin
    head = '0;
    for (int i = 0; i < 4; i++) if (in_oe[i]) head = fhead[i];
    rdat_pin = ph ? head[35:0] : head[71:36];
  end
  logic [3:0] ren_s = '0;
  always @(negedge clk) ren_s = in_ren;
  always @(posedge clk) begin
    #1 for (int i = 0; i < 4; i++) if (ren_s[i] && fq[i].size() != 0) void'(fq[i].pop_front());
    upd_fifos();
  end

  // output and Ethernet monitors
  int words = 0, frames = 0;
  logic [63:0] last_tr;
  always @(negedge clk) if (out_valid) begin
    words++;
    if (out_last) last_tr = out_data;
  end
  int fbytes = 0;
  always @(negedge clk) if (gt_tx_dv) begin
    if ({gt_txcharisk[0], gt_txdata[7:0]} == 9'h1FB || {gt_txcharisk[1], gt_txdata[15:8]} == 9'h1FB) frames++;
  end

  // the table: nDMB, nCFEB, word count as printed
  typedef struct { int ndmb, ncfeb, wc; } case_t;
  case_t cases[12] = '{
    '{0, 0, 'h006}, '{1, 1, 'h0D2}, '{1, 2, 'h19A}, '{2, 2, 'h19E}, '{2, 4, 'h32E},
    '{3, 3, 'h26A}, '{4, 4, 'h336}, '{7, 7, 'h59A}, '{8, 8, 'h666}, '{11, 11, 'h8CA},
    '{12, 12, 'h996}, '{15, 15, 'hBFA}};

  initial begin
    repeat (10) @(posedge clk); #2 rst = 0;
    repeat (10) @(posedge clk); #2;
    foreach (cases[c]) begin
      int nd, ncf, per[4], wc_formula, frames0;
      nd = cases[c].ndmb; ncf = cases[c].ncfeb;
      wc_formula = 6 + 25 * 8 * ncf + 4 * nd;
      `CHECK(wc_formula == cases[c].wc, $sformatf("formula gives %0d for %0d DMB / %0d CFEB", wc_formula, nd, ncf))
      // spread the CFEBs over the DMBs (the first ones get the extra)
      per = '{0, 0, 0, 0};
      for (int k = 0; k < nd; k++) begin
        int cf; cf = ncf / nd + ((k < ncf % nd) ? 1 : 0);
        per[k / 4] += 25 * 8 * cf + 4;
      end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < per[i]; k++)
          fq[i].push_back({4'b0, (k == per[i] - 1) ? 2'b11 : 2'b00, 2'b11, {$urandom, $urandom}});
      upd_fifos();
      // only input FIFOs with DMBs behind them report fibre OK
      for (int i = 0; i < 4; i++) in_fok[i] = (per[i] != 0);
      words = 0; frames0 = frames;
      @(posedge clk); #2 l1a_in = 1; @(posedge clk); #2 l1a_in = 0;
      while (!dut.u_evb.out_last) @(posedge clk);
      repeat (5) @(posedge clk);
      while (dut.u_gbe.in_packet || !dut.spy_empty) @(posedge clk);
      repeat (40) @(posedge clk); #2;
      `CHECK(words == cases[c].wc, $sformatf("DCC stream %0d words, table %0d", words, cases[c].wc))
      `CHECK(last_tr[55:32] == 24'(cases[c].wc), $sformatf("trailer word count %0d", last_tr[55:32]))
      `CHECK(last_tr[15] == 1'b0, "no timeout")
      $display("INFO %0d DMB %0d CFEB: %0d words (%0d bytes), spy %s, %0d frames",
               nd, ncf, words, 8 * words, spy_drop ? "dropped words" : "complete", frames - frames0);
      for (int i = 0; i < 4; i++) fq[i] = {};
      upd_fifos();
      // sync reset between cases clears the spy-overflow flag
      sync_rst = 1; @(posedge clk); #2 sync_rst = 0; repeat (5) @(posedge clk); #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
