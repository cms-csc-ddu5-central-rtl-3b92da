// tb_ddu5ctrl: end-to-end test of the DDU5 controller at its default
// parameters. Four queue-modelled input FIFOs drive the 36-pin DDR data bus;
// a model of the DCC collects the event stream; the Gigabit Ethernet
// character pairs are decoded into frames; JTAG instructions are shifted
// through the two user chains.
//
// Every event on the output is compared word by word with a model (header
// fields, payload, trailer masks, word count, CRC-16). Every spy frame is
// checked for its CRC-32 and packet number, and the data carried by all
// frames must equal the event stream that entered the spy FIFO. Mechanisms
// exercised and counted: normal events, start timeout, calibration start
// timeout, end timeout (38914 clocks), DCC stop, L1A queue near full (FMM
// warning) and overflow (FMM lost sync), FMM error, sync reset, JTAG reads
// (L1A number, kill register, BX per orbit, board ID, status), kill
// register load (a FIFO switched off), BX-per-orbit load, toggled FPGA
// reset with its NOOP protection, JTAG L1A, special-word disagreement,
// receive-error flag, spy FIFO overflow, short (filled) and long Ethernet
// frames, fibre LEDs lit, off and blinking.
`include "tb_check.svh"
module tb_ddu5ctrl;
  import ddu5ctrl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync_rst = 0, l1a_in = 0, cal_mode = 0, dcc_stop = 0;
  logic [15:0] board_id = 16'h0ABC;
  logic [14:0] dmb_live = 15'h5A5A;
  logic [3:0]  in_empty, in_fok = 4'hF, in_ren, in_oe;
  logic [35:0] rdat_pin;
  logic        out_valid, out_first, out_last;
  logic [63:0] out_data;
  logic [15:0] gt_txdata; logic [1:0] gt_txcharisk; logic gt_tx_dv;
  logic [3:0]  fmm;
  logic jt_sel1 = 0, jt_sel2 = 0, jt_capture = 0, jt_shift = 0, jt_update = 0, jt_tdi = 0, jt_tdo;
  logic [14:0] fiber_present = 15'h7FFF, fiber_ready = 15'h3FFF, fiber_dav = 15'h0, fok_led, dav_led;
  logic sp_err, a_t_switch, cal_auto_l1, spy_drop;
  logic [11:0] bxn; logic [23:0] evt_cnt;

  ddu5ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (12_000_000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_DONE end

  // ---------------- input FIFOs on the DDR bus ----------------
  logic [71:0] fq [4][$];       // {ctrl[7:0], data[63:0]}
  // the queue state is copied into plain signals after every change
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
    #1 for (int i = 0; i < 4; i++) if (ren_s[i]) begin
      checks++;
      if (fq[i].size() == 0) begin failures++; $display("FAIL: read of empty FIFO %0d", i); end
      else void'(fq[i].pop_front());
    end
    upd_fifos();
  end

  // ---------------- event model ----------------
  function automatic logic [15:0] crc_w(input logic [15:0] c, input logic [63:0] w);
    logic [15:0] n; logic fb;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ w[i];
      for (int k = 15; k >= 1; k--) n[k] = c[k-1];
      n[0] = fb; n[2] = c[1] ^ fb; n[15] = c[14] ^ fb;
      c = n;
    end
    return c;
  endfunction
  typedef struct { logic [23:0] num; logic [11:0] bx; logic [3:0] has, sto, eto, en;
                   logic [63:0] pay[$]; bit err; } evt_t;
  evt_t exp_q[$];
  logic [23:0] next_num = 1;

  // counters of mechanisms
  int n_evt = 0, n_sto = 0, n_cal = 0, n_eto = 0, n_stop = 0, n_warn = 0, n_sync = 0,
      n_err = 0, n_sperr = 0, n_spy_drop = 0, n_short = 0, n_long = 0, n_frames = 0,
      n_blink = 0, n_ats = 0, n_rxer = 0, n_vme = 0, n_cal_tog = 0, n_kill = 0;

  logic [63:0] got[$];
  logic [63:0] spy_words[$];   // words the spy FIFO accepted
  always @(negedge clk) begin
    if (dcc_stop) n_stop++;
    if (fmm[1]) n_warn++;
    if (a_t_switch) n_ats++;
    if (dut.vme_l1a) n_vme++;
    if (out_last && dut.rxer_seen) n_rxer++;
    if (out_valid) begin
      if (!dut.spy_full) spy_words.push_back(out_data);
      else n_spy_drop++;
      if (out_first) got = {};
      got.push_back(out_data);
      if (out_last) check_event();
    end
  end

  task automatic check_event();
    evt_t e; logic [63:0] w[$]; logic [15:0] c; logic [63:0] tr;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected event"); return; end
    e = exp_q.pop_front();
    // a JTAG trigger samples the BX number inside the controller
    if (e.bx == 12'hFFF) e.bx = got[0][31:20];
    w.push_back({4'h5, 4'h1, e.num, e.bx, 12'hABC, 4'h5, 4'h0});
    w.push_back({48'h8000_0001_8000, 12'h000, e.has});
    w.push_back({1'b0, dmb_live, 48'h0});
    foreach (e.pay[i]) w.push_back(e.pay[i]);
    w.push_back(64'h8000_FFFF_8000_8000);
    w.push_back({12'h0, e.sto, 12'h0, e.eto, 12'h0, e.has, 12'h0, e.en});
    tr = {4'hA, 4'h0, 24'(w.size() + 1), 16'h0, {(e.sto != 0) || (e.eto != 0), 7'h0},
          fmm, 4'h0};
    // the TTS nibble is the live FMM state; take it from the received word
    tr[7:4] = got[got.size()-1][7:4];
    c = 16'hFFFF;
    foreach (w[i]) c = crc_w(c, w[i]);
    c = crc_w(c, tr);
    tr[31:16] = c;
    w.push_back(tr);
    checks++;
    if (got.size() != w.size()) begin
      failures++; $display("FAIL: event %0d has %0d words, expected %0d", e.num, got.size(), w.size());
    end else
      for (int i = 0; i < w.size(); i++) begin
        checks++;
        if (got[i] != w[i]) begin failures++;
          $display("FAIL: event %0d word %0d = %h, expected %h", e.num, i, got[i], w[i]); end
      end
    n_evt++;
    if (e.sto != 0) n_sto++;
    if (e.eto != 0) n_eto++;
  endtask

  // ---------------- Ethernet frame decoder ----------------
  logic [8:0] chs[$];
  always @(negedge clk) if (gt_tx_dv) begin
    chs.push_back({gt_txcharisk[0], gt_txdata[7:0]});
    chs.push_back({gt_txcharisk[1], gt_txdata[15:8]});
  end
  logic [7:0] frame[$];
  bit in_fr = 0;
  int expect_pkt = 0;
  logic [7:0] spy_bytes[$];
  function automatic logic [31:0] step_nr(input logic [31:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb; fb = c[31] ^ b[i];
      c = {c[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
    return c;
  endfunction
  always @(negedge clk) while (chs.size() != 0) begin
    logic [8:0] c9; c9 = chs.pop_front();
    if (!in_fr) begin
      if (c9 == 9'h1FB) begin in_fr = 1; frame = {}; end
    end else if (c9 == 9'h1FD) begin
      in_fr = 0; check_frame();
    end else if (!c9[8]) frame.push_back(c9[7:0]);
  end
  task automatic check_frame();
    logic [31:0] cr, f; int n, nd, reg_len; logic [7:0] region[$];
    n_frames++;
    n = frame.size();
    // 6 x 55h, D5h, 4 x FFh, region, pkt number (2), FCS (4)
    checks++;
    if (n < 7 + 4 + 2 + 4) begin failures++; $display("FAIL: short frame"); return; end
    cr = 32'hFFFF_FFFF;
    for (int i = 7; i < n - 4; i++) cr = step_nr(cr, frame[i]);
    for (int i = 0; i < 32; i++) f[i] = ~cr[31-i];
    `CHECK({frame[n-1], frame[n-2], frame[n-3], frame[n-4]} == f, "frame CRC-32")
    `CHECK({frame[n-6], frame[n-5]} == 16'(expect_pkt), "packet number")
    expect_pkt++;
    `CHECK(frame[6] == 8'hD5 && frame[0] == 8'h55 && frame[7] == 8'hFF && frame[10] == 8'hFF, "preamble and destination")
    for (int i = 11; i < n - 6; i++) region.push_back(frame[i]);
    reg_len = region.size();
    nd = reg_len;
    if (reg_len == 64) begin
      // a filled frame carries the real byte count after the data
      for (int k = 8; k < 48; k += 8)
        if ({region[k], region[k+1]} == 16'(k)) begin
          bit allff; allff = 1;
          for (int j = k + 2; j < 64; j++) if (region[j] != 8'hFF) allff = 0;
          if (allff) nd = k;
        end
    end
    if (nd < 48) n_short++; else n_long++;
    for (int i = 0; i < nd; i++) spy_bytes.push_back(region[i]);
  endtask

  // ---------------- JTAG ----------------
  task automatic jt_ir(input logic [7:0] op);
    @(posedge clk); #2 jt_sel1 = 1;
    for (int i = 0; i < 8; i++) begin jt_tdi = op[i]; jt_shift = 1; @(posedge clk); #2; end
    jt_shift = 0; jt_update = 1; @(posedge clk); #2 jt_update = 0; jt_sel1 = 0;
    @(posedge clk); #2;
  endtask
  task automatic jt_read(input int nbits, output logic [31:0] v);
    v = '0;
    jt_sel2 = 1; jt_capture = 1; @(posedge clk); #2 jt_capture = 0;
    for (int i = 0; i < nbits; i++) begin
      v[i] = jt_tdo; jt_tdi = 0; jt_shift = 1; @(posedge clk); #2;
    end
    jt_shift = 0; jt_sel2 = 0; @(posedge clk); #2;
  endtask
  task automatic jt_write(input int nbits, input logic [31:0] v);
    jt_sel2 = 1;
    for (int i = 0; i < nbits; i++) begin jt_tdi = v[i]; jt_shift = 1; @(posedge clk); #2; end
    jt_shift = 0; jt_update = 1; @(posedge clk); #2 jt_update = 0; jt_sel2 = 0;
    @(posedge clk); #2;
  endtask

  // ---------------- stimulus ----------------
  logic [3:0] cur_en = 4'hF;
  // load one event and trigger it; n[i] words per FIFO (0: none),
  // stuck: FIFO without its last word; fe: mark one word with FEND and a
  // lane disagreement; rx: flag a receive error on one word
  task automatic event_go(input int n[4], input logic [3:0] stuck, input bit fe, input bit rx,
                          input bit via_jtag);
    evt_t e;
    e.num = next_num; e.en = cur_en; e.has = 0; e.sto = 0; e.eto = 0; e.pay = {}; e.err = 0;
    for (int i = 0; i < 4; i++) begin
      if (!cur_en[i]) continue;
      if (n[i] == 0) begin e.sto[i] = 1; continue; end
      e.has[i] = 1;
      if (stuck[i]) e.eto[i] = 1;
      for (int k = 0; k < n[i]; k++) begin
        logic [63:0] d; logic [7:0] ctl;
        d = {$urandom, $urandom};
        ctl = {6'b0, 2'b11};
        if (!stuck[i] && k == n[i] - 1) ctl[3:2] = 2'b11;
        if (fe && i == 0 && k == 0) begin
          ctl[5:4] = 2'b01;
          d[16*0+14] = 1; d[16*1+14] = 0; d[16*2+14] = 0; d[16*3+14] = 0;
          d[11] = 1; d[27] = 1; d[43] = 0;
        end
        if (rx && i == 1 && k == 0) ctl[7:6] = 2'b01;
        fq[i].push_back({ctl, d});
        e.pay.push_back(d);
      end
    end
    upd_fifos();
    if (via_jtag) begin
      e.bx = 12'hFFF;
      exp_q.push_back(e);
      jt_ir(8'd0);
      jt_ir(OP_VME_L1A);
    end else begin
      @(posedge clk); #2 l1a_in = 1; e.bx = bxn;
      exp_q.push_back(e);
      @(posedge clk); #2 l1a_in = 0;
    end
    next_num++;
  endtask

  task automatic drain(input int max_cyc);
    int k; k = 0;
    while ((exp_q.size() != 0 || dut.evb_busy) && k < max_cyc) begin @(posedge clk); k++; end
    for (int i = 0; i < 4; i++) fq[i] = {};
    upd_fifos();
    repeat (4) @(posedge clk); #2;
  endtask

  logic [31:0] v;
  int nn[4];
  int dropped_l1a;
  initial begin
    repeat (20) @(posedge clk);
    #2 rst = 0;
    repeat (20) @(posedge clk); #2;
    `CHECK(fmm == 4'b0000, "FMM ready after reset")

    // JTAG reads at their reset values
    jt_ir(OP_BOARD_ID);   jt_read(16, v); `CHECK(v[15:0] == 16'h0ABC, "board ID")
    jt_ir(OP_RD_BXORBIT); jt_read(12, v); `CHECK(v[11:0] == 12'd3563, "BX per orbit default")
    jt_ir(OP_RD_KILL);    jt_read(20, v); `CHECK(v[19:0] == 20'hFFFFF, "kill register default")
    jt_ir(OP_DMB_LIVE);   jt_read(15, v); `CHECK(v[14:0] == 15'h5A5A, "DMB live")

    // 1. normal events
    nn = '{3, 2, 4, 1}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    nn = '{1, 1, 1, 1}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    jt_ir(OP_RD_L1A); jt_read(24, v); `CHECK(v[23:0] == 24'd2, "L1A number read over JTAG")
    // 2. start timeout
    nn = '{2, 0, 2, 2}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    // 3. calibration start timeout
    cal_mode = 1; n_cal++;
    nn = '{2, 2, 2, 0}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    cal_mode = 0;
    // 4. special-word disagreement and receive error
    nn = '{2, 2, 1, 1}; event_go(nn, 4'h0, 1, 1, 0);
    while (!out_last) @(posedge clk);
    #1 if (sp_err) n_sperr++;
    drain(2000);
    `CHECK(fmm[3] == 1'b1, "FMM error after a bad event")
    if (fmm[3]) n_err++;
    sync_rst = 1; @(posedge clk); #2 sync_rst = 0; repeat (3) @(posedge clk); #2;
    `CHECK(fmm[3] == 1'b1, "error survives a sync reset")
    rst = 1; repeat (3) @(posedge clk); #2 rst = 0; repeat (3) @(posedge clk); #2;
    `CHECK(fmm == 4'b0000, "hard reset clears the FMM error")
    next_num = 1; expect_pkt = 0; spy_words = {}; spy_bytes = {};
    chs = {}; in_fr = 0;
    // 5. kill fibres 8..11: FIFO 2 is switched off
    jt_ir(OP_LD_KILL); jt_write(20, 32'hFF0FF);
    jt_ir(OP_RD_KILL); jt_read(20, v); `CHECK(v[19:0] == 20'hFF0FF, "kill register loaded")
    cur_en = 4'b1011; n_kill++;
    nn = '{2, 3, 0, 2}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    // 6. BX per orbit set to 923
    jt_ir(OP_LD_BXORBIT); jt_write(12, 32'd923);
    jt_ir(OP_RD_BXORBIT); jt_read(12, v); `CHECK(v[11:0] == 12'd923, "BX per orbit loaded")
    begin
      int mx; mx = 0;
      repeat (2000) begin @(posedge clk); if (bxn > mx) mx = bxn; end
      `CHECK(mx == 923, $sformatf("BXN runs to %0d", mx))
    end
    // 7. L1A from JTAG
    nn = '{1, 1, 0, 1}; event_go(nn, 4'h0, 0, 0, 1);
    drain(2000);
    // 8. DCC stop during events
    fork
      begin
        for (int k = 0; k < 6; k++) begin
          nn = '{int'($urandom_range(6, 1)), int'($urandom_range(6, 1)), 0, int'($urandom_range(6, 1))};
          event_go(nn, 4'h0, 0, 0, 0);
          drain(5000);
        end
      end
      begin
        forever begin @(posedge clk); #3 dcc_stop = ($urandom % 3) == 0; end
      end
    join_any
    disable fork;
    #2 dcc_stop = 0;
    // 9. end timeout: FIFO 3 never sends its last word (38914 clocks)
    nn = '{1, 1, 0, 2}; event_go(nn, 4'b1000, 0, 0, 0); drain(50000);
    `CHECK(fmm[3] == 1'b1, "FMM error after an end timeout")
    // 10. trigger burst with the DCC stopped: near full, then overflow
    nn = '{0, 0, 0, 0};
    #2 dcc_stop = 1;
    dropped_l1a = 0;
    for (int k = 0; k < 22; k++) begin
      event_go(nn, 4'h0, 0, 0, 0);
      @(posedge clk); #1;
      if (dut.l1q_overflow) begin dropped_l1a++; void'(exp_q.pop_back()); end
      @(posedge clk); #1;
      if (dut.l1q_overflow) begin dropped_l1a++; void'(exp_q.pop_back()); end
    end
    `CHECK(fmm[1] && fmm[2], "FMM warning and lost sync with the L1A queue full")
    if (fmm[2]) n_sync++;
    #2 dcc_stop = 0;
    drain(5000);
    `CHECK(dropped_l1a > 0, "triggers lost when the L1A queue was full")
    // 11. toggled FPGA reset (acts as a sync reset) with NOOP protection
    // (after the spy link has sent everything: the reset clears it)
    while (dut.u_gbe.in_packet || !dut.spy_empty) @(posedge clk);
    repeat (40) @(posedge clk); #2;
    jt_ir(8'd0); jt_ir(OP_FPGA_RESET);
    expect_pkt = 0;
    repeat (3) @(posedge clk); #2;
    `CHECK(evt_cnt == 0 && fmm[2] == 1'b0, "JTAG reset clears L1A count and lost sync")
    next_num = 1;
    nn = '{0, 0, 0, 0}; event_go(nn, 4'h0, 0, 0, 0); drain(2000);
    jt_ir(OP_FPGA_RESET);
    repeat (3) @(posedge clk); #2;
    `CHECK(evt_cnt == 1, "second reset without NOOP ignored")
    // calibration-trigger enable: toggled, and only once per NOOP
    `CHECK(cal_auto_l1 == 1'b1, "calibration L1A enabled after reset")
    jt_ir(8'd0); jt_ir(OP_TOG_CAL_L1);
    `CHECK(cal_auto_l1 == 1'b0, "calibration L1A toggled off")
    jt_ir(OP_TOG_CAL_L1);
    `CHECK(cal_auto_l1 == 1'b0, "second toggle without NOOP ignored")
    jt_ir(8'd0); jt_ir(OP_TOG_CAL_L1);
    `CHECK(cal_auto_l1 == 1'b1, "calibration L1A toggled on")
    if (cal_auto_l1) n_cal_tog++;
    // 12. a long event that overflows the spy FIFO and needs long frames
    cur_en = 4'b1011;
    nn = '{300, 300, 0, 300}; event_go(nn, 4'h0, 0, 0, 0); drain(20000);
    // let the Ethernet side finish
    while (dut.u_gbe.in_packet || !dut.spy_empty) @(posedge clk);
    repeat (40) @(posedge clk);
    // spy stream: every accepted word, bytes MSB first
    begin
      logic [7:0] sb[$];
      foreach (spy_words[i]) for (int b = 7; b >= 0; b--) sb.push_back(spy_words[i][8*b +: 8]);
      `CHECK(sb.size() == spy_bytes.size(), $sformatf("spy bytes %0d vs %0d", spy_bytes.size(), sb.size()))
      if (sb.size() == spy_bytes.size()) begin
        int bad; bad = 0;
        foreach (sb[i]) if (sb[i] != spy_bytes[i]) bad++;
        `CHECK(bad == 0, $sformatf("spy data matches the event stream (%0d bad)", bad))
      end
    end
    `CHECK(spy_drop, "spy FIFO overflow flagged")
    // 13. LEDs: fibre 14 present but not ready must blink, 0..13 lit
    begin
      logic l0; int k; l0 = fok_led[14]; k = 0;
      `CHECK(fok_led[13:0] == 14'h3FFF, "ready fibres lit")
      while (fok_led[14] == l0 && k < 9_000_000) begin @(posedge clk); k++; end
      if (fok_led[14] != l0) n_blink++;
      fiber_present[3] = 0; repeat (3) @(posedge clk); #1;
      `CHECK(fok_led[3] == 1'b0, "absent fibre off")
    end
    // mechanism counts
    $display("INFO rxer %0d vme %0d cal_toggle %0d kill %0d", n_rxer, n_vme, n_cal_tog, n_kill);
    $display("INFO events %0d sto %0d cal %0d eto %0d stop %0d warn %0d sync %0d err %0d sperr %0d drop %0d short %0d long %0d frames %0d blink %0d ats %0d",
      n_evt, n_sto, n_cal, n_eto, n_stop, n_warn, n_sync, n_err, n_sperr, n_spy_drop, n_short, n_long, n_frames, n_blink, n_ats);
    `CHECK(n_evt > 20, "events")
    `CHECK(n_sto >= 2, "start timeouts")
    `CHECK(n_cal == 1, "calibration timeout")
    `CHECK(n_eto >= 1, "end timeout")
    `CHECK(n_stop > 50, "DCC stop")
    `CHECK(n_warn > 0, "FMM warning")
    `CHECK(n_sync > 0, "FMM lost sync")
    `CHECK(n_err > 0, "FMM error")
    `CHECK(n_sperr > 0, "special-word error")
    `CHECK(n_ats > 0, "A-T switch vote")
    `CHECK(n_spy_drop > 0, "spy FIFO full")
    `CHECK(n_short > 0 && n_long > 0, "short and long frames")
    `CHECK(n_blink > 0, "LED blink")
    `CHECK(n_rxer > 0, "receive error")
    `CHECK(n_vme == 1, "JTAG L1A")
    `CHECK(n_cal_tog > 0, "calibration toggle")
    `CHECK(n_kill > 0, "FIFO killed")
    `CHECK(exp_q.size() == 0, "all events seen")
    `TB_DONE
  end
endmodule
