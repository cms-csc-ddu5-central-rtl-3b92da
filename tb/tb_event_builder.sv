// tb_event_builder: DDU event assembly. Four queue-modelled input FIFOs
// share a registered data bus (one clock behind the selected FIFO, as the
// DDR input registers are). Events are built with every FIFO reading case:
// data in all FIFOs, an enabled FIFO without data (start timeout), a
// disabled FIFO, a FIFO that never delivers its last word (end timeout), a
// calibration event (longer start timeout), events with no data at all,
// random downstream stops, and a burst of triggers that fills the L1A queue
// (near full, then overflow). Every output word is compared with a model
// that builds the expected event, including word count and CRC-16, and the
// cycle counts of the start timeouts and of an unstopped event are checked.
`include "tb_check.svh"
module tb_event_builder;
  import ddu5ctrl_pkg::*;
  int checks = 0, failures = 0;
  localparam int START_LIM = 20, CAL_LIM = 40, DONE_LIM = 60;
  logic clk = 0, rst = 1, l1a = 0, cal_mode = 0, out_stop = 0;
  logic [23:0] evt_num = 0;
  logic [11:0] bxn = 0;
  logic [14:0] dmb_live = 15'h1234;
  logic [3:0]  fifo_en = 4'hF, in_empty, in_sel, in_ren, start_to, end_to, has_data;
  logic [63:0] in_data = 0, out_data;
  logic in_lw = 0, out_valid, out_first, out_last, out_payload, busy, nf, ovf;
  logic [23:0] last_wc;

  event_builder #(.NIN(4), .RD_GAP(1), .L1Q_DEPTH(16)) dut (
    .clk(clk), .rst(rst), .l1a(l1a), .evt_num(evt_num), .bxn(bxn), .cal_mode(cal_mode),
    .start_lim(16'(START_LIM)), .cal_start_lim(16'(CAL_LIM)), .done_lim(16'(DONE_LIM)),
    .source_id(12'hABC), .dmb_live(dmb_live), .tts_state(4'h8), .fifo_en(fifo_en),
    .in_empty(in_empty), .in_data(in_data), .in_lw(in_lw), .in_sel(in_sel), .in_ren(in_ren),
    .out_stop(out_stop), .out_valid(out_valid), .out_data(out_data), .out_first(out_first),
    .out_last(out_last), .out_payload(out_payload), .start_to(start_to), .end_to(end_to),
    .has_data(has_data), .busy(busy), .l1q_near_full(nf), .l1q_overflow(ovf), .last_wc(last_wc));

  always #5 clk = ~clk;
  `WATCHDOG(200000)

  // ---------------- input FIFO model ----------------
  logic [64:0] fq [4][$];      // {lw, data}
  always_comb for (int i = 0; i < 4; i++) in_empty[i] = (fq[i].size() == 0);
  logic [3:0]  ren_s;
  logic [64:0] bus_s;
  always @(negedge clk) begin
    ren_s = in_ren;
    bus_s = '0;
    for (int i = 0; i < 4; i++) if (in_sel[i] && fq[i].size() != 0) bus_s = fq[i][0];
  end
  always @(posedge clk) begin
    #1;
    {in_lw, in_data} = bus_s;
    for (int i = 0; i < 4; i++) if (ren_s[i]) void'(fq[i].pop_front());
  end

  // ---------------- CRC model ----------------
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

  // ---------------- expected events ----------------
  typedef struct {
    logic [23:0] num; logic [11:0] bx; logic [3:0] has, sto, eto, en;
    logic [63:0] pay[$];
  } evt_t;
  evt_t exp_q[$];
  int n_events = 0, n_sto = 0, n_eto = 0, n_stop = 0, n_nodata = 0, n_cal = 0;

  // ---------------- output monitor ----------------
  logic [63:0] got[$];
  int t_first, t_last, t_cycle = 0, dur_last;
  always @(posedge clk) t_cycle++;
  always @(negedge clk) begin
    if (out_stop) n_stop++;
    if (out_valid) begin
      if (out_first) begin got = {}; t_first = t_cycle; end
      got.push_back(out_data);
      if (out_last) begin t_last = t_cycle; dur_last = t_last - t_first + 1; check_event(); end
    end
  end

  task automatic check_event();
    evt_t e;
    logic [63:0] w[$];
    logic [15:0] c;
    logic [63:0] tr;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected event"); return; end
    e = exp_q.pop_front();
    w.push_back({4'h5, 4'h1, e.num, e.bx, 12'hABC, 4'h5, 4'h0});
    w.push_back({48'h8000_0001_8000, 12'h000, e.has});
    w.push_back({1'b0, dmb_live, 48'h0});
    foreach (e.pay[i]) w.push_back(e.pay[i]);
    w.push_back(64'h8000_FFFF_8000_8000);
    w.push_back({12'h0, e.sto, 12'h0, e.eto, 12'h0, e.has, 12'h0, e.en});
    tr = {4'hA, 4'h0, 24'(w.size() + 1), 16'h0, {(e.sto != 0) || (e.eto != 0), 7'h0}, 4'h8, 4'h0};
    c = 16'hFFFF;
    foreach (w[i]) c = crc_w(c, w[i]);
    c = crc_w(c, tr);
    tr[31:16] = c;
    w.push_back(tr);
    checks++;
    if (got.size() != w.size()) begin
      failures++; $display("FAIL: event %0d has %0d words, expected %0d", e.num, got.size(), w.size());
    end else begin
      for (int i = 0; i < w.size(); i++) begin
        checks++;
        if (got[i] != w[i]) begin failures++;
          $display("FAIL: event %0d word %0d = %h, expected %h", e.num, i, got[i], w[i]); end
      end
    end
    n_events++;
    if (e.sto != 0) n_sto++;
    if (e.eto != 0) n_eto++;
    if (e.pay.size() == 0) n_nodata++;
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic trigger();
    @(posedge clk); #2;
    bxn = 12'($urandom); l1a = 1;
    @(posedge clk); #2 l1a = 0; evt_num = evt_num + 1;
  endtask

  // load one event: n[i] words into FIFO i (n < 0: none; stuck: no last word)
  task automatic load(input int n[4], input logic [3:0] en, input logic [3:0] stuck);
    evt_t e;
    e.num = evt_num + 1; e.bx = 0; e.en = en; e.has = 0; e.sto = 0; e.eto = 0; e.pay = {};
    for (int i = 0; i < 4; i++) begin
      if (!en[i]) continue;
      if (n[i] <= 0) begin e.sto[i] = 1; continue; end
      e.has[i] = 1;
      if (stuck[i]) e.eto[i] = 1;
      for (int k = 0; k < n[i]; k++) begin
        logic [63:0] d; d = {$urandom, $urandom};
        fq[i].push_back({!stuck[i] && (k == n[i] - 1), d});
        e.pay.push_back(d);
      end
    end
    exp_q.push_back(e);
  endtask

  // one event from loading to its last word, returning its start wait
  task automatic one_event(input int n[4], input logic [3:0] en, input logic [3:0] stuck,
                           output int wait_cyc, output int dur);
    int t0;
    fifo_en = en;
    load(n, en, stuck);
    exp_q[$].bx = 0;
    @(posedge clk); #2;
    bxn = 12'($urandom); exp_q[$].bx = bxn; l1a = 1; t0 = t_cycle;
    @(posedge clk); #2 l1a = 0; evt_num = evt_num + 1;
    while (exp_q.size() != 0) @(posedge clk);
    wait_cyc = t_first - t0; dur = dur_last;
    for (int i = 0; i < 4; i++) if (stuck[i]) fq[i] = {};
    repeat (3) @(posedge clk);
  endtask

  int w0, w1, w2, d0, d1;
  int nn[4];
  int ovf_cnt = 0, nf_seen = 0;
  logic [23:0] dropped[$];
  always @(negedge clk) if (dut.l1a_d && dut.l1q_full) dropped.push_back(evt_num);
  always @(posedge clk) begin if (ovf) ovf_cnt++; if (nf) nf_seen++; end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst = 0;
    repeat (3) @(posedge clk);
    // 1. all FIFOs with data, no stops: reference timing
    nn = '{3, 1, 5, 2};
    one_event(nn, 4'hF, 4'h0, w0, d0);
    `CHECK(d0 == 7 + (1 + 2*3) + (1 + 2*1) + (1 + 2*5) + (1 + 2*2),
           $sformatf("event duration %0d cycles", d0))
    // 2. enabled FIFO 2 without data: start timeout
    nn = '{2, 2, 0, 2};
    one_event(nn, 4'hF, 4'h0, w1, d1);
    `CHECK(w1 - w0 == START_LIM, $sformatf("start timeout wait %0d", w1 - w0))
    // 3. FIFO 1 disabled and empty: not flagged
    nn = '{2, 0, 4, 0};
    one_event(nn, 4'b0101, 4'h0, w1, d1);
    `CHECK(w1 == w0, "no wait for a disabled FIFO")
    // 4. FIFO 3 never delivers its last word: end timeout
    nn = '{1, 1, 1, 2};
    one_event(nn, 4'hF, 4'b1000, w1, d1);
    // 5. calibration event with FIFO 0 empty: calibration start timeout
    cal_mode = 1; n_cal++;
    nn = '{0, 3, 3, 3};
    one_event(nn, 4'hF, 4'h0, w2, d1);
    `CHECK(w2 - w0 == CAL_LIM, $sformatf("calibration start timeout wait %0d", w2 - w0))
    cal_mode = 0;
    // 6. no FIFO enabled: a 6-word event
    nn = '{0, 0, 0, 0};
    one_event(nn, 4'h0, 4'h0, w1, d1);
    `CHECK(d1 == 6 + 1, "empty event duration")
    // 7. random events with random downstream stops
    fork
      begin
        for (int k = 0; k < 25; k++) begin
          for (int i = 0; i < 4; i++) nn[i] = $urandom % 8;
          one_event(nn, 4'(($urandom % 15) + 1), 4'h0, w1, d1);
        end
      end
      begin
        forever begin
          @(posedge clk); #3 out_stop = ($urandom % 4) == 0;
        end
      end
    join_any
    disable fork;
    #2 out_stop = 0;
    wait (exp_q.size() == 0);
    out_stop = 0;
    repeat (5) @(posedge clk);
    // 8. trigger burst while the output is stopped: fills the L1A queue
    #2 fifo_en = 4'h0;
    out_stop = 1;
    for (int k = 0; k < 20; k++) begin
      evt_t e;
      e.num = evt_num + 1; e.en = 0; e.has = 0; e.sto = 0; e.eto = 0; e.pay = {};
      @(posedge clk); #2 bxn = 12'($urandom); e.bx = bxn; l1a = 1;
      @(posedge clk); #2 l1a = 0; evt_num = evt_num + 1;
      exp_q.push_back(e);
    end
    repeat (3) @(posedge clk);
    // drop the triggers the queue refused
    foreach (dropped[j])
      for (int i = exp_q.size() - 1; i >= 0; i--)
        if (exp_q[i].num == dropped[j]) exp_q.delete(i);
    #2 out_stop = 0;
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    `CHECK(nf_seen > 0, "L1A queue near full seen")
    `CHECK(ovf_cnt > 0, "L1A queue overflow seen")
    `CHECK(n_sto >= 2 && n_eto >= 1 && n_nodata >= 1 && n_stop > 100 && n_cal == 1,
           $sformatf("cases: sto %0d eto %0d nodata %0d stop %0d", n_sto, n_eto, n_nodata, n_stop))
    `CHECK(n_events == 31 + 20 - ovf_cnt && ovf_cnt == dropped.size(), $sformatf("events %0d", n_events))
    `CHECK(!busy, "idle at the end")
    `TB_DONE
  end
endmodule
