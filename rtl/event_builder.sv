// event_builder: DDU event assembly from the input FIFOs.
//
// For each level-1 accept the builder writes one DDU event on a 64-bit
// output stream:
//   H1  {5h, type 1h, L1A number[23:0], BXN[11:0], source ID[11:0], FOV 5h, 0h}
//   H2  {8000h, 0001h, 8000h, mask of the input FIFOs read}
//   H3  {0, DMB live[14:0], 0000h, 0000h, 0000h}
//   the DMB data of every input FIFO that had data, lowest FIFO first
//   T-2 8000_FFFF_8000_8000h
//   T-1 {start-timeout mask[15:0], end-timeout mask[15:0], mask read, mask enabled}
//   TR  {Ah, 0h, word count[23:0], CRC-16[15:0], status[7:0], TTS[3:0], 0h}
// The word count includes all six header and trailer words (an event with
// no data is 6 words). The CRC-16 (x^16+x^15+x^2+1) runs over every word of
// the event with the CRC field of TR taken as zero.
//
// L1A number and BXN are queued at each l1a in an L1A FIFO (L1Q_DEPTH), so
// triggers may arrive while an event is being built; l1q_near_full warns
// and l1q_overflow reports a trigger lost because the queue was full.
//
// Sequence for one event: wait, for at most the start timeout (start_lim,
// or cal_start_lim when cal_mode is high), until every enabled input FIFO
// (fifo_en) is non-empty; enabled FIFOs still empty then are flagged in the
// start-timeout mask and skipped. Write H1..H3. Then read each FIFO that
// had data until the word flagged last (in_lw); a FIFO that stays without
// its last word for done_lim cycles is flagged in the end-timeout mask and
// abandoned. Write T-2, T-1, TR.
//
// Input FIFO interface: the FIFOs are first-word-fall-through and share one
// data bus; in_sel (one-hot) enables the selected FIFO's output, in_data and
// in_lw are its head word as seen through the input registers, and in_ren
// pops it. Because the input registers delay the bus, a word is taken only
// when the selected FIFO has been non-empty, selected and not popped for
// RD_GAP cycles, so the rate is one word per RD_GAP+1 cycles. out_stop
// (downstream near full) holds the output before the next word.
//
// The header/trailer layout and fixed words, FOV=5, the timeouts, the word
// count rule, the CRC polynomial and the stop on downstream near full are
// the DDU's. The content of the masked status fields, the event type, the
// reading order and the read pacing are this design's choice.
module event_builder
  import ddu5ctrl_pkg::*;
#(
  parameter int unsigned NIN       = 4,
  parameter int unsigned RD_GAP    = 1,
  parameter int unsigned L1Q_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst,
  // trigger
  input  logic            l1a,
  input  logic [23:0]     evt_num,     // L1A number, valid the cycle after l1a
  input  logic [11:0]     bxn,         // sampled at l1a
  input  logic            cal_mode,
  input  logic [15:0]     start_lim,
  input  logic [15:0]     cal_start_lim,
  input  logic [15:0]     done_lim,
  // static event information
  input  logic [11:0]     source_id,
  input  logic [14:0]     dmb_live,
  input  logic [3:0]      tts_state,
  input  logic [NIN-1:0]  fifo_en,
  // input FIFOs
  input  logic [NIN-1:0]  in_empty,
  input  logic [63:0]     in_data,
  input  logic            in_lw,
  output logic [NIN-1:0]  in_sel,
  output logic [NIN-1:0]  in_ren,
  // output stream
  input  logic            out_stop,
  output logic            out_valid,
  output logic [63:0]     out_data,
  output logic            out_first,
  output logic            out_last,
  output logic            out_payload,
  // status
  output logic [NIN-1:0]  start_to,
  output logic [NIN-1:0]  end_to,
  output logic [NIN-1:0]  has_data,
  output logic            busy,
  output logic            l1q_near_full,
  output logic            l1q_overflow,
  output logic [23:0]     last_wc
);
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1;
  localparam int unsigned GW = $clog2(RD_GAP + 2);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_H1, S_H2, S_H3, S_SEL, S_RD, S_T2, S_T1, S_TR
  } state_e;
  state_e st;

  // ---------------- L1A queue ----------------
  logic        l1a_d;
  logic [11:0] bxn_l;
  logic [35:0] l1q_dout;
  logic        l1q_empty, l1q_full, l1q_ge2, l1q_pop;
  logic [$clog2(L1Q_DEPTH):0] l1q_count;

  always_ff @(posedge clk)
    if (rst) l1a_d <= 1'b0;
    else     l1a_d <= l1a;
  always_ff @(posedge clk)
    if (l1a) bxn_l <= bxn;

  sync_fifo #(.W(36), .DEPTH(L1Q_DEPTH)) u_l1q (
    .clk(clk), .rst(rst), .wr(l1a_d), .din({evt_num, bxn_l}), .rd(l1q_pop),
    .dout(l1q_dout), .empty(l1q_empty), .full(l1q_full), .ge2(l1q_ge2),
    .count(l1q_count));

  always_comb l1q_near_full = l1q_count >= ($clog2(L1Q_DEPTH)+1)'(L1Q_DEPTH - 4);
  always_ff @(posedge clk)
    if (rst) l1q_overflow <= 1'b0;
    else     l1q_overflow <= l1a_d && l1q_full;

  // ---------------- timers ----------------
  logic start_exp, done_exp;
  timeout_counter #(.W(16)) u_start_to (
    .clk(clk), .clr(st != S_START), .run(st == S_START),
    .limit(cal_mode ? cal_start_lim : start_lim), .expired(start_exp));
  timeout_counter #(.W(16)) u_done_to (
    .clk(clk), .clr(st != S_RD), .run(st == S_RD && !out_stop),
    .limit(done_lim), .expired(done_exp));

  // ---------------- CRC and word count ----------------
  logic [15:0] crc, crc_nxt;
  logic [23:0] wc;
  logic [63:0] tr_word;
  logic [63:0] ctl_word, crc_word;
  crc16_64 #(.INIT(16'hFFFF)) u_crc (
    .clk(clk), .init(st == S_IDLE), .en(out_valid), .d(crc_word),
    .crc(crc), .crc_nxt(crc_nxt));

  // ---------------- input FIFO selection ----------------
  logic [IW-1:0]  cur;
  logic [NIN-1:0] done;
  logic [GW-1:0]  settle;
  logic           take;
  logic [NIN-1:0] todo;
  logic           any_todo;
  logic [IW-1:0]  next_i;

  always_comb begin
    todo     = has_data & ~done;
    any_todo = |todo;
    next_i   = '0;
    for (int i = NIN-1; i >= 0; i--)
      if (todo[i]) next_i = IW'(i);
  end

  always_comb begin
    in_sel = '0;
    if (st == S_RD) in_sel[cur] = 1'b1;
    take   = (st == S_RD) && !out_stop && !in_empty[cur] && (settle == '0);
    in_ren = '0;
    if (take) in_ren[cur] = 1'b1;
  end

  always_ff @(posedge clk)
    if (st != S_RD || take || in_empty[cur]) settle <= GW'(RD_GAP);
    else if (settle != '0)                   settle <= settle - 1'b1;

  // ---------------- output words ----------------
  logic [63:0] h1, h2, h3, t2, t1;
  always_comb begin
    h1 = {DDU_BOE, 4'h1, l1q_dout[35:12], l1q_dout[11:0], source_id, DDU_FOV, 4'h0};
    h2 = {DDU_HDR2[63:16], 16'(has_data)};
    h3 = {1'b0, dmb_live, 48'h0};
    t2 = DDU_TRL2;
    t1 = {16'(start_to), 16'(end_to), 16'(has_data), 16'(fifo_en)};
    tr_word = {DDU_EOE, 4'h0, wc + 24'd1, 16'h0000,
               {(|start_to) | (|end_to), 7'h00}, tts_state, 4'h0};
  end

  // ctl_word: header/trailer word of the current state, with the CRC
  // field of TR zero; crc_word: what the CRC folds in this cycle
  logic        ctl_valid;
  always_comb begin
    ctl_valid = !out_stop;
    unique case (st)
      S_H1:    ctl_word = h1;
      S_H2:    ctl_word = h2;
      S_H3:    ctl_word = h3;
      S_T2:    ctl_word = t2;
      S_T1:    ctl_word = t1;
      S_TR:    ctl_word = tr_word;
      default: begin ctl_word = '0; ctl_valid = 1'b0; end
    endcase
    crc_word = take ? in_data : ctl_word;
  end

  always_comb begin
    out_valid   = take || ctl_valid;
    out_first   = ctl_valid && (st == S_H1);
    out_last    = ctl_valid && (st == S_TR);
    out_payload = take;
    if (take)             out_data = in_data;
    else if (st == S_TR)  out_data = {tr_word[63:32], crc_nxt, tr_word[15:0]};
    else                  out_data = ctl_word;
  end

  always_comb busy = (st != S_IDLE);
  always_comb l1q_pop = (st == S_TR) && !out_stop;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk)
    if (rst) begin
      st       <= S_IDLE;
      cur      <= '0;
      done     <= '0;
      has_data <= '0;
      start_to <= '0;
      end_to   <= '0;
      wc       <= '0;
      last_wc  <= '0;
    end else begin
      if (out_valid) wc <= wc + 1'b1;
      unique case (st)
        S_IDLE: if (!l1q_empty) begin
          st       <= S_START;
          wc       <= '0;
          done     <= '0;
          start_to <= '0;
          end_to   <= '0;
        end
        S_START: if (((fifo_en & in_empty) == '0) || start_exp) begin
          has_data <= fifo_en & ~in_empty;
          start_to <= fifo_en & in_empty;
          st       <= S_H1;
        end
        S_H1: if (!out_stop) st <= S_H2;
        S_H2: if (!out_stop) st <= S_H3;
        S_H3: if (!out_stop) st <= S_SEL;
        S_SEL: begin
          cur <= next_i;
          st  <= any_todo ? S_RD : S_T2;
        end
        S_RD: begin
          if (take && in_lw) begin
            done[cur] <= 1'b1;
            st        <= S_SEL;
          end else if (done_exp) begin
            done[cur]   <= 1'b1;
            end_to[cur] <= 1'b1;
            st          <= S_SEL;
          end
        end
        S_T2: if (!out_stop) st <= S_T1;
        S_T1: if (!out_stop) st <= S_TR;
        S_TR: if (!out_stop) begin
          st      <= S_IDLE;
          last_wc <= wc + 24'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
endmodule
