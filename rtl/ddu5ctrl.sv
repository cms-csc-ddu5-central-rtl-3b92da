// ddu5ctrl: top of the DDU5 central-control FPGA.
//
// The DDU (detector dependent unit) of the CMS cathode strip chambers
// collects the data of up to 15 DMBs (DAQ motherboards), which arrive on
// fibres and are buffered by the input FPGAs in four input FIFOs. This
// controller reads those FIFOs event by event and wraps the data in the DDU
// header and trailer (event_builder), sends the events to the DCC / S-Link
// output, copies them to a Gigabit Ethernet spy link (spy FIFO, gbe_tx,
// 8-to-16 bit pairing for the transceiver), reports its state to the FMM
// throttling system (fmm_status), keeps the bunch-crossing and L1A counters,
// and is controlled and read over JTAG (jtag_decode, jtag_readout,
// kill_register).
//
// Interfaces (all on clk, the 40 MHz bunch clock):
//   rdat_pin[35:0]  DDR bus from the selected input FIFO: bits 35:0 of the
//                   72-bit word while clk is high, bits 71:36 while it is
//                   low; rdat[63:0] is data, rdat[71:64] control
//                   {RXER[1:0], FEND[1:0], LW[1:0], NODAT_n[1:0]}.
//   in_empty/in_ren/in_oe per input FIFO (first-word-fall-through).
//   out_*           event words to the DCC; dcc_stop holds them.
//   gt_*            16-bit character pairs for the spy transceiver.
//   jt_*            JTAG user chains as clock-synchronous strobes: chain 1
//                   carries the 8-bit instruction, chain 2 the data.
//   fmm[3:0]        BUSY, WARNING, LOST SYNC, ERROR.
// The spy transmitter runs on clk here (one character per clock); the
// 125 MHz transceiver clock domain of the board is not modelled.
// rst is both the asynchronous clear of the DDR input register and the
// 8-to-16 bus-matching register (macros with asynchronous clears) and the
// synchronous reset of everything else; lint notes this mix, and it is
// deliberate.
module ddu5ctrl
  import ddu5ctrl_pkg::*;
#(
  parameter int unsigned NIN        = 4,
  parameter int unsigned SPY_DEPTH  = 512,
  parameter int unsigned L1Q_DEPTH  = 16,
  parameter int unsigned BLINK_W    = 24,
  parameter int unsigned GBE_MAX    = 7680
) (
  input  logic              clk,
  input  logic              rst,         // hard reset
  input  logic              sync_rst,    // sync (resynchronisation) reset
  input  logic              l1a_in,
  input  logic              cal_mode,
  input  logic [15:0]       board_id,
  input  logic [14:0]       dmb_live,
  // input FIFOs
  input  logic [NIN-1:0]    in_empty,
  input  logic [NIN-1:0]    in_fok,
  input  logic [35:0]       rdat_pin,
  output logic [NIN-1:0]    in_ren,
  output logic [NIN-1:0]    in_oe,
  // DCC output
  input  logic              dcc_stop,
  output logic              out_valid,
  output logic [63:0]       out_data,
  output logic              out_first,
  output logic              out_last,
  // Gigabit Ethernet spy transceiver
  output logic [15:0]       gt_txdata,
  output logic [1:0]        gt_txcharisk,
  output logic              gt_tx_dv,
  // FMM
  output logic [3:0]        fmm,
  // JTAG user chains
  input  logic              jt_sel1,
  input  logic              jt_sel2,
  input  logic              jt_capture,
  input  logic              jt_shift,
  input  logic              jt_update,
  input  logic              jt_tdi,
  output logic              jt_tdo,
  // front panel
  input  logic [14:0]       fiber_present,
  input  logic [14:0]       fiber_ready,
  input  logic [14:0]       fiber_dav,
  output logic [14:0]       fok_led,
  output logic [14:0]       dav_led,
  // status
  output logic              sp_err,
  output logic              a_t_switch,
  output logic              cal_auto_l1,
  output logic [11:0]       bxn,
  output logic [23:0]       evt_cnt,
  output logic              spy_drop
);
  // ---------------- resets and JTAG instruction ----------------
  logic [7:0]         opcode;
  logic               ir_tdo, fpga_reset, vme_l1a;
  logic [NUM_OPS-1:0] op_sel;
  logic               srst;

  jtag_decode u_jdec (
    .clk(clk), .rst(rst), .ir_shift(jt_sel1 & jt_shift), .ir_update(jt_sel1 & jt_update),
    .tdi(jt_tdi), .opcode(opcode), .ir_tdo(ir_tdo), .op_sel(op_sel),
    .fpga_reset(fpga_reset), .cal_auto_l1(cal_auto_l1));

  // "DDU-only VME_L1A": one trigger when the instruction is loaded
  always_ff @(posedge clk)
    if (rst) vme_l1a <= 1'b0;
    else     vme_l1a <= jt_sel1 & jt_update & (u_jdec.ir == OP_VME_L1A);

  // the JTAG reset acts like a sync reset
  always_comb srst = rst | sync_rst | fpga_reset;

  // ---------------- JTAG data chain ----------------
  logic [31:0] dr, dr_cap;
  logic        dr_tdo;
  logic [KILL_W-1:0] kill;
  logic [14:0] fiber_en;
  logic        alct_chk_en, tmb_chk_en, cfeb_chk_en;
  logic [11:0] bx_lim;
  logic [NIN-1:0] start_to, end_to, has_data;
  logic        evb_busy, l1q_near_full, l1q_overflow;
  logic [23:0] last_wc;
  logic [NIN-1:0] fifo_en_w;

  jtag_readout #(.W(32)) u_jdr (
    .clk(clk), .capture(jt_sel2 & jt_capture), .shift(jt_sel2 & jt_shift),
    .tdi(jt_tdi), .pdin(dr_cap), .sr(dr), .tdo(dr_tdo));

  always_comb jt_tdo = jt_sel1 ? ir_tdo : dr_tdo;

  logic [31:0] status32;
  always_comb begin
    status32 = {fmm, 4'(start_to), 4'(end_to), 4'(in_fok), sp_err, l1q_near_full,
                evb_busy, cal_auto_l1, alct_chk_en, tmb_chk_en, cfeb_chk_en, spy_drop,
                8'(last_wc)};
    dr_cap = '0;
    case (1'b1)
      op_sel[6'(OP_RD_L1A)]:     dr_cap = 32'(evt_cnt);
      op_sel[6'(OP_STATUS32)]:   dr_cap = status32;
      op_sel[6'(OP_STATUS_LO)]:  dr_cap = 32'(status32[15:0]);
      op_sel[6'(OP_STATUS_HI)]:  dr_cap = 32'(status32[31:16]);
      op_sel[6'(OP_FIFO_A)]:     dr_cap = 32'({12'h000, 4'(in_fok & fifo_en_w)});
      op_sel[6'(OP_FIFO_C)]:     dr_cap = 32'({4'h0, 4'(end_to), 4'(start_to), 4'h0});
      op_sel[6'(OP_RD_KILL)]:    dr_cap = 32'(kill);
      op_sel[6'(OP_DMB_LIVE)]:   dr_cap = 32'(dmb_live);
      op_sel[6'(OP_RD_BXORBIT)]: dr_cap = 32'(bx_lim);
      op_sel[6'(OP_BOARD_ID)]:   dr_cap = 32'(board_id);
      default:               dr_cap = '0;
    endcase
  end

  logic dr_update;
  always_comb dr_update = jt_sel2 & jt_update;

  kill_register u_kill (
    .clk(clk), .rst(rst), .load(dr_update & op_sel[6'(OP_LD_KILL)]), .d(dr[31 -: KILL_W]),
    .kill(kill), .fiber_en(fiber_en), .alct_chk_en(alct_chk_en),
    .tmb_chk_en(tmb_chk_en), .cfeb_chk_en(cfeb_chk_en));

  // ---------------- counters ----------------
  logic l1a;
  always_comb l1a = l1a_in | vme_l1a;

  bxn_counter #(.LIM_DEFAULT(BX_LIM_LHC)) u_bxn (
    .clk(clk), .rst(rst), .lim_load(dr_update & op_sel[6'(OP_LD_BXORBIT)]),
    .lim_d(dr[31 -: 12]), .bx_lim(bx_lim), .bxn(bxn));

  l1a_counter u_l1a (.clk(clk), .rst(srst), .l1a(l1a), .evt_cnt(evt_cnt));

  // ---------------- input FIFO bus ----------------
  logic [35:0] q_rise, q_fall;
  logic [71:0] rdat;
  ifddr #(.W(36)) u_iddr (
    .clk(clk), .clr(rst), .ce(1'b1), .d(rdat_pin), .q_rise(q_rise), .q_fall(q_fall));
  always_comb rdat = {q_rise, q_fall};

  // input FIFO i carries fibres 4i..4i+3; it is read while one of them is
  // alive in the kill register and the FIFO reports FOK
  always_comb
    for (int i = 0; i < NIN; i++)
      fifo_en_w[i] = in_fok[i] & (|((16'(fiber_en) >> (4*i)) & 16'h000F));

  logic in_lw, rxer, fend;
  always_comb begin
    in_lw = |rdat[67:66];
    fend  = |rdat[69:68];
    rxer  = |rdat[71:70];
  end

  // ---------------- event builder ----------------
  logic out_payload;
  event_builder #(.NIN(NIN), .RD_GAP(1), .L1Q_DEPTH(L1Q_DEPTH)) u_evb (
    .clk(clk), .rst(srst), .l1a(l1a), .evt_num(evt_cnt), .bxn(bxn),
    .cal_mode(cal_mode), .start_lim(16'(EVT_START_TIMEOUT)),
    .cal_start_lim(16'(CAL_START_TIMEOUT)), .done_lim(16'(FIFO_DONE_TIMEOUT)),
    .source_id(board_id[11:0]), .dmb_live(dmb_live), .tts_state(fmm),
    .fifo_en(fifo_en_w), .in_empty(in_empty), .in_data(rdat[63:0]), .in_lw(in_lw),
    .in_sel(in_oe), .in_ren(in_ren), .out_stop(dcc_stop), .out_valid(out_valid),
    .out_data(out_data), .out_first(out_first), .out_last(out_last),
    .out_payload(out_payload), .start_to(start_to), .end_to(end_to),
    .has_data(has_data), .busy(evb_busy), .l1q_near_full(l1q_near_full),
    .l1q_overflow(l1q_overflow), .last_wc(last_wc));

  logic [3:0] sp_bits, sp_lane_err;
  // the special-word bits are checked on the DMB end words (E-codes), which
  // the input FPGAs flag with FEND
  special_word_check u_spw (
    .clk(clk), .clr(srst | out_first), .gold(out_payload & fend), .din(out_data),
    .voted(sp_bits), .err(sp_lane_err), .sp_err(sp_err), .a_t_switch(a_t_switch));

  // ---------------- FMM ----------------
  // receive errors flagged by the input FPGAs during this event
  logic rxer_seen, evt_err;
  always_ff @(posedge clk)
    if (srst || out_first)      rxer_seen <= 1'b0;
    else if (rxer & out_payload) rxer_seen <= 1'b1;

  or5p1 u_errs (.b({sp_err, 4'(end_to)}), .a(rxer_seen), .o(evt_err));

  fmm_status u_fmm (
    .clk(clk), .hard_rst(rst), .sync_rst(sync_rst | fpga_reset), .busy(1'b0),
    .near_full(l1q_near_full), .sync_err(l1q_overflow),
    .hard_err(evt_err & out_last), .fmm(fmm));

  // ---------------- Gigabit Ethernet spy path ----------------
  logic [63:0] spy_q;
  logic        spy_empty, spy_full, spy_ge2, spy_rd;
  logic [$clog2(SPY_DEPTH):0] spy_count;
  sync_fifo #(.W(64), .DEPTH(SPY_DEPTH)) u_spy (
    .clk(clk), .rst(srst), .wr(out_valid), .din(out_data), .rd(spy_rd),
    .dout(spy_q), .empty(spy_empty), .full(spy_full), .ge2(spy_ge2), .count(spy_count));

  always_ff @(posedge clk)
    if (srst) spy_drop <= 1'b0;
    else      spy_drop <= spy_drop | (out_valid & spy_full);

  logic [7:0]  tx_d;
  logic        tx_k, gbe_in_pkt;
  logic [15:0] gbe_pkt_num;
  gbe_tx #(.MAX_DATA(GBE_MAX)) u_gbe (
    .clk(clk), .rst(srst), .fifo_empty(spy_empty), .fifo_ge2(spy_ge2),
    .fifo_data(spy_q), .fifo_ren(spy_rd), .tx_d(tx_d), .tx_k(tx_k),
    .in_packet(gbe_in_pkt), .pkt_num(gbe_pkt_num));

  logic [17:0] gt_pair;
  bus_match #(.IN_W(9), .RATIO(2)) u_pair (
    .clk(clk), .clr(rst), .ce(1'b1), .d({tx_k, tx_d}), .q(gt_pair), .dv(gt_tx_dv));
  always_comb begin
    gt_txdata    = {gt_pair[16:9], gt_pair[7:0]};
    gt_txcharisk = {gt_pair[17], gt_pair[8]};
  end

  // ---------------- LEDs ----------------
  fiber_led #(.N(15), .BLINK_W(BLINK_W)) u_led (
    .clk(clk), .rst(rst), .present(fiber_present), .ready(fiber_ready),
    .dav(fiber_dav), .fok_led(fok_led), .dav_led(dav_led));
endmodule
