// gbe_tx: Gigabit Ethernet packet engine for the DDU spy link.
//
// Turns the 64-bit words of a first-word-fall-through FIFO into a stream of
// 8b/10b characters, one {K flag, byte} per clock (tx_k, tx_d), for a
// 1000BASE-X transceiver. The sequence is:
//   reset      : the sync loop K28.5 D21.5 K28.5 D2.2 (eth_sync);
//   idle       : K28.5 D16.2 pairs (eth_idle); after each pair, if the FIFO
//                is not empty a packet starts, otherwise idle continues;
//   header     : 8 bytes, start-of-packet K27.7, six 55h, then D5h;
//   destination: 4 bytes FFh;
//   data       : each FIFO word as 8 bytes, bits 63:56 first; the word is
//                popped with its last byte. Data ends after a word popped
//                while the FIFO did not hold two or more (fifo_ge2 low), or
//                when MAX_DATA bytes have been sent;
//   filler     : if fewer than FILL_BELOW data bytes were sent, a 2-byte
//                count of the real data bytes then FFh up to MIN_DATA bytes;
//   packet no. : 2-byte packet counter, then it increments;
//   CRC        : the 4-byte Ethernet CRC-32 (crc32_eth) of all bytes from
//                the destination bytes to the packet number;
//   trailer    : K29.7 K23.7, then back to idle (2 idle bytes at least).
// The step list, the 8-byte header plus 4 FFh bytes, the filled minimum of
// 64 data bytes and the K28.5/D16.2 and sync characters are the DDU's. The
// byte values of the header and trailer, the order of the fields after the
// data, the 16-bit counters and MAX_DATA = 7680 (the DDU decodes both 7680
// and 8960; its revision notes give 7952-byte packets) are this design's
// reading.
module gbe_tx
  import ddu5ctrl_pkg::*;
#(
  parameter int unsigned MAX_DATA   = 7680,
  parameter int unsigned FILL_BELOW = 48,
  parameter int unsigned MIN_DATA   = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  logic        fifo_ge2,
  input  logic [63:0] fifo_data,
  output logic        fifo_ren,
  output logic [7:0]  tx_d,
  output logic        tx_k,
  output logic        in_packet,
  output logic [15:0] pkt_num
);
  typedef enum logic [3:0] {
    S_IDLE0, S_IDLE1, S_HDR, S_DEST, S_DATA, S_CNT, S_FILL, S_PKTN, S_CRC, S_TRL
  } state_e;

  state_e      st;
  logic [3:0]  bcnt;      // byte index inside the current field
  logic [15:0] dbytes;    // real data bytes sent in this packet
  logic [15:0] rbytes;    // data-region bytes (data + count + filler)
  logic        rst_d;

  // ---------------- character sources ----------------
  logic [8:0] sync_q, idle_q, ch;
  logic       idle_st;
  always_comb idle_st = (st == S_IDLE0) || (st == S_IDLE1);

  always_ff @(posedge clk) rst_d <= rst;
  eth_sync u_sync (.clk(clk), .ld(rst & ~rst_d), .ce(1'b1), .oe(rst), .q(sync_q));
  eth_idle u_idle (.clk(clk), .ld(rst || (st == S_TRL && bcnt == 4'd1)),
                   .ce(idle_st), .oe(!rst && idle_st), .q(idle_q));

  // ---------------- CRC ----------------
  logic [31:0] crc, fcs;
  logic        crc_en;
  logic [7:0]  body;
  crc32_eth u_crc (.clk(clk), .init(st == S_HDR), .en(crc_en), .d(body),
                   .crc(crc), .fcs(fcs));

  // ---------------- byte of the current field ----------------
  always_comb begin
    body   = 8'hFF;
    crc_en = 1'b0;
    unique case (st)
      S_DEST: begin body = 8'hFF; crc_en = 1'b1; end
      S_DATA: begin body = fifo_data[63 - 8*bcnt[2:0] -: 8]; crc_en = 1'b1; end
      S_CNT:  begin body = (bcnt == 0) ? dbytes[15:8] : dbytes[7:0]; crc_en = 1'b1; end
      S_FILL: begin body = 8'hFF; crc_en = 1'b1; end
      S_PKTN: begin body = (bcnt == 0) ? pkt_num[15:8] : pkt_num[7:0]; crc_en = 1'b1; end
      default: ;
    endcase
  end

  always_comb begin
    ch = 9'h000;
    unique case (st)
      S_HDR:   ch = (bcnt == 0) ? 9'h1FB : ((bcnt == 7) ? 9'h0D5 : 9'h055);
      S_CRC:   ch = {1'b0, fcs[8*bcnt[1:0] +: 8]};
      S_TRL:   ch = (bcnt == 0) ? K29_7 : K23_7;
      S_IDLE0, S_IDLE1: ch = idle_q;
      default: ch = {1'b0, body};
    endcase
    if (rst) ch = sync_q;
    tx_k = ch[8];
    tx_d = ch[7:0];
  end

  always_comb fifo_ren = !rst && (st == S_DATA) && (bcnt == 4'd7);
  always_comb in_packet = !rst && !idle_st;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk)
    if (rst) begin
      st      <= S_IDLE0;
      bcnt    <= '0;
      dbytes  <= '0;
      rbytes  <= '0;
      pkt_num <= '0;
    end else begin
      bcnt <= bcnt + 1'b1;
      unique case (st)
        S_IDLE0: st <= S_IDLE1;
        S_IDLE1: begin
          bcnt <= '0;
          st   <= fifo_empty ? S_IDLE0 : S_HDR;
        end
        S_HDR:  if (bcnt == 4'd7) begin bcnt <= '0; st <= S_DEST; dbytes <= '0; rbytes <= '0; end
        S_DEST: if (bcnt == 4'd3) begin bcnt <= '0; st <= S_DATA; end
        S_DATA: begin
          dbytes <= dbytes + 1'b1;
          rbytes <= rbytes + 1'b1;
          if (bcnt == 4'd7) begin
            bcnt <= '0;
            // the word popped now was the last one unless the FIFO holds two
            if (32'(dbytes) + 1 >= MAX_DATA || !fifo_ge2)
              st <= (32'(dbytes) + 1 < FILL_BELOW) ? S_CNT : S_PKTN;
          end
        end
        S_CNT: begin
          rbytes <= rbytes + 1'b1;
          if (bcnt == 4'd1) begin bcnt <= '0; st <= S_FILL; end
        end
        S_FILL: begin
          rbytes <= rbytes + 1'b1;
          if (32'(rbytes) + 1 >= MIN_DATA) begin bcnt <= '0; st <= S_PKTN; end
        end
        S_PKTN: if (bcnt == 4'd1) begin bcnt <= '0; st <= S_CRC; end
        S_CRC:  if (bcnt == 4'd3) begin bcnt <= '0; st <= S_TRL; pkt_num <= pkt_num + 1'b1; end
        S_TRL:  if (bcnt == 4'd1) begin bcnt <= '0; st <= S_IDLE0; end
        default: st <= S_IDLE0;
      endcase
    end
endmodule
