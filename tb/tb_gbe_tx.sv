// tb_gbe_tx: Ethernet packet engine. A queue models the FIFO. Bursts of
// 1..20 random 64-bit words are pushed while the engine is idle; every
// packet on the character stream is parsed and compared byte by byte with
// the expected frame (header, FFh destination bytes, data, byte count and
// FFh filler for short packets, packet number, CRC-32, trailer). The sync
// loop during reset and the idle pairs between packets are checked too.
// MAX_DATA is set to 128 bytes so that a long burst is split in two.
`include "tb_check.svh"
module tb_gbe_tx;
  int checks = 0, failures = 0;
  localparam int MAXD = 128;
  logic clk = 0, rst = 1;
  logic [63:0] q[$];
  logic fifo_empty, fifo_ge2, fifo_ren, tx_k, in_packet;
  logic [63:0] fifo_data;
  logic [7:0] tx_d;
  logic [15:0] pkt_num;
  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_ge2   = (q.size() >= 2);
    fifo_data  = fifo_empty ? 64'h0 : q[0];
  end
  gbe_tx #(.MAX_DATA(MAXD)) dut (.clk(clk), .rst(rst), .fifo_empty(fifo_empty), .fifo_ge2(fifo_ge2),
    .fifo_data(fifo_data), .fifo_ren(fifo_ren), .tx_d(tx_d), .tx_k(tx_k), .in_packet(in_packet),
    .pkt_num(pkt_num));
  always #5 clk = ~clk;
  `WATCHDOG(40000)

  // ---------- expected frames ----------
  typedef logic [8:0] ch_t;
  ch_t exp_q[$];
  int  npkt_exp = 0;
  function automatic logic [31:0] step_nr(input logic [31:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb; fb = c[31] ^ b[i];
      c = {c[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
    return c;
  endfunction
  task automatic expect_frame(input logic [63:0] words[$]);
    logic [7:0] body[$];
    logic [31:0] c, f;
    int nd;
    for (int i = 0; i < 4; i++) body.push_back(8'hFF);
    foreach (words[w]) for (int b = 7; b >= 0; b--) body.push_back(words[w][8*b +: 8]);
    nd = 8 * words.size();
    if (nd < 48) begin
      body.push_back(8'(nd >> 8)); body.push_back(8'(nd));
      while (body.size() - 4 < 64) body.push_back(8'hFF);
    end
    body.push_back(8'(npkt_exp >> 8)); body.push_back(8'(npkt_exp));
    c = 32'hFFFF_FFFF;
    foreach (body[i]) c = step_nr(c, body[i]);
    for (int i = 0; i < 32; i++) f[i] = ~c[31-i];
    exp_q.push_back(9'h1FB);
    repeat (6) exp_q.push_back(9'h055);
    exp_q.push_back(9'h0D5);
    foreach (body[i]) exp_q.push_back({1'b0, body[i]});
    for (int i = 0; i < 4; i++) exp_q.push_back({1'b0, f[8*i +: 8]});
    exp_q.push_back(9'h1FD); exp_q.push_back(9'h1F7);
    npkt_exp++;
  endtask

  // ---------- stream monitor ----------
  int npkt_seen = 0, nsync = 0, nidle = 0, nfilled = 0, nsplit = 0;
  bit in_frame = 0;
  ch_t prev_idle = 9'h050;
  ch_t c;
  // sample at the falling edge, pop just after the rising edge, so the
  // model never races the registers of the engine
  bit ren_s = 0;
  always @(posedge clk) if (ren_s) begin #1 void'(q.pop_front()); end
  always @(negedge clk) begin
    c = {tx_k, tx_d};
    ren_s = fifo_ren && !fifo_empty;
    if (rst) begin
      if (c == 9'h1BC || c == 9'h0B5 || c == 9'h042) nsync++;
      else begin checks++; failures++; $display("FAIL: bad sync char %h", c); end
    end else if (!in_frame) begin
      if (c == 9'h1FB) begin
        in_frame = 1;
        checks++;
        if (exp_q.size() == 0 || exp_q[0] != c) begin failures++; $display("FAIL: unexpected frame"); end
        else void'(exp_q.pop_front());
      end else begin
        checks++;
        if (!((c == 9'h1BC && prev_idle == 9'h050) || (c == 9'h050 && prev_idle == 9'h1BC))) begin
          failures++; $display("FAIL: idle char %h after %h", c, prev_idle);
        end
        prev_idle = c; nidle++;
      end
    end else begin
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != c) begin
        failures++; $display("FAIL %0t: frame char %h, expected %h", $time, c, exp_q.size() ? exp_q[0] : 9'h0);
        in_frame = 0;
      end else begin
        void'(exp_q.pop_front());
        if (c == 9'h1F7) begin in_frame = 0; npkt_seen++; prev_idle = 9'h050; end
      end
    end
  end

  task automatic burst(input int nw);
    logic [63:0] w[$];
    logic [63:0] part[$];
    for (int i = 0; i < nw; i++) w.push_back({$urandom, $urandom});
    // split as the engine will: MAXD bytes per packet
    for (int i = 0; i < nw; i++) begin
      part.push_back(w[i]);
      if (part.size() == MAXD / 8 || i == nw - 1) begin
        if (part.size() < 6) nfilled++;
        if (part.size() == MAXD / 8 && i != nw - 1) nsplit++;
        expect_frame(part); part = {};
      end
    end
    foreach (w[i]) q.push_back(w[i]);
    // wait for the FIFO to drain and the engine to return to idle
    while (q.size() != 0 || in_packet) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (14) @(posedge clk);
    #1 rst = 0;
    repeat (6) @(posedge clk);
    burst(1); burst(3); burst(5); burst(6); burst(7); burst(20); burst(2); burst(16);
    repeat (10) @(posedge clk);
    `CHECK(npkt_seen == npkt_exp && npkt_exp == 9, $sformatf("packets %0d of %0d", npkt_seen, npkt_exp))
    `CHECK(exp_q.size() == 0, "all expected characters seen")
    `CHECK(nsync >= 12, "sync sent during reset")
    `CHECK(nfilled >= 3 && nsplit >= 1, "filled and split packets exercised")
    `CHECK(pkt_num == 16'(npkt_exp), "packet counter")
    `TB_DONE
  end
endmodule
