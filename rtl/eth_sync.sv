// eth_sync: Gigabit Ethernet synchronisation sequence generator.
//
// Loops through the four characters K28.5, D21.5, K28.5, D2.2 (9'h1BC,
// 9'h0B5, 9'h1BC, 9'h042; {K flag, byte}) that the DDU sends while its
// Ethernet transmitter is in reset, so the receiver can align. A one-hot
// 4-bit ring (sr_onehot) holds the position: ld starts it at the first
// character, each clock with ce high steps it. q shows the character when
// oe is high and 0 otherwise. Characters and order are the DDU's.
module eth_sync
  import ddu5ctrl_pkg::*;
(
  input  logic       clk,
  input  logic       ld,
  input  logic       ce,
  input  logic       oe,
  output logic [8:0] q
);
  logic [3:0] ph;
  sr_onehot #(.W(4), .ASYNC(1'b0)) u_ring (
    .clk(clk), .rst(ld), .ce(ce), .sli(ph[3]), .q(ph));

  logic [8:0] c;
  always_comb begin
    case (1'b1)
      ph[1]:   c = D21_5;
      ph[3]:   c = D2_2;
      default: c = K28_5;
    endcase
    q = oe ? c : 9'h000;
  end
endmodule
