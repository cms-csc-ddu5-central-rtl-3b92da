// sync_fifo: single-clock first-word-fall-through FIFO.
//
// dout shows the oldest word whenever empty is low; rd pops it. A write
// while full is dropped. count is the number of words held, ge2 is high
// when two or more are held (the "Empty/GE2" flag pair of the DDU FIFOs).
// DEPTH must be a power of two. Storage is a plain array, so synthesis may
// map it to block RAM.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr,
  input  logic [W-1:0]             din,
  input  logic                     rd,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic                     ge2,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  always_comb begin
    empty = (count == '0);
    full  = (count == (AW+1)'(DEPTH));
    ge2   = (count >= (AW+1)'(2));
    do_wr = wr && !full;
    do_rd = rd && !empty;
    dout  = mem[rp];
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= din;

  always_ff @(posedge clk)
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
endmodule
