// special_word_check: vote and consistency check of the four "special
// word" bits.
//
// A 64-bit DMB data word is four 16-bit lanes. In DMB control words bits
// 12..15 of every lane carry the same flags. For each of these bit
// positions the block votes over the four lanes (set when 2 or more of the
// 4 lanes have it) and checks with an anyorall that the lanes agree. When
// gold (the word is valid data from the active FIFO) is high, the voted
// bits are latched into voted[3:0] (voted[0] is bit 12) and a disagreement
// in any position sets the sticky sp_err flag and err[3:0]; clr clears all.
// Outputs are registered. The vote threshold and the four positions follow
// the DDU control-bit list; latching every gold word is this design's
// choice.
//
// a_t_switch is the two-of-three vote (vote3) of bit 11 of lanes 0, 1 and 2,
// registered every clock and cleared by clr, as drawn for the "A-T-SWITCH"
// flag that tells an ALCT trailer from a TMB trailer.
module special_word_check (
  input  logic        clk,
  input  logic        clr,
  input  logic        gold,
  input  logic [63:0] din,
  output logic [3:0]  voted,
  output logic [3:0]  err,
  output logic        sp_err,
  output logic        a_t_switch
);
  logic ats_c;
  vote3 u_ats (.b({din[43], din[27], din[11]}), .vote(ats_c));
  always_ff @(posedge clk)
    if (clr) a_t_switch <= 1'b0;
    else     a_t_switch <= ats_c;

  logic [3:0] vote_c, dis_c;

  for (genvar b = 0; b < 4; b++) begin : g_bit
    logic [3:0] lanes;
    logic       any_b, all_b;
    assign lanes = {din[48+12+b], din[32+12+b], din[16+12+b], din[12+b]};
    anyorall u_chk (.b(lanes), .any(any_b), .all(all_b), .notall(dis_c[b]));
    always_comb
      vote_c[b] = (32'(lanes[0]) + 32'(lanes[1]) + 32'(lanes[2]) + 32'(lanes[3])) >= 2;
  end

  always_ff @(posedge clk)
    if (clr) begin
      voted  <= '0;
      err    <= '0;
      sp_err <= 1'b0;
    end else if (gold) begin
      voted  <= vote_c;
      err    <= err | dis_c;
      sp_err <= sp_err | (|dis_c);
    end
endmodule
