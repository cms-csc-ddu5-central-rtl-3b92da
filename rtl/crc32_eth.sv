// crc32_eth: Ethernet frame check sequence, one byte per clock.
//
// The IEEE 802.3 CRC-32 (polynomial 04C11DB7, bit-reversed form EDB88320),
// processed least significant bit of each byte first. init loads all ones;
// each clock with en high folds in byte d. The frame check sequence is the
// complement of crc, fcs, sent least significant byte first. The DDU's
// packet engine sends "CRC32 (4 bytes)"; the standard Ethernet form is this
// design's reading of that.
module crc32_eth (
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  d,
  output logic [31:0] crc,
  output logic [31:0] fcs
);
  function automatic logic [31:0] step(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++)
      r = (r[0] ^ b[i]) ? ((r >> 1) ^ 32'hEDB8_8320) : (r >> 1);
    return r;
  endfunction

  always_ff @(posedge clk)
    if (init)    crc <= '1;
    else if (en) crc <= step(crc, d);

  always_comb fcs = ~crc;
endmodule
