// crc32_parallel - byte-parallel CRC-32, the WEP integrity check value (ICV)
// engine.
//
// Folds one whole byte into the CRC per enabled clock (eight steps of the
// serial recurrence unrolled into one XOR network). Same polynomial, preset
// and bit order as the 802.11 FCS: the register starts at all ones, and
// icv = ~crc is the value appended to the frame body, least significant byte
// first. The document specifies parallel CRC-32 generation with this
// polynomial; the byte width is this design's choice.
module crc32_parallel
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [31:0] crc,
  output logic [31:0] icv
);

  function automatic logic [31:0] next_crc(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int b = 0; b < 8; b++)
      r = (r >> 1) ^ ((r[0] ^ d[b]) ? CRC32_POLY_REFL : 32'h0);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= next_crc(crc, din);

  assign icv = ~crc;

endmodule
