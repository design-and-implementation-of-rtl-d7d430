// crc32_serial - bit-serial CRC-32 engine for the 802.11 frame check sequence.
//
// One data bit per enabled clock, in transmission order (least significant
// bit of each byte first). The register is preset to all ones by init and
// uses the reflected form of the generator polynomial
// x32+x26+x23+x22+x16+x12+x11+x10+x8+x7+x5+x4+x2+x+1, so after the last data
// bit ~crc[0], ~crc[1], ... ~crc[31] are the FCS bits to transmit in that
// order. A receiver that runs the same engine over data and FCS sees
// residue_ok = 1 (register equal to 0xDEBB20E3) when the frame is intact.
// Used twice in the PAI: once on transmit, once on receive.
module crc32_serial
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        din,
  output logic [31:0] crc,
  output logic        residue_ok
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= (crc >> 1) ^ ((crc[0] ^ din) ? CRC32_POLY_REFL : 32'h0);

  assign residue_ok = (crc == CRC32_RESIDUE);

endmodule
