// sbox_ram - 256 x 8 single-port synchronous RAM holding the RC4 state
// (the WEP module's local SRAM).
//
// One access per clock: with we = 1 the byte at addr is written; otherwise
// it is read and appears on rdata after the clock edge (one cycle latency).
// Written as an array so that synthesis maps it to a RAM macro. Contents are
// undefined after reset; the RC4 key schedule writes every entry before use.
// The size of 256 bytes is the document's.
module sbox_ram #(
  parameter int DEPTH = 256,
  parameter int W     = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];

endmodule
