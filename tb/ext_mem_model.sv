// ext_mem_model - behavioural model of the external memory devices: a Flash
// and an SRAM, each 2**AW bytes, on a shared 8/16-bit data bus with active
// low chip selects, output enable, write enable and byte enables. Reads are
// combinational; writes take effect on the clock edge while we_n is low.
// Byte enable 0 covers data[7:0] at the even byte address, enable 1 covers
// data[15:8] at the odd one (in 8-bit use only enable 0 and data[7:0] at the
// exact byte address). Counts the clocks each chip select was active.
module ext_mem_model #(
  parameter int AW = 12
) (
  input  logic        clk,
  input  logic [23:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic        cs_sram_n,
  input  logic        cs_flash_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic [1:0]  be_n,
  input  logic        bus16
);
  logic [7:0] flash [2**AW];
  logic [7:0] sram  [2**AW];
  int unsigned sram_cycles, flash_cycles;
  logic [AW-1:0] a0, a1;

  initial begin
    foreach (flash[i]) flash[i] = 8'h00;
    foreach (sram[i])  sram[i]  = 8'h00;
  end

  assign a0 = bus16 ? {addr[AW-1:1], 1'b0} : addr[AW-1:0];
  assign a1 = {addr[AW-1:1], 1'b1};

  always_comb begin
    rdata = 16'h0000;
    if (!oe_n) begin
      if (!cs_sram_n)  rdata = bus16 ? {sram[a1], sram[a0]} : {8'h00, sram[a0]};
      if (!cs_flash_n) rdata = bus16 ? {flash[a1], flash[a0]} : {8'h00, flash[a0]};
    end
  end

  always_ff @(posedge clk) begin
    if (!cs_sram_n)  sram_cycles  <= sram_cycles + 1;
    if (!cs_flash_n) flash_cycles <= flash_cycles + 1;
    if (!we_n && !cs_sram_n) begin
      if (!be_n[0]) sram[a0] <= wdata[7:0];
      if (!be_n[1] && bus16) sram[a1] <= wdata[15:8];
    end
    if (!we_n && !cs_flash_n) begin
      if (!be_n[0]) flash[a0] <= wdata[7:0];
      if (!be_n[1] && bus16) flash[a1] <= wdata[15:8];
    end
  end
endmodule
