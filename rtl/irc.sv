// irc - interrupt controller on the peripheral bus.
//
// Collects the level-sensitive interrupt requests of the other modules
// (src[0] PAI, [1] WEP, [2] PCMCIA, [3] timer 0, [4] timer 1, the rest spare)
// and drives the ARM core's fast (nfiq) and normal (nirq) interrupt lines,
// both active low. Each source is enabled in ENABLE and routed to FIQ when its
// bit in FIQSEL is set, otherwise to IRQ. Among pending enabled sources the
// lowest index has the highest priority (fixed priority); its number is read
// from IRQ_VEC / FIQ_VEC, with bit 31 set when none is pending. A source stays
// pending until the module that raised it drops it. Outputs are registered:
// nirq/nfiq follow a source change after one clock.
// Registers (paddr[11:0]): 0x00 RAW (read only), 0x04 ENABLE, 0x08 FIQSEL,
// 0x0C IRQ_VEC (read only), 0x10 FIQ_VEC (read only), 0x14 PENDING (read only).
// The document gives the role, the two ARM lines and the fixed priority; the
// register set is this design's.
module irc #(
  parameter int NSRC = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pclk_en,
  input  logic [15:0]     paddr,
  input  logic            psel,
  input  logic            penable,
  input  logic            pwrite,
  input  logic [31:0]     pwdata,
  output logic [31:0]     prdata,
  input  logic [NSRC-1:0] src,
  output logic            nfiq,
  output logic            nirq
);

  logic [NSRC-1:0] enable_q, fiqsel_q, pend_irq, pend_fiq;
  logic [31:0]     irq_vec, fiq_vec;
  logic            wr;

  assign wr = psel && penable && pwrite && pclk_en;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      enable_q <= '0;
      fiqsel_q <= '0;
    end else if (wr) begin
      if (paddr[11:0] == 12'h004) enable_q <= pwdata[NSRC-1:0];
      if (paddr[11:0] == 12'h008) fiqsel_q <= pwdata[NSRC-1:0];
    end

  assign pend_irq = src & enable_q & ~fiqsel_q;
  assign pend_fiq = src & enable_q & fiqsel_q;

  always_comb begin
    irq_vec = 32'h8000_0000;
    fiq_vec = 32'h8000_0000;
    for (int i = NSRC - 1; i >= 0; i--) begin
      if (pend_irq[i]) irq_vec = i;
      if (pend_fiq[i]) fiq_vec = i;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      nirq <= 1'b1;
      nfiq <= 1'b1;
    end else begin
      nirq <= ~|pend_irq;
      nfiq <= ~|pend_fiq;
    end

  always_comb begin
    unique case (paddr[11:0])
      12'h000: prdata = 32'(src);
      12'h004: prdata = 32'(enable_q);
      12'h008: prdata = 32'(fiqsel_q);
      12'h00C: prdata = irq_vec;
      12'h010: prdata = fiq_vec;
      12'h014: prdata = 32'(pend_irq | pend_fiq);
      default: prdata = '0;
    endcase
  end

endmodule
