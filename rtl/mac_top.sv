// mac_top - IEEE 802.11 MAC processor chip (everything except the ARM core).
//
// The chip is built around an ARM7TDMI core that runs the MAC protocol
// firmware (frame formatting, DCF access, fragmentation, RTS/CTS/ACK). The
// core and its bus wrapper are licensed IP and sit outside this module: their
// bus master port is the cpu_* port and the interrupt lines nfiq/nirq go to
// them. Time-critical and bit-serial work is done by bus-master hardware:
//   pai     - physical attachment interface: PHY bit-serial transmit and
//             receive with CRC-32 FCS, 64-byte FIFOs and DMA, 64-bit TSF,
//             serial programming of baseband and synthesiser
//   wep     - RC4 encryption/decryption of memory blocks with CRC-32 ICV
//   pcmcia  - host interface; the host reaches the MAC memory space as master
// These masters and the CPU share the system bus through the central arbiter
// (priority PAI, WEP, PCMCIA, CPU) and address decoder, and reach the
// external SRAM/Flash through mem_ctrl, a slave with programmable wait
// states. The APB bridge connects the interrupt controller and the two
// timers on a peripheral bus running at 1/3 of the system clock.
// Address map: 0x0000_0000 Flash, 0x0100_0000 SRAM, 0x0800_0000 memory
// controller register; 0x1000_0000 PAI; 0x2000_0000 WEP; 0x3000_0000 PCMCIA;
// 0x8000_0000 interrupt controller; 0x8000_1000 timers.
// Interrupt sources: 0 PAI, 1 WEP, 2 PCMCIA, 3 timer 0, 4 timer 1, 5-7 unused.
// The block set and the bus roles follow the document; the bus protocol
// (see mac_pkg), the address map and interrupt numbering are this design's.
module mac_top
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ARM core (through its bus wrapper)
  input  logic        cpu_breq,
  output logic        cpu_gnt,
  input  asb_req_t    cpu_req,
  output asb_rsp_t    cpu_rsp,
  output logic        nfiq,
  output logic        nirq,
  // external memory
  output logic [23:0] ext_addr,
  output logic [15:0] ext_wdata,
  input  logic [15:0] ext_rdata,
  output logic        ext_data_oe,
  output logic        ext_cs_sram_n,
  output logic        ext_cs_flash_n,
  output logic        ext_oe_n,
  output logic        ext_we_n,
  output logic [1:0]  ext_be_n,
  // PHY
  output logic        phy_tx_pe,
  input  logic        phy_tx_rdy,
  input  logic        phy_txclk,
  output logic        phy_txd,
  output logic        phy_rx_pe,
  input  logic        phy_md_rdy,
  input  logic        phy_rxclk,
  input  logic        phy_rxd,
  output logic        ser_clk,
  output logic        ser_dout,
  input  logic        ser_din,
  output logic        bb_cs_n,
  output logic        syn_le,
  // PCMCIA host bus
  input  logic [9:0]  host_addr,
  input  logic [7:0]  host_din,
  output logic [7:0]  host_dout,
  output logic        host_dout_oe,
  input  logic        host_ce_n,
  input  logic        host_oe_n,
  input  logic        host_we_n,
  input  logic        host_reg_n,
  output logic        host_wait_n,
  output logic        host_ireq_n
);

  logic [NUM_MASTERS-1:0] m_breq, m_gnt;
  asb_req_t m_req [NUM_MASTERS];
  asb_rsp_t m_rsp [NUM_MASTERS];
  asb_req_t s_req [NUM_SLAVES];
  asb_rsp_t s_rsp [NUM_SLAVES];

  logic pai_irq, wep_irq, pc_irq;
  logic [1:0] tim_irq;

  asb_decoder_arbiter u_arb (
    .clk, .rst_n, .m_breq, .m_gnt, .m_req, .m_rsp, .s_req, .s_rsp);

  assign m_breq[M_CPU] = cpu_breq;
  assign m_req[M_CPU]  = cpu_req;
  assign cpu_gnt       = m_gnt[M_CPU];
  assign cpu_rsp       = m_rsp[M_CPU];

  mem_ctrl u_mem (
    .clk, .rst_n, .s_req(s_req[S_MEM]), .s_rsp(s_rsp[S_MEM]),
    .ext_addr, .ext_wdata, .ext_rdata, .ext_data_oe, .ext_cs_sram_n, .ext_cs_flash_n,
    .ext_oe_n, .ext_we_n, .ext_be_n);

  pai u_pai (
    .clk, .rst_n, .s_req(s_req[S_PAI]), .s_rsp(s_rsp[S_PAI]),
    .m_breq(m_breq[M_PAI]), .m_gnt(m_gnt[M_PAI]), .m_req(m_req[M_PAI]), .m_rsp(m_rsp[M_PAI]),
    .irq(pai_irq),
    .phy_tx_pe, .phy_tx_rdy, .phy_txclk, .phy_txd,
    .phy_rx_pe, .phy_md_rdy, .phy_rxclk, .phy_rxd,
    .ser_clk, .ser_dout, .ser_din, .bb_cs_n, .syn_le);

  wep u_wep (
    .clk, .rst_n, .s_req(s_req[S_WEP]), .s_rsp(s_rsp[S_WEP]),
    .m_breq(m_breq[M_WEP]), .m_gnt(m_gnt[M_WEP]), .m_req(m_req[M_WEP]), .m_rsp(m_rsp[M_WEP]),
    .irq(wep_irq));

  pcmcia u_pcmcia (
    .clk, .rst_n,
    .host_addr, .host_din, .host_dout, .host_dout_oe, .host_ce_n, .host_oe_n, .host_we_n,
    .host_reg_n, .host_wait_n, .host_ireq_n,
    .s_req(s_req[S_PCMCIA]), .s_rsp(s_rsp[S_PCMCIA]),
    .m_breq(m_breq[M_PCMCIA]), .m_gnt(m_gnt[M_PCMCIA]), .m_req(m_req[M_PCMCIA]),
    .m_rsp(m_rsp[M_PCMCIA]), .irq(pc_irq));

  // Peripheral bus.
  logic        pclk_en, penable, pwrite;
  logic [15:0] paddr;
  logic [1:0]  psel;
  logic [31:0] pwdata;
  logic [31:0] prdata [2];

  apb_bridge #(.DIV(3), .NP(2)) u_bridge (
    .clk, .rst_n, .s_req(s_req[S_APB]), .s_rsp(s_rsp[S_APB]),
    .pclk_en, .paddr, .psel, .penable, .pwrite, .pwdata, .prdata);

  irc #(.NSRC(8)) u_irc (
    .clk, .rst_n, .pclk_en, .paddr, .psel(psel[0]), .penable, .pwrite, .pwdata,
    .prdata(prdata[0]), .src({3'b000, tim_irq, pc_irq, wep_irq, pai_irq}), .nfiq, .nirq);

  timers u_tim (
    .clk, .rst_n, .pclk_en, .paddr, .psel(psel[1]), .penable, .pwrite, .pwdata,
    .prdata(prdata[1]), .irq(tim_irq));

endmodule
