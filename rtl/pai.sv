// pai - physical attachment interface: the link between the MAC processor
// and the wireless PHY.
//
// Transmit path: software places a frame body in memory, writes TX_ADDR and
// TX_LEN and sets CTRL.tx_start (or arms CTRL.tx_on_tsf so that the start
// happens when the TSF reaches TSF_CMP). The transmit DMA fills the 64-byte
// transmit FIFO from memory while the transmit control machine powers up the
// PHY, waits for its ready signal and shifts the bytes out bit-serially,
// appending the CRC-32 FCS. Receive path: with CTRL.rx_enable set (directly,
// or by the TSF compare when CTRL.rx_on_tsf is armed), each frame
// the PHY delivers is shifted into bytes, checked by the receive CRC engine
// and passed through the 64-byte receive FIFO to memory at RX_ADDR by the
// receive DMA; at frame end (and once the FIFO has drained) STATUS.rx_done is
// set and RX_LEN holds the length, FCS included. The two DMA machines share
// one bus master port (receive first, so the receive FIFO cannot back up
// behind transmit traffic). The 64-bit TSF counter and the baseband/
// synthesiser serial interface are programmed through the same registers.
// Registers (system bus slave, addr[7:0]; all answer in one clock):
//  0x00 CTRL      [0] tx_start (self clearing) [1] rx_enable [2] tx_on_tsf
//                 [3] rx_on_tsf (rx_enable is set by the next TSF event)
//  0x04 STATUS    [0] tx_done [1] tx_underrun [2] rx_done [3] rx_crc_err
//                 [4] rx_overflow [5] tsf_event [6] ser_done (write 1 clears)
//                 [8] tx_busy [9] rx_active [10] ser_busy [11] dma_err
//  0x08 INT_EN    enables for STATUS[6:0] onto irq
//  0x0C TX_ADDR   0x10 TX_LEN   0x14 RX_ADDR   0x18 RX_MAXLEN
//  0x1C RX_LEN    (read only)
//  0x20 TSF_LO    0x24 TSF_HI   read the running TSF; a write to TSF_LO is
//                 held until TSF_HI is written, which loads both
//  0x28 TSF_CMP_LO 0x2C TSF_CMP_HI  writing TSF_CMP_HI arms the compare
//  0x30 SER_TX    0x34 SER_CTRL [5:0] nbits [6] target [15:8] div; a write
//                 starts a serial transfer   0x38 SER_RX (read only)
// The partition (FIFOs, DMA machines, control state machines, CRC engines,
// shift registers, registers, TSF, serial interface) and the FIFO size follow
// the document; the register map and PHY handshake are this design's.
module pai
  import mac_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int TICK_DIV   = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  asb_req_t s_req,
  output asb_rsp_t s_rsp,
  output logic     m_breq,
  input  logic     m_gnt,
  output asb_req_t m_req,
  input  asb_rsp_t m_rsp,
  output logic     irq,
  // PHY
  output logic     phy_tx_pe,
  input  logic     phy_tx_rdy,
  input  logic     phy_txclk,
  output logic     phy_txd,
  output logic     phy_rx_pe,
  input  logic     phy_md_rdy,
  input  logic     phy_rxclk,
  input  logic     phy_rxd,
  // serial programming interface
  output logic     ser_clk,
  output logic     ser_dout,
  input  logic     ser_din,
  output logic     bb_cs_n,
  output logic     syn_le
);

  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- registers ----------------
  logic        rx_enable_q, tx_on_tsf_q, rx_on_tsf_q;
  logic [6:0]  status_q, int_en_q;
  logic [31:0] tx_addr_q, rx_addr_q, tsf_lo_q, cmp_lo_q, ser_tx_q;
  logic [15:0] tx_len_q, rx_maxlen_q, rx_len_q;
  logic [5:0]  ser_nbits_q;
  logic        ser_target_q;
  logic [7:0]  ser_div_q;
  logic        dma_err;

  logic wr;
  assign wr = s_req.valid && s_req.write;

  // ---------------- submodules ----------------
  logic        tx_start, tx_busy, tx_done, tx_underrun;
  logic        txf_wr, txf_rd, txf_full, txf_empty;
  logic [7:0]  txf_wdata, txf_rdata;
  logic [CW-1:0] txf_count;

  logic        rxf_wr, rxf_rd, rxf_full, rxf_empty;
  logic [7:0]  rxf_wdata, rxf_rdata;
  logic [CW-1:0] rxf_count;
  logic        rx_start, rx_end, rx_crc_ok, rx_ovf, rx_long, rx_active;
  logic [15:0] rx_len;
  logic        rx_wait_drain;

  logic [63:0] tsf;
  logic        tsf_load, tsf_arm, tsf_armed, tsf_event;

  logic        ser_start, ser_busy, ser_done;
  logic [31:0] ser_rx;

  logic        txd_breq, txd_gnt, rxd_breq, rxd_gnt, txd_err, rxd_err, txd_busy, rxd_busy;
  asb_req_t    txd_req, rxd_req;
  logic [15:0] txd_count, rxd_count;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_txfifo (
    .clk, .rst_n, .flush(tx_start), .wr_en(txf_wr), .wdata(txf_wdata), .rd_en(txf_rd),
    .rdata(txf_rdata), .full(txf_full), .empty(txf_empty), .count(txf_count));

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_rxfifo (
    .clk, .rst_n, .flush(rx_start), .wr_en(rxf_wr), .wdata(rxf_wdata), .rd_en(rxf_rd),
    .rdata(rxf_rdata), .full(rxf_full), .empty(rxf_empty), .count(rxf_count));

  pai_dma #(.TO_MEM(1'b0)) u_txdma (
    .clk, .rst_n, .start(tx_start), .stop(tx_underrun), .addr(tx_addr_q), .len(tx_len_q),
    .busy(txd_busy), .err(txd_err), .count(txd_count),
    .fifo_wr(txf_wr), .fifo_wdata(txf_wdata), .fifo_full(txf_full),
    .fifo_rd(), .fifo_rdata(8'h00), .fifo_empty(1'b1),
    .m_breq(txd_breq), .m_gnt(txd_gnt), .m_req(txd_req), .m_rsp(m_rsp));

  pai_dma #(.TO_MEM(1'b1)) u_rxdma (
    .clk, .rst_n, .start(rx_start), .stop(1'b0), .addr(rx_addr_q), .len(rx_maxlen_q),
    .busy(rxd_busy), .err(rxd_err), .count(rxd_count),
    .fifo_wr(), .fifo_wdata(), .fifo_full(1'b0),
    .fifo_rd(rxf_rd), .fifo_rdata(rxf_rdata), .fifo_empty(rxf_empty),
    .m_breq(rxd_breq), .m_gnt(rxd_gnt), .m_req(rxd_req), .m_rsp(m_rsp));

  pai_tx_ctrl u_txctrl (
    .clk, .rst_n, .start(tx_start), .len(tx_len_q),
    .fifo_rdata(txf_rdata), .fifo_empty(txf_empty), .fifo_rd(txf_rd),
    .phy_tx_pe, .phy_tx_rdy, .phy_txclk, .phy_txd,
    .busy(tx_busy), .done(tx_done), .underrun(tx_underrun));

  pai_rx_ctrl u_rxctrl (
    .clk, .rst_n, .enable(rx_enable_q), .max_len(rx_maxlen_q),
    .phy_rx_pe, .phy_md_rdy, .phy_rxclk, .phy_rxd,
    .fifo_full(rxf_full), .fifo_wr(rxf_wr), .fifo_wdata(rxf_wdata),
    .frame_start(rx_start), .frame_end(rx_end), .len(rx_len), .crc_ok(rx_crc_ok),
    .overflow(rx_ovf), .too_long(rx_long), .active(rx_active));

  tsf_timer #(.TICK_DIV(TICK_DIV)) u_tsf (
    .clk, .rst_n, .load(tsf_load), .load_value({s_req.wdata, tsf_lo_q}),
    .arm(tsf_arm), .cmp_value({s_req.wdata, cmp_lo_q}),
    .tsf, .armed(tsf_armed), .event_o(tsf_event));

  pai_serial_if u_ser (
    .clk, .rst_n, .start(ser_start), .target(ser_target_q), .nbits(ser_nbits_q), .div(ser_div_q),
    .tx_data(ser_tx_q), .rx_data(ser_rx), .busy(ser_busy), .done(ser_done),
    .ser_clk, .ser_dout, .ser_din, .bb_cs_n, .syn_le);

  // ---------------- master port sharing (receive first) ----------------
  logic sel_rx_q, sel_rx_d;
  always_comb begin
    sel_rx_d = sel_rx_q;
    if (!(sel_rx_q ? rxd_breq : txd_breq)) sel_rx_d = rxd_breq;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel_rx_q <= 1'b0;
    else        sel_rx_q <= sel_rx_d;

  assign m_breq  = sel_rx_q ? rxd_breq : txd_breq;
  assign m_req   = sel_rx_q ? rxd_req  : txd_req;
  assign rxd_gnt = m_gnt &&  sel_rx_q;
  assign txd_gnt = m_gnt && !sel_rx_q;

  // ---------------- control ----------------
  logic sw_tx_start;
  assign sw_tx_start = wr && s_req.addr[7:0] == 8'h00 && s_req.wdata[0];
  assign tx_start    = !tx_busy && (sw_tx_start || (tx_on_tsf_q && tsf_event));
  assign tsf_load    = wr && s_req.addr[7:0] == 8'h24;
  assign tsf_arm     = wr && s_req.addr[7:0] == 8'h2C;
  assign ser_start   = wr && s_req.addr[7:0] == 8'h34 && !ser_busy;
  assign dma_err     = txd_err || rxd_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_enable_q   <= 1'b0;
      tx_on_tsf_q   <= 1'b0;
      rx_on_tsf_q   <= 1'b0;
      status_q      <= '0;
      int_en_q      <= '0;
      tx_addr_q     <= '0;
      rx_addr_q     <= '0;
      tsf_lo_q      <= '0;
      cmp_lo_q      <= '0;
      ser_tx_q      <= '0;
      tx_len_q      <= '0;
      rx_maxlen_q   <= 16'd2346;
      rx_len_q      <= '0;
      ser_nbits_q   <= 6'd16;
      ser_target_q  <= 1'b0;
      ser_div_q     <= 8'd4;
      rx_wait_drain <= 1'b0;
    end else begin
      if (wr) begin
        unique case (s_req.addr[7:0])
          8'h00: begin
            rx_enable_q <= s_req.wdata[1];
            tx_on_tsf_q <= s_req.wdata[2];
            rx_on_tsf_q <= s_req.wdata[3];
          end
          8'h04: status_q <= status_q & ~s_req.wdata[6:0];
          8'h08: int_en_q <= s_req.wdata[6:0];
          8'h0C: tx_addr_q <= s_req.wdata;
          8'h10: tx_len_q <= s_req.wdata[15:0];
          8'h14: rx_addr_q <= s_req.wdata;
          8'h18: rx_maxlen_q <= s_req.wdata[15:0];
          8'h20: tsf_lo_q <= s_req.wdata;
          8'h28: cmp_lo_q <= s_req.wdata;
          8'h30: ser_tx_q <= s_req.wdata;
          8'h34: if (!ser_busy) begin
            ser_nbits_q  <= s_req.wdata[5:0];
            ser_target_q <= s_req.wdata[6];
            ser_div_q    <= s_req.wdata[15:8];
          end
          default: ;
        endcase
      end
      // The TSF-triggered starts are one-shots.
      if (tx_on_tsf_q && tsf_event) tx_on_tsf_q <= 1'b0;
      if (rx_on_tsf_q && tsf_event) begin
        rx_on_tsf_q <= 1'b0;
        rx_enable_q <= 1'b1;
      end
      // Events.
      if (tx_done)     status_q[0] <= 1'b1;
      if (tx_underrun) status_q[1] <= 1'b1;
      if (tsf_event)   status_q[5] <= 1'b1;
      if (ser_done)    status_q[6] <= 1'b1;
      if (rx_end) begin
        rx_len_q      <= rx_len;
        rx_wait_drain <= 1'b1;
      end
      if (rx_wait_drain && rxd_count == rx_len_q && rxf_empty && !rxd_req.valid) begin
        rx_wait_drain <= 1'b0;
        status_q[2]   <= 1'b1;
        if (!rx_crc_ok)          status_q[3] <= 1'b1;
        if (rx_ovf || rx_long)   status_q[4] <= 1'b1;
      end
    end
  end

  assign irq = |(status_q & int_en_q);

  always_comb begin
    s_rsp       = ASB_RSP_IDLE;
    s_rsp.ready = s_req.valid;
    unique case (s_req.addr[7:0])
      8'h00: s_rsp.rdata = {28'd0, rx_on_tsf_q, tx_on_tsf_q, rx_enable_q, 1'b0};
      8'h04: s_rsp.rdata = {20'd0, dma_err, ser_busy, rx_active, tx_busy, 1'b0, status_q};
      8'h08: s_rsp.rdata = {25'd0, int_en_q};
      8'h0C: s_rsp.rdata = tx_addr_q;
      8'h10: s_rsp.rdata = {16'd0, tx_len_q};
      8'h14: s_rsp.rdata = rx_addr_q;
      8'h18: s_rsp.rdata = {16'd0, rx_maxlen_q};
      8'h1C: s_rsp.rdata = {16'd0, rx_len_q};
      8'h20: s_rsp.rdata = tsf[31:0];
      8'h24: s_rsp.rdata = tsf[63:32];
      8'h28: s_rsp.rdata = cmp_lo_q;
      8'h2C: s_rsp.rdata = {31'd0, tsf_armed};
      8'h30: s_rsp.rdata = ser_tx_q;
      8'h34: s_rsp.rdata = {16'd0, ser_div_q, 1'b0, ser_target_q, ser_nbits_q};
      8'h38: s_rsp.rdata = ser_rx;
      default: s_rsp.rdata = '0;
    endcase
  end

endmodule
