// pai_rx_ctrl - receive control state machine, shift register and receive
// CRC of the physical attachment interface.
//
// While enable is high the PHY's receive path is powered (phy_rx_pe). A frame
// lasts while the PHY asserts phy_md_rdy (it has found a valid header); the
// PHY raises phy_md_rdy together with the first data bit, so the first rising
// edge of phy_rxclk while it is high carries bit 0 of the first byte. Each
// rising edge of the PHY bit clock phy_rxclk shifts phy_rxd into a byte (least
// significant bit first) and into the CRC-32 engine; every complete byte is
// pushed into the receive FIFO, FCS included. If the FIFO is full the byte is
// lost and overflow is flagged; bytes beyond max_len are dropped and flagged
// as too_long. When phy_md_rdy falls, frame_end pulses with len (bytes
// received, FCS included), crc_ok (the CRC register shows the residue of an
// intact frame) and the error flags. frame_start pulses when a frame begins.
// PHY signals are synchronised with two flip-flops, the same delay for all.
// The blocks are the document's; the PHY handshake and error rules are this
// design's.
module pai_rx_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] max_len,
  output logic        phy_rx_pe,
  input  logic        phy_md_rdy,
  input  logic        phy_rxclk,
  input  logic        phy_rxd,
  input  logic        fifo_full,
  output logic        fifo_wr,
  output logic [7:0]  fifo_wdata,
  output logic        frame_start,
  output logic        frame_end,
  output logic [15:0] len,
  output logic        crc_ok,
  output logic        overflow,
  output logic        too_long,
  output logic        active
);

  logic [1:0] clk_s, rdy_s, d_s;
  logic       edge_q, rdy_rise, rdy_fall;
  logic [7:0] sh, sh_next;
  logic [2:0] bitcnt;
  logic       crc_init, crc_en;
  logic [31:0] crc;
  logic       res_ok;

  crc32_serial u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(d_s[1]), .crc, .residue_ok(res_ok));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clk_s <= '0;
      rdy_s <= '0;
      d_s   <= '0;
    end else begin
      clk_s <= {clk_s[0], phy_rxclk};
      rdy_s <= {rdy_s[0], phy_md_rdy && enable};
      d_s   <= {d_s[0], phy_rxd};
    end

  assign edge_q   = clk_s[0] && !clk_s[1];
  assign rdy_rise = rdy_s[0] && !rdy_s[1];
  assign rdy_fall = !rdy_s[0] && rdy_s[1];
  assign sh_next  = {d_s[1], sh[7:1]};

  assign crc_init    = rdy_rise;
  assign crc_en      = active && rdy_s[0] && edge_q;
  assign frame_start = rdy_rise;
  assign fifo_wdata  = sh_next;
  assign fifo_wr     = crc_en && bitcnt == 3'd7 && !fifo_full && len < max_len;
  assign phy_rx_pe   = enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      sh        <= '0;
      bitcnt    <= '0;
      len       <= '0;
      crc_ok    <= 1'b0;
      overflow  <= 1'b0;
      too_long  <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      if (rdy_rise) begin
        active   <= 1'b1;
        bitcnt   <= '0;
        len      <= '0;
        overflow <= 1'b0;
        too_long <= 1'b0;
      end else if (active) begin
        if (crc_en) begin
          sh     <= sh_next;
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'd7) begin
            if (len >= max_len)  too_long <= 1'b1;
            else if (fifo_full)  overflow <= 1'b1;
            else                 len      <= len + 1'b1;
          end
        end
        if (rdy_fall) begin
          active    <= 1'b0;
          crc_ok    <= res_ok;
          frame_end <= 1'b1;
        end
      end
    end
  end

endmodule
