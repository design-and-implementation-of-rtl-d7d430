// pai_tx_ctrl - transmit control state machine, shift register and transmit
// CRC of the physical attachment interface.
//
// start begins a frame of len bytes (the FCS is added here): the PHY's
// transmit path is powered up (phy_tx_pe) and the machine waits for the PHY
// to report that it has sent its preamble and header (phy_tx_rdy). From then
// on every rising edge of the PHY bit clock phy_txclk consumes the bit on
// phy_txd: bytes come from the transmit FIFO and leave least significant bit
// first, each bit also feeding the CRC-32 engine; after the last data bit the
// 32 FCS bits follow. The machine starts on a rising edge of phy_tx_rdy, so a
// ready signal left over from the previous frame is ignored. The PHY raises phy_tx_rdy at a falling edge of
// phy_txclk and takes the first bit at the next rising edge; each new bit is
// presented within four clocks of the edge that took the previous one, so a
// bit clock period of ten system clocks (2 Mbit/s at 20 MHz) is enough. If the FIFO is empty when a
// byte is needed the frame is aborted (underrun pulse). done pulses after the
// last FCS bit; phy_tx_pe drops at the same time.
// The PHY signals are synchronised to clk (two flip-flops).
// The blocks are the document's; the PHY handshake, bit order and abort rule
// are this design's (bit order and FCS as in IEEE 802.11).
module pai_tx_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] len,
  input  logic [7:0]  fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  output logic        phy_tx_pe,
  input  logic        phy_tx_rdy,
  input  logic        phy_txclk,
  output logic        phy_txd,
  output logic        busy,
  output logic        done,
  output logic        underrun
);

  typedef enum logic [2:0] {ST_IDLE, ST_WAIT_RDY, ST_LOAD, ST_SHIFT, ST_FCS, ST_END} state_e;
  state_e state;

  logic [1:0]  clk_s;
  logic [2:0]  rdy_s;
  logic        edge_q;
  logic [7:0]  sh;
  logic [2:0]  bitcnt;
  logic [4:0]  fidx;
  logic [15:0] bytecnt, len_q;
  logic        crc_init, crc_en;
  logic [31:0] crc;
  logic        unused_res;

  crc32_serial u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(sh[0]), .crc, .residue_ok(unused_res));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clk_s <= '0;
      rdy_s <= '0;
    end else begin
      clk_s <= {clk_s[0], phy_txclk};
      rdy_s <= {rdy_s[1:0], phy_tx_rdy};
    end

  // Rising edge of the synchronised bit clock.
  always_comb edge_q = clk_s[0] && !clk_s[1];

  assign crc_init = start && state == ST_IDLE;
  assign crc_en   = (state == ST_SHIFT) && edge_q;
  assign fifo_rd  = (state == ST_LOAD) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      sh      <= '0;
      bitcnt  <= '0;
      fidx    <= '0;
      bytecnt <= '0;
      len_q   <= '0;
    end else begin
      unique case (state)
        ST_IDLE:
          if (start) begin
            len_q   <= len;
            bytecnt <= '0;
            state   <= ST_WAIT_RDY;
          end
        ST_WAIT_RDY:
          if (rdy_s[1] && !rdy_s[2]) state <= (len_q == 0) ? ST_FCS : ST_LOAD;
        ST_LOAD:
          if (fifo_empty) state <= ST_END;
          else begin
            sh     <= fifo_rdata;
            bitcnt <= '0;
            state  <= ST_SHIFT;
          end
        ST_SHIFT:
          if (edge_q) begin
            sh     <= sh >> 1;
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) begin
              bytecnt <= bytecnt + 1'b1;
              if (bytecnt + 1'b1 == len_q) begin
                fidx  <= '0;
                state <= ST_FCS;
              end else state <= ST_LOAD;
            end
          end
        ST_FCS:
          if (edge_q) begin
            fidx <= fidx + 1'b1;
            if (fidx == 5'd31) state <= ST_END;
          end
        default: state <= ST_IDLE;   // ST_END
      endcase
    end
  end

  always_comb begin
    phy_tx_pe = (state != ST_IDLE) && (state != ST_END);
    phy_txd   = (state == ST_FCS) ? ~crc[fidx] : sh[0];
    busy      = (state != ST_IDLE);
    done      = (state == ST_END) && (bytecnt == len_q);
    underrun  = (state == ST_END) && (bytecnt != len_q);
  end

endmodule
