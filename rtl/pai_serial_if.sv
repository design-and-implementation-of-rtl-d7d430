// pai_serial_if - baseband and synthesiser serial programming state machine.
//
// Writes (and reads back) control registers of the radio's baseband processor
// and frequency synthesiser over a three-wire serial link. start sends the
// nbits (1..32) lowest bits of tx_data, most significant first, on ser_dout;
// ser_dout changes while ser_clk is low and both devices sample on the rising
// edge, where ser_din is also sampled into rx_data (a baseband register read
// returns its bits in the clock cycles after the address). Each half period
// of ser_clk lasts div+1 clocks. The target selects the chip select:
// target 0 holds bb_cs_n low for the whole transfer; target 1 (synthesiser)
// leaves it high and pulses syn_le for one ser_clk period afterwards to latch
// the word. done pulses at the end.
// The document names this state machine and asks for a glueless serial
// interface; the framing is this design's.
module pai_serial_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        target,
  input  logic [5:0]  nbits,
  input  logic [7:0]  div,
  input  logic [31:0] tx_data,
  output logic [31:0] rx_data,
  output logic        busy,
  output logic        done,
  output logic        ser_clk,
  output logic        ser_dout,
  input  logic        ser_din,
  output logic        bb_cs_n,
  output logic        syn_le
);

  typedef enum logic [2:0] {ST_IDLE, ST_LO, ST_HI, ST_LE, ST_END} state_e;
  state_e state;

  logic [31:0] sh;
  logic [5:0]  left;
  logic [8:0]  cnt;
  logic [7:0]  div_q;
  logic        target_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      sh       <= '0;
      left     <= '0;
      cnt      <= '0;
      div_q    <= '0;
      target_q <= 1'b0;
      rx_data  <= '0;
    end else begin
      unique case (state)
        ST_IDLE:
          if (start) begin
            sh       <= tx_data << (6'd32 - ((nbits == 0) ? 6'd32 : nbits));
            left     <= (nbits == 0 || nbits > 32) ? 6'd32 : nbits;
            div_q    <= div;
            target_q <= target;
            rx_data  <= '0;
            cnt      <= '0;
            state    <= ST_LO;
          end
        ST_LO:
          if (cnt == 9'(div_q)) begin
            cnt     <= '0;
            rx_data <= {rx_data[30:0], ser_din};
            state   <= ST_HI;
          end else cnt <= cnt + 1'b1;
        ST_HI:
          if (cnt == 9'(div_q)) begin
            cnt  <= '0;
            sh   <= sh << 1;
            left <= left - 1'b1;
            if (left == 6'd1) state <= target_q ? ST_LE : ST_END;
            else              state <= ST_LO;
          end else cnt <= cnt + 1'b1;
        ST_LE:
          if (cnt == {div_q, 1'b1}) state <= ST_END;
          else cnt <= cnt + 1'b1;
        default: state <= ST_IDLE;   // ST_END
      endcase
    end
  end

  assign ser_clk  = (state == ST_HI);
  assign ser_dout = (state == ST_LO || state == ST_HI) ? sh[31] : 1'b0;
  assign bb_cs_n  = !((state == ST_LO || state == ST_HI) && !target_q);
  assign syn_le   = (state == ST_LE);
  assign busy     = (state != ST_IDLE);
  assign done     = (state == ST_END);

endmodule
