// phy_model - behavioural bit-level model of the radio's baseband processor
// as seen by the PAI. Both bit clocks run continuously with a period of
// 2*HALF system clocks.
// Transmit: PREAMBLE clocks after phy_tx_pe rises (time for the PLCP
// preamble and header), tx_rdy is raised at a falling edge of txclk; from the
// next rising edge on, txd is sampled on every rising edge until tx_pe
// drops. The bits, grouped LSB first into bytes, are stored as one frame in
// tx_frames.
// Receive: send_frame(bytes) raises md_rdy together with the first bit at a
// falling edge of rxclk, drives the bits LSB first on rxd at falling edges
// (the MAC samples at rising edges) and drops md_rdy at the falling edge
// after the last bit.
module phy_model #(
  parameter int HALF     = 5,
  parameter int PREAMBLE = 40
) (
  input  logic clk,
  input  logic tx_pe,
  input  logic txd,
  output logic tx_rdy,
  output logic txclk,
  input  logic rx_pe,
  output logic md_rdy,
  output logic rxclk,
  output logic rxd
);
  import tb_pkg::*;

  bytes_t tx_frames[$];
  int     tx_bits_total = 0;
  int     cnt = 0;
  logic   fall, rise;

  initial begin
    tx_rdy = 0; txclk = 0; rxclk = 0; md_rdy = 0; rxd = 0;
  end

  // Free-running bit clocks.
  always @(posedge clk) begin
    cnt <= (cnt == 2 * HALF - 1) ? 0 : cnt + 1;
    txclk <= (cnt >= HALF - 1 && cnt != 2 * HALF - 1);
    rxclk <= (cnt >= HALF - 1 && cnt != 2 * HALF - 1);
  end
  assign rise = (cnt == HALF - 1);        // txclk rises at this edge
  assign fall = (cnt == 2 * HALF - 1);    // txclk falls at this edge

  // Transmit side: 0 idle, 1 preamble, 2 wait for a falling edge, 3 data.
  int     tx_st = 0, tx_wait = 0;
  bit     bits[$];
  always @(posedge clk) begin
    case (tx_st)
      0: if (tx_pe) begin tx_st = 1; tx_wait = PREAMBLE; bits.delete(); end
      1: if (!tx_pe) tx_st = 0; else if (tx_wait > 0) tx_wait--; else tx_st = 2;
      2: if (!tx_pe) tx_st = 0; else if (fall) begin tx_rdy <= 1; tx_st = 3; end
      default:
        if (!tx_pe) begin
          bytes_t fr;
          tx_rdy <= 0;
          fr.delete();
          tx_st = 0;
          for (int i = 0; i + 8 <= bits.size(); i += 8) begin
            byte unsigned b;
            for (int k = 0; k < 8; k++) b[k] = bits[i + k];
            fr.push_back(b);
          end
          tx_bits_total += bits.size();
          if (bits.size() != 0) tx_frames.push_back(fr);
        end else if (rise) bits.push_back(txd);
    endcase
  end

  // Receive side.
  task automatic send_frame(input bytes_t data);
    wait (rx_pe);
    foreach (data[n])
      for (int k = 0; k < 8; k++) begin
        @(posedge clk iff fall);
        md_rdy <= 1;
        rxd <= data[n][k];
      end
    @(posedge clk iff fall);
    md_rdy <= 0;
  endtask

endmodule
