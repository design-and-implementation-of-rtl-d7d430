// tsf_timer - 64-bit timing synchronisation function (TSF) counter.
//
// Counts microseconds, as the 802.11 TSF does: the count advances by one every
// TICK_DIV clocks (20 at the 20 MHz system clock). Software may load a new
// value (load, load_value), for instance to adopt the timestamp of a received
// beacon; the prescaler restarts then. A compare value armed with arm makes
// event pulse for one clock at the tick on which the counter reaches it; the
// compare then disarms. The PAI uses the event to start a prepared
// transmission at a given TSF time and as an interrupt source.
// The 64-bit counter and its use for TSF-based transmit automation are the
// document's; the microsecond tick and the compare are this design's.
module tsf_timer #(
  parameter int TICK_DIV = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] load_value,
  input  logic        arm,
  input  logic [63:0] cmp_value,
  output logic [63:0] tsf,
  output logic        armed,
  output logic        event_o
);

  logic [$clog2(TICK_DIV)-1:0] pre;
  logic [63:0] cmp_q;
  logic        tick;

  assign tick = (pre == $clog2(TICK_DIV)'(TICK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre     <= '0;
      tsf     <= '0;
      cmp_q   <= '0;
      armed   <= 1'b0;
      event_o <= 1'b0;
    end else begin
      event_o <= 1'b0;
      if (load) begin
        tsf <= load_value;
        pre <= '0;
      end else begin
        pre <= tick ? '0 : pre + 1'b1;
        if (tick) begin
          tsf <= tsf + 1'b1;
          if (armed && tsf + 1'b1 >= cmp_q) begin
            event_o <= 1'b1;
            armed   <= 1'b0;
          end
        end
      end
      if (arm) begin
        cmp_q <= cmp_value;
        armed <= 1'b1;
      end
    end
  end

endmodule
