// timers - two independent 32-bit down counters on the peripheral bus.
//
// Each timer has its own prescaler: a tick occurs every (PRESCALE+1) system
// clocks, so at a 20 MHz clock and PRESCALE = 0 time is measured in 50 ns
// steps. While enabled the counter VALUE drops by one per tick; the tick that
// would take it to zero sets the timer's expired flag and either reloads LOAD
// (periodic mode) or stops the timer (one-shot). An expired timer with its
// interrupt enabled drives irq[i] until software clears the flag. Thus a timer
// started with LOAD = N expires N*(PRESCALE+1) clocks after it was enabled.
// Registers, timer i at paddr[11:0] = 0x10*i + offset:
//   0x0 LOAD (writing it also loads VALUE and restarts the prescaler)
//   0x4 VALUE (read only)  0x8 CTRL [0] enable [1] periodic [2] irq enable
//   0xC PRESCALE [15:0]
// and 0x20 STATUS: bit i = expired flag of timer i, write 1 to clear.
// Counters count with the system clock; register accesses happen on the APB
// strobe (psel & penable & pclk_en). The two 32-bit counters, independent
// prescaling and 50 ns accuracy are the document's; the rest is this design's.
module timers #(
  parameter int NTIM = 2,
  parameter int CW   = 32,
  parameter int PW   = 16
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
  output logic [NTIM-1:0] irq
);

  logic [CW-1:0] load_q  [NTIM];
  logic [CW-1:0] value_q [NTIM];
  logic [PW-1:0] pre_q   [NTIM];
  logic [PW-1:0] pcnt_q  [NTIM];
  logic [2:0]    ctrl_q  [NTIM];
  logic [NTIM-1:0] flag_q;
  logic wr;

  assign wr = psel && penable && pwrite && pclk_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTIM; i++) begin
        load_q[i]  <= '0;
        value_q[i] <= '0;
        pre_q[i]   <= '0;
        pcnt_q[i]  <= '0;
        ctrl_q[i]  <= '0;
      end
      flag_q <= '0;
    end else begin
      for (int i = 0; i < NTIM; i++) begin
        if (ctrl_q[i][0]) begin
          if (pcnt_q[i] != 0) pcnt_q[i] <= pcnt_q[i] - 1'b1;
          else begin
            pcnt_q[i] <= pre_q[i];
            if (value_q[i] <= 1) begin
              flag_q[i] <= 1'b1;
              if (ctrl_q[i][1]) value_q[i] <= load_q[i];
              else begin
                value_q[i]   <= '0;
                ctrl_q[i][0] <= 1'b0;
              end
            end else value_q[i] <= value_q[i] - 1'b1;
          end
        end
        if (wr && paddr[11:8] == 4'h0 && paddr[7:4] == 4'(i)) begin
          unique case (paddr[3:0])
            4'h0: begin
              load_q[i]  <= pwdata[CW-1:0];
              value_q[i] <= pwdata[CW-1:0];
              pcnt_q[i]  <= pre_q[i];
            end
            4'h8: begin
              ctrl_q[i] <= pwdata[2:0];
              if (pwdata[0] && !ctrl_q[i][0]) pcnt_q[i] <= pre_q[i];
            end
            4'hC: pre_q[i] <= pwdata[PW-1:0];
            default: ;
          endcase
        end
      end
      if (wr && paddr[11:0] == 12'h020) flag_q <= flag_q & ~pwdata[NTIM-1:0];
    end
  end

  always_comb
    for (int i = 0; i < NTIM; i++) irq[i] = flag_q[i] && ctrl_q[i][2];

  always_comb begin
    prdata = '0;
    if (paddr[11:0] == 12'h020) prdata = 32'(flag_q);
    else
      for (int i = 0; i < NTIM; i++)
        if (paddr[11:4] == 8'(i))
          unique case (paddr[3:0])
            4'h0: prdata = 32'(load_q[i]);
            4'h4: prdata = 32'(value_q[i]);
            4'h8: prdata = 32'(ctrl_q[i]);
            4'hC: prdata = 32'(pre_q[i]);
            default: ;
          endcase
  end

endmodule
