// apb_bridge - system bus slave to peripheral bus (APB) bridge.
//
// The slow peripherals (timers, interrupt controller) sit on an APB that runs
// at 1/DIV of the system clock. The bridge produces pclk_en, a one-clock
// strobe every DIV clocks that marks a rising edge of the peripheral clock;
// peripherals are clocked by clk and act only in strobe cycles, so the design
// stays in one clock domain. A bus transfer is carried out as an APB setup
// phase (psel) and an enable phase (psel + penable), each one peripheral clock
// long and starting on a strobe. The peripheral performs the access on the
// strobe that ends the enable phase (psel & penable & pclk_en), in which the
// bridge also samples prdata; one clock later it answers ready. paddr[15:12]
// selects the peripheral (0 = interrupt controller, 1 = timers), paddr[11:0]
// the register. Other peripheral numbers end in error without an APB cycle.
// The 1/3 clock ratio is the document's; the phase timing is this design's.
module apb_bridge
  import mac_pkg::*;
#(
  parameter int DIV = 3,
  parameter int NP  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  asb_req_t    s_req,
  output asb_rsp_t    s_rsp,
  output logic        pclk_en,
  output logic [15:0] paddr,
  output logic [NP-1:0] psel,
  output logic        penable,
  output logic        pwrite,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata [NP]
);

  typedef enum logic [2:0] {ST_IDLE, ST_SETUP, ST_ENABLE, ST_RESP, ST_ERR} state_e;
  state_e state;

  logic [$clog2(DIV)-1:0] div_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                      div_cnt <= '0;
    else if (div_cnt == DIV[$clog2(DIV)-1:0] - 1'b1) div_cnt <= '0;
    else                             div_cnt <= div_cnt + 1'b1;
  assign pclk_en = (div_cnt == DIV[$clog2(DIV)-1:0] - 1'b1);

  logic [3:0]  pnum;
  logic [31:0] rdata_q;
  assign pnum = s_req.addr[15:12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      rdata_q <= '0;
    end else begin
      unique case (state)
        ST_IDLE:
          if (s_req.valid) begin
            if (int'(pnum) >= NP) state <= ST_ERR;
            else if (pclk_en)     state <= ST_SETUP;
          end
        ST_SETUP:  if (pclk_en) state <= ST_ENABLE;
        ST_ENABLE: if (pclk_en) begin
          rdata_q <= prdata[pnum[$clog2(NP)-1:0]];
          state   <= ST_RESP;
        end
        default:   state <= ST_IDLE;   // ST_RESP, ST_ERR
      endcase
    end
  end

  always_comb begin
    paddr   = s_req.addr[15:0];
    pwrite  = s_req.write;
    pwdata  = s_req.wdata;
    penable = (state == ST_ENABLE);
    psel    = '0;
    if (state == ST_SETUP || state == ST_ENABLE) psel[pnum[$clog2(NP)-1:0]] = 1'b1;
    s_rsp       = ASB_RSP_IDLE;
    s_rsp.ready = (state == ST_RESP) || (state == ST_ERR);
    s_rsp.error = (state == ST_ERR);
    s_rsp.rdata = rdata_q;
  end

endmodule
