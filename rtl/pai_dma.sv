// pai_dma - DMA machine between a PAI FIFO and memory (system bus master).
//
// TO_MEM = 0 (transmit): after start it reads len bytes from memory at addr,
// addr+1, ... and pushes them into the FIFO whenever the FIFO has room.
// TO_MEM = 1 (receive): after start it pops every byte the FIFO holds and
// writes it to memory at addr, addr+1, ... until stop; count tells how many
// bytes it has written since start.
// Each byte is one bus tenure: m_breq is raised, the transfer is issued once
// m_gnt is seen, and the request is dropped after the transfer completes, so
// other masters may use the bus between bytes. A bus error ends the run and
// sets err. busy is high while the machine has work (transmit) or is enabled
// (receive).
// The two DMA machines and their master state machines are the document's;
// the byte-per-tenure policy is this design's.
module pai_dma
  import mac_pkg::*;
#(
  parameter bit TO_MEM = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic [31:0] addr,
  input  logic [15:0] len,
  output logic        busy,
  output logic        err,
  output logic [15:0] count,
  // FIFO side
  output logic        fifo_wr,
  output logic [7:0]  fifo_wdata,
  input  logic        fifo_full,
  output logic        fifo_rd,
  input  logic [7:0]  fifo_rdata,
  input  logic        fifo_empty,
  // bus master
  output logic        m_breq,
  input  logic        m_gnt,
  output asb_req_t    m_req,
  input  asb_rsp_t    m_rsp
);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_XFER} state_e;
  state_e state;

  logic [31:0] addr_q;
  logic [15:0] len_q;
  logic [7:0]  wbyte;
  logic        done_xfer;

  assign done_xfer = (state == ST_XFER) && m_req.valid && m_rsp.ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      addr_q <= '0;
      len_q  <= '0;
      count  <= '0;
      wbyte  <= '0;
      err    <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE:
          if (start) begin
            addr_q <= addr;
            len_q  <= len;
            count  <= '0;
            err    <= 1'b0;
            state  <= ST_RUN;
          end
        ST_RUN:
          if (start) begin
            addr_q <= addr;
            len_q  <= len;
            count  <= '0;
            err    <= 1'b0;
          end else if (stop) state <= ST_IDLE;
          else if (TO_MEM) begin
            if (!fifo_empty) begin
              wbyte <= TO_MEM ? fifo_rdata : 8'h00;
              state <= ST_XFER;
            end
          end else begin
            if (count == len_q)  state <= ST_IDLE;
            else if (!fifo_full) state <= ST_XFER;
          end
        default:   // ST_XFER
          if (done_xfer) begin
            count <= count + 1'b1;
            if (m_rsp.error) begin
              err   <= 1'b1;
              state <= ST_IDLE;
            end else state <= ST_RUN;
          end
      endcase
    end
  end

  assign busy       = (state != ST_IDLE);
  assign m_breq     = (state == ST_XFER);
  assign fifo_rd    = TO_MEM && (state == ST_RUN) && !start && !stop && !fifo_empty;
  assign fifo_wr    = !TO_MEM && done_xfer && !m_rsp.error;
  assign fifo_wdata = m_rsp.rdata[7:0];

  always_comb begin
    m_req       = ASB_REQ_IDLE;
    m_req.valid = (state == ST_XFER) && m_gnt;
    m_req.write = TO_MEM;
    m_req.size  = SZ_BYTE;
    m_req.addr  = addr_q + 32'(count);
    m_req.wdata = TO_MEM ? {24'd0, wbyte} : 32'd0;
  end

endmodule
