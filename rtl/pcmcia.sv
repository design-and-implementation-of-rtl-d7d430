// pcmcia - PCMCIA host interface of the MAC processor.
//
// The host side is an 8-bit PC Card bus (card enable, output enable, write
// enable, REG# for attribute space, WAIT# and IREQ#). The system bus side has
// a master port, through which the host reads and writes the MAC processor's
// memory space, and a slave port with the registers shared with the ARM.
//
// Host registers (common space, REG# high, host_addr[2:0]):
//   0-3 PTR byte 0..3: 32-bit MAC address pointer for DATA
//   4   DATA: a read or write performs a byte transfer at PTR on the system
//       bus and then increments PTR; WAIT# is held low until it completes
//   5   MBOX: read = mailbox written by the ARM; write = mailbox to the ARM,
//       which also raises the interrupt to the ARM (irq)
//   6   INT: read [0] = ARM-to-host interrupt pending; write 1 to [0] clears it
// Attribute space (REG# low): the card information structure (CIS) that
// plug-and-play software reads first, one tuple byte at each even address
// from 0, and the configuration option register at 0x3F8 (COR, [5:0]
// configuration index, [7] soft reset). IREQ# is driven only while the
// configuration index is non-zero. The CIS is a minimal tuple chain:
//   CISTPL_DEVICE (no common memory), CISTPL_CONFIG (configuration registers
//   at 0x3F8, only the COR present, last index 1), CISTPL_CFTABLE_ENTRY
//   (configuration 1, the default), CISTPL_END.
// The tuple codes follow the PC Card standard; which tuples are present is
// this design's choice.
// ARM registers (system bus slave, addr[7:0]): 0x00 TO_HOST (a write fills the
// host's mailbox and raises IREQ#), 0x04 FROM_HOST (read only), 0x08 INT
// [0] host-to-ARM pending (write 1 clears) [1] ARM-to-host pending (read only),
// 0x0C COR (read only).
// Host strobes are synchronised with two flip-flops; an access is acted upon
// two clocks after its strobe falls. WAIT# is formed combinationally from the
// strobes so that it is valid as soon as a DATA access begins.
// The document gives the split into a host part and a bus master/slave part
// that talk through one-way registers and interrupts; the register map is
// this design's. The card information structure read by plug-and-play
// software holds only the tuples needed to find and write the COR.
module pcmcia
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host bus
  input  logic [9:0] host_addr,
  input  logic [7:0] host_din,
  output logic [7:0] host_dout,
  output logic       host_dout_oe,
  input  logic       host_ce_n,
  input  logic       host_oe_n,
  input  logic       host_we_n,
  input  logic       host_reg_n,
  output logic       host_wait_n,
  output logic       host_ireq_n,
  // system bus
  input  asb_req_t   s_req,
  output asb_rsp_t   s_rsp,
  output logic       m_breq,
  input  logic       m_gnt,
  output asb_req_t   m_req,
  input  asb_rsp_t   m_rsp,
  output logic       irq
);

  logic [31:0] ptr_q;
  logic [7:0]  to_host_q, from_host_q, rd_byte_q, cor_q;
  logic        h2a_pend_q, a2h_pend_q;
  logic [1:0]  rd_s, wr_s;
  logic        rd_prev, wr_prev;
  logic        xfer_q, xfer_wr_q, done_q;
  logic [7:0]  xfer_data_q;

  // Synchronised strobes and access start detection.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_s    <= '0;
      wr_s    <= '0;
      rd_prev <= 1'b0;
      wr_prev <= 1'b0;
    end else begin
      rd_s    <= {rd_s[0], !host_ce_n && !host_oe_n};
      wr_s    <= {wr_s[0], !host_ce_n && !host_we_n};
      rd_prev <= rd_s[1];
      wr_prev <= wr_s[1];
    end

  logic rd_start, wr_start, common, attr, is_data;
  assign rd_start = rd_s[1] && !rd_prev;
  assign wr_start = wr_s[1] && !wr_prev;
  assign common   = host_reg_n;
  assign attr     = !host_reg_n;
  assign is_data  = common && host_addr[2:0] == 3'd4;

  logic raw_data_acc;
  assign raw_data_acc = !host_ce_n && (!host_oe_n || !host_we_n) && is_data;
  assign host_wait_n  = !(raw_data_acc && !done_q);

  // ARM-side writes.
  logic arm_wr;
  assign arm_wr = s_req.valid && s_req.write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q       <= '0;
      to_host_q   <= '0;
      from_host_q <= '0;
      rd_byte_q   <= '0;
      cor_q       <= '0;
      h2a_pend_q  <= 1'b0;
      a2h_pend_q  <= 1'b0;
      xfer_q      <= 1'b0;
      xfer_wr_q   <= 1'b0;
      xfer_data_q <= '0;
      done_q      <= 1'b0;
    end else begin
      // Host accesses.
      if (wr_start && common) begin
        unique case (host_addr[2:0])
          3'd0: ptr_q[7:0]   <= host_din;
          3'd1: ptr_q[15:8]  <= host_din;
          3'd2: ptr_q[23:16] <= host_din;
          3'd3: ptr_q[31:24] <= host_din;
          3'd4: begin xfer_q <= 1'b1; xfer_wr_q <= 1'b1; xfer_data_q <= host_din; end
          3'd5: begin from_host_q <= host_din; h2a_pend_q <= 1'b1; end
          3'd6: if (host_din[0]) a2h_pend_q <= 1'b0;
          default: ;
        endcase
      end
      if (wr_start && attr && host_addr == 10'h3F8) cor_q <= host_din;
      if (rd_start && is_data) begin
        xfer_q    <= 1'b1;
        xfer_wr_q <= 1'b0;
      end
      // System bus transfer for DATA.
      if (xfer_q && m_req.valid && m_rsp.ready) begin
        xfer_q <= 1'b0;
        done_q <= 1'b1;
        ptr_q  <= ptr_q + 1'b1;
        if (!xfer_wr_q) rd_byte_q <= m_rsp.rdata[7:0];
      end
      if (!rd_s[1] && !wr_s[1] && !xfer_q) done_q <= 1'b0;
      // ARM accesses.
      if (arm_wr && s_req.addr[7:0] == 8'h00) begin
        to_host_q  <= s_req.wdata[7:0];
        a2h_pend_q <= 1'b1;
      end
      if (arm_wr && s_req.addr[7:0] == 8'h08 && s_req.wdata[0]) h2a_pend_q <= 1'b0;
      // Soft reset from the host clears the shared state.
      if (cor_q[7]) begin
        cor_q[7]   <= 1'b0;
        h2a_pend_q <= 1'b0;
        a2h_pend_q <= 1'b0;
        ptr_q      <= '0;
      end
    end
  end

  assign m_breq = xfer_q;
  always_comb begin
    m_req       = ASB_REQ_IDLE;
    m_req.valid = xfer_q && m_gnt;
    m_req.write = xfer_wr_q;
    m_req.size  = SZ_BYTE;
    m_req.addr  = ptr_q;
    m_req.wdata = {24'd0, xfer_data_q};
  end

  // Card information structure, tuple byte k at attribute address 2k.
  function automatic logic [7:0] cis_byte(input logic [8:0] k);
    unique case (k)
      9'd0:  cis_byte = 8'h01;   // CISTPL_DEVICE
      9'd1:  cis_byte = 8'h02;   //   link
      9'd2:  cis_byte = 8'h00;   //   device type: none
      9'd3:  cis_byte = 8'hFF;   //   end of device list
      9'd4:  cis_byte = 8'h1A;   // CISTPL_CONFIG
      9'd5:  cis_byte = 8'h05;   //   link
      9'd6:  cis_byte = 8'h01;   //   2 address bytes, 1 mask byte
      9'd7:  cis_byte = 8'h01;   //   last configuration index
      9'd8:  cis_byte = 8'hF8;   //   register base, low
      9'd9:  cis_byte = 8'h03;   //   register base, high
      9'd10: cis_byte = 8'h01;   //   register mask: COR only
      9'd11: cis_byte = 8'h1B;   // CISTPL_CFTABLE_ENTRY
      9'd12: cis_byte = 8'h02;   //   link
      9'd13: cis_byte = 8'h41;   //   default entry, index 1
      9'd14: cis_byte = 8'h00;   //   no further fields
      default: cis_byte = 8'hFF; // CISTPL_END
    endcase
  endfunction

  // Host read data.
  always_comb begin
    host_dout_oe = !host_ce_n && !host_oe_n;
    host_dout    = '0;
    if (attr) begin
      if (host_addr == 10'h3F8) host_dout = cor_q;
      else if (!host_addr[0])   host_dout = cis_byte(host_addr[9:1]);
    end else
      unique case (host_addr[2:0])
        3'd0: host_dout = ptr_q[7:0];
        3'd1: host_dout = ptr_q[15:8];
        3'd2: host_dout = ptr_q[23:16];
        3'd3: host_dout = ptr_q[31:24];
        3'd4: host_dout = rd_byte_q;
        3'd5: host_dout = to_host_q;
        3'd6: host_dout = {7'd0, a2h_pend_q};
        default: ;
      endcase
  end

  assign host_ireq_n = !(a2h_pend_q && cor_q[5:0] != 0);
  assign irq         = h2a_pend_q;

  always_comb begin
    s_rsp       = ASB_RSP_IDLE;
    s_rsp.ready = s_req.valid;
    unique case (s_req.addr[7:0])
      8'h00: s_rsp.rdata = {24'd0, to_host_q};
      8'h04: s_rsp.rdata = {24'd0, from_host_q};
      8'h08: s_rsp.rdata = {30'd0, a2h_pend_q, h2a_pend_q};
      8'h0C: s_rsp.rdata = {24'd0, cor_q};
      default: s_rsp.rdata = '0;
    endcase
  end

endmodule
