// tb_pai - the whole physical attachment interface through its registers,
// with a bus memory model on its master port and the PHY model:
//  - transmit of a frame longer than the FIFO (DMA held off by a full FIFO),
//    checked bit for bit on the air including the FCS, with the tx_done irq
//  - receive of a good and a corrupted frame into memory, RX_LEN, rx_done
//    and rx_crc_err
//  - TSF read, load, and a transmit started by the TSF compare
//  - a serial programming transfer to the baseband chip select
module tb_pai;
  import mac_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  asb_req_t s_req = ASB_REQ_IDLE, m_req;
  asb_rsp_t s_rsp, m_rsp;
  logic m_breq, m_gnt = 0, irq;
  logic phy_tx_pe, phy_tx_rdy, phy_txclk, phy_txd, phy_rx_pe, phy_md_rdy, phy_rxclk, phy_rxd;
  logic ser_clk, ser_dout, ser_din, bb_cs_n, syn_le;

  pai #(.TICK_DIV(20)) dut (.*);
  bus_mem_model #(.AW(12), .MAXWAIT(2)) mem (.clk, .rst_n, .req(m_req), .rsp(m_rsp));
  phy_model #(.HALF(5), .PREAMBLE(40)) phy (.clk, .tx_pe(phy_tx_pe), .txd(phy_txd), .tx_rdy(phy_tx_rdy),
    .txclk(phy_txclk), .rx_pe(phy_rx_pe), .md_rdy(phy_md_rdy), .rxclk(phy_rxclk), .rxd(phy_rxd));
  assign ser_din = 1'b1;
  always @(posedge clk) m_gnt <= m_breq;

  int txfull = -1, ser_edges = 0;
  // bytes fetched by the transmit DMA 2000 clocks (25 byte times) after the
  // PHY signals ready: about FIFO depth + 25 if the full FIFO held the DMA
  // off, all 150 otherwise
  initial begin
    @(posedge phy_tx_rdy);
    repeat (2000) @(posedge clk);
    txfull = mem.nxfers;
  end
  logic sclk_q;
  always @(posedge clk) begin
    sclk_q <= ser_clk;
    if (ser_clk && !sclk_q && !bb_cs_n) ser_edges++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b1, size: SZ_WORD, addr: {24'h100000, a}, wdata: d};
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask
  task automatic reg_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b0, size: SZ_WORD, addr: {24'h100000, a}, wdata: 0};
    #1 d = s_rsp.rdata;
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask

  task automatic transmit_check(input bytes_t d, input string what);
    bytes_t got;
    logic [31:0] c = crc32_ref(d);
    int n = d.size();
    wait (phy.tx_frames.size() != 0);
    got = phy.tx_frames.pop_front();
    check(got.size() == n + 4, $sformatf("%s: %0d bytes on air", what, got.size()));
    for (int i = 0; i < n; i++) if (got[i] != d[i]) begin check(0, $sformatf("%s byte %0d", what, i)); break; end
    check({got[n + 3], got[n + 2], got[n + 1], got[n]} == c, {what, ": FCS"});
  endtask

  initial begin
    bytes_t d;
    logic [31:0] rd, c;
    logic [63:0] t;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    reg_wr(8'h08, 32'h7F);                       // all interrupts enabled
    // ---- transmit ----
    n = 150;
    d.delete();
    for (int i = 0; i < n; i++) begin d.push_back(8'($urandom)); mem.mem[12'h100 + i] = d[i]; end
    reg_wr(8'h0C, 32'h100);
    reg_wr(8'h10, n);
    reg_wr(8'h00, 32'h1);
    wait (irq);
    reg_rd(8'h04, rd);
    check(rd[0] && !rd[1], $sformatf("tx_done status %h", rd));
    transmit_check(d, "tx frame");
    check(txfull >= 80 && txfull <= 100, $sformatf("transmit FIFO filled up, DMA held off at %0d bytes", txfull));
    reg_wr(8'h04, 32'h7F);
    check(!irq, "irq cleared");
    // ---- receive ----
    reg_wr(8'h14, 32'h800);
    reg_wr(8'h00, 32'h2);
    for (int f = 0; f < 2; f++) begin
      d.delete();
      n = 70 + 10 * f;
      repeat (n) d.push_back(8'($urandom));
      c = crc32_ref(d);
      for (int k = 0; k < 4; k++) d.push_back(c[8*k +: 8]);
      if (f == 1) d[5] ^= 8'h01;
      phy.send_frame(d);
      wait (irq);
      reg_rd(8'h04, rd);
      check(rd[2], "rx_done");
      check(rd[3] == (f == 1), $sformatf("rx_crc_err %b for frame %0d", rd[3], f));
      reg_rd(8'h1C, rd);
      check(rd == n + 4, $sformatf("RX_LEN %0d", rd));
      for (int i = 0; i < n + 4; i++)
        if (mem.mem[12'h800 + i] != d[i]) begin check(0, $sformatf("rx byte %0d in memory", i)); break; end
      reg_wr(8'h04, 32'h7F);
    end
    reg_wr(8'h00, 32'h0);
    // ---- TSF ----
    reg_rd(8'h20, rd);
    check(rd > 0, "TSF running");
    reg_wr(8'h20, 32'hFFFF_FFF0);
    reg_wr(8'h24, 32'h0000_0007);
    reg_rd(8'h24, rd);
    check(rd == 7, "TSF high word loaded");
    reg_rd(8'h20, rd);
    check(rd >= 32'hFFFF_FFF0 && rd < 32'hFFFF_FFF3, $sformatf("TSF low word loaded %h", rd));
    // TSF-triggered transmit 100 us from now
    d.delete();
    for (int i = 0; i < 20; i++) begin d.push_back(8'($urandom)); mem.mem[12'h200 + i] = d[i]; end
    reg_wr(8'h0C, 32'h200);
    reg_wr(8'h10, 20);
    reg_rd(8'h20, rd);
    t[31:0] = rd;
    reg_rd(8'h24, rd);
    t[63:32] = rd;
    t = t + 100;                                 // crosses the low-word wrap
    reg_wr(8'h28, t[31:0]);
    reg_wr(8'h00, 32'h4);                        // tx_on_tsf
    reg_wr(8'h2C, t[63:32]);                     // arm
    repeat (20 * 90) @(negedge clk);
    check(!phy_tx_pe, "no transmit before the TSF time");
    wait (phy_tx_pe);
    reg_rd(8'h04, rd);
    check(rd[5], "tsf_event status");
    transmit_check(d, "TSF-started frame");
    // TSF-triggered receive enable
    reg_wr(8'h04, 32'h7F);
    reg_rd(8'h20, rd);
    t[31:0] = rd;
    reg_rd(8'h24, rd);
    t[63:32] = rd;
    t = t + 40;
    reg_wr(8'h28, t[31:0]);
    reg_wr(8'h00, 32'h8);                        // rx_on_tsf
    reg_wr(8'h2C, t[63:32]);
    repeat (20 * 30) @(negedge clk);
    check(!phy_rx_pe, "receiver off before the TSF time");
    wait (phy_rx_pe);
    reg_rd(8'h00, rd);
    check(rd[3:1] == 3'b001, $sformatf("rx_enable set by the TSF, CTRL %h", rd));
    reg_wr(8'h00, 32'h0);
    // ---- serial interface ----
    reg_wr(8'h04, 32'h7F);
    reg_wr(8'h30, 32'h0000_A5C3);
    reg_wr(8'h34, {16'd0, 8'd1, 1'b0, 1'b0, 6'd16});
    wait (irq);
    reg_rd(8'h38, rd);
    check(rd == 32'h0000_FFFF, $sformatf("serial read-back %h", rd));
    check(ser_edges == 16, $sformatf("16 serial clocks to the baseband (%0d)", ser_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
