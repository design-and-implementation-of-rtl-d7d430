// tb_mac_workload - the PHY data rate at the largest frame size, on the
// whole chip with default parameters: 2 Mbit/s (one bit every 10 clocks of
// the 20 MHz clock) and the largest 802.11 MPDU, 2346 bytes including the
// 4-byte FCS, with the memory system at its slowest: the 8-bit external bus,
// 3 wait states, and the WEP engine encrypting a 2342-byte block at the same
// time, so that the PAI shares the bus with another master and the CPU
// throughout.
//  - transmit: the frame must leave without an underrun, bit-exact with its
//    FCS, and take 2346*8 bit times from the first to the last bit
//  - receive: a 2346-byte frame (the default RX_MAXLEN) must land in SRAM
//    without overflow, with a correct CRC and RX_LEN = 2346
// The CPU polls status registers (no interrupts) to add its own bus traffic.
module tb_mac_workload;
  import mac_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic cpu_breq = 0, cpu_gnt, nfiq, nirq;
  asb_req_t cpu_req = ASB_REQ_IDLE;
  asb_rsp_t cpu_rsp;
  logic [23:0] ext_addr;
  logic [15:0] ext_wdata, ext_rdata;
  logic ext_data_oe, ext_cs_sram_n, ext_cs_flash_n, ext_oe_n, ext_we_n;
  logic [1:0] ext_be_n;
  logic phy_tx_pe, phy_tx_rdy, phy_txclk, phy_txd, phy_rx_pe, phy_md_rdy, phy_rxclk, phy_rxd;
  logic ser_clk, ser_dout, ser_din, bb_cs_n, syn_le;
  logic [9:0] host_addr = 0;
  logic [7:0] host_din = 0, host_dout;
  logic host_dout_oe, host_ce_n = 1, host_oe_n = 1, host_we_n = 1, host_reg_n = 1;
  logic host_wait_n, host_ireq_n;
  logic bus16 = 1;
  assign ser_din = 1'b0;

  mac_top dut (.*);
  ext_mem_model #(.AW(16)) xm (.clk, .addr(ext_addr), .wdata(ext_wdata), .rdata(ext_rdata),
    .cs_sram_n(ext_cs_sram_n), .cs_flash_n(ext_cs_flash_n), .oe_n(ext_oe_n), .we_n(ext_we_n),
    .be_n(ext_be_n), .bus16);
  phy_model #(.HALF(5), .PREAMBLE(40)) phy (.clk, .tx_pe(phy_tx_pe), .txd(phy_txd), .tx_rdy(phy_tx_rdy),
    .txclk(phy_txclk), .rx_pe(phy_rx_pe), .md_rdy(phy_md_rdy), .rxclk(phy_rxclk), .rxd(phy_rxd));

  localparam logic [31:0] SRAM = 32'h0100_0000, MCFG = 32'h0800_0000, PAI = 32'h1000_0000,
                          WEP = 32'h2000_0000;
  localparam int N = 2342;                       // body; + 4 FCS = 2346

  // First and last transmit bit times, seen at the PHY clock.
  int clk_n = 0, first_bit = -1, last_bit = -1, wep_xfers = 0;
  logic txclk_q;
  always @(posedge clk) begin
    clk_n++;
    txclk_q <= phy_txclk;
    if (phy_tx_rdy && phy_txclk && !txclk_q) begin
      if (first_bit < 0) first_bit = clk_n;
      last_bit = clk_n;
    end
    if (!ext_cs_sram_n && !ext_we_n && ext_addr[15:12] >= 4'h8) wep_xfers++;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_xfer(input bit wr, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cpu_breq = 1'b1;
    while (!cpu_gnt) @(negedge clk);
    cpu_req = '{valid: 1'b1, write: wr, size: SZ_WORD, addr: a, wdata: d};
    #1;
    while (!cpu_rsp.ready) begin @(negedge clk); #1; end
    q = cpu_rsp.rdata;
    @(negedge clk);
    cpu_req  = ASB_REQ_IDLE;
    cpu_breq = 1'b0;
  endtask
  task automatic wr32(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q;
    cpu_xfer(1, a, d, q);
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] q);
    cpu_xfer(0, a, 0, q);
  endtask

  task automatic start_wep();
    wr32(WEP + 32'h20, 32'h04030201);
    wr32(WEP + 32'h24, 32'h08070605);
    wr32(WEP + 32'h14, 8);
    wr32(WEP + 32'h08, SRAM + 32'h4000);
    wr32(WEP + 32'h0C, SRAM + 32'h8000);
    wr32(WEP + 32'h10, N);
    wr32(WEP + 32'h00, 32'h1);
  endtask

  initial begin
    bytes_t d, got, rxf;
    logic [31:0] r, c;
    int k;
    for (int i = 0; i < N; i++) xm.sram[16'(16'h4000 + i)] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr32(MCFG, 32'h0003_0033);                   // 8-bit bus, 3 wait states everywhere
    bus16 = 0;

    // ---- transmit a 2346-byte body while WEP runs ----
    d.delete();
    for (int i = 0; i < N; i++) begin d.push_back(8'($urandom)); xm.sram[16'(i)] = d[i]; end
    start_wep();
    wr32(PAI + 32'h0C, SRAM);
    wr32(PAI + 32'h10, N);
    wr32(PAI + 32'h00, 32'h1);
    do rd32(PAI + 32'h04, r); while (!r[0] && !r[1]);
    check(!r[1], "no transmit underrun at 2 Mbit/s with WEP on the bus");
    check(wep_xfers > 100, $sformatf("WEP wrote %0d bytes during the transmit", wep_xfers));
    wait (phy.tx_frames.size() != 0);
    got = phy.tx_frames.pop_front();
    c = crc32_ref(d);
    check(got.size() == N + 4, $sformatf("%0d bytes on air", got.size()));
    k = 0;
    for (int i = 0; i < N && i < got.size(); i++) if (got[i] != d[i]) k++;
    check(k == 0, $sformatf("%0d frame bytes wrong", k));
    if (got.size() == N + 4) check({got[N+3], got[N+2], got[N+1], got[N]} == c, "FCS");
    check(last_bit - first_bit == ((N + 4) * 8 - 1) * 10,
          $sformatf("transmit took %0d clocks between first and last bit, expected %0d",
                    last_bit - first_bit, ((N + 4) * 8 - 1) * 10));
    wr32(PAI + 32'h04, 32'h7F);
    do rd32(WEP + 32'h04, r); while (!r[1]);
    wr32(WEP + 32'h04, 32'h2);

    // ---- receive a 2350-byte frame while WEP runs again ----
    start_wep();
    wr32(PAI + 32'h14, SRAM + 32'h2000);
    wr32(PAI + 32'h00, 32'h2);
    rxf.delete();
    for (int i = 0; i < N; i++) rxf.push_back(8'($urandom));
    c = crc32_ref(rxf);
    for (int b = 0; b < 4; b++) rxf.push_back(c[8*b +: 8]);
    fork phy.send_frame(rxf); join_none
    do rd32(PAI + 32'h04, r); while (!r[2]);
    check(!r[3] && !r[4], $sformatf("received without CRC error or overflow (status %h)", r));
    rd32(PAI + 32'h1C, r);
    check(r == N + 4, $sformatf("RX_LEN %0d", r));
    k = 0;
    for (int i = 0; i < N + 4; i++) if (xm.sram[16'(16'h2000 + i)] != rxf[i]) k++;
    check(k == 0, $sformatf("%0d received bytes wrong in SRAM", k));
    $display("workload: %0d-byte frames each way at 2 Mbit/s on the 8-bit bus with WEP active", N + 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
