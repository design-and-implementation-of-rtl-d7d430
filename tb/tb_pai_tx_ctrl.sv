// tb_pai_tx_ctrl - transmit control machine with a FIFO model and the PHY
// model: frames of random length must leave bit-serially with the correct
// 802.11 FCS appended, done must pulse once per frame, and a FIFO that runs
// dry must abort the frame with underrun. Also checks the bit rate.
module tb_pai_tx_ctrl;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic start = 0, fifo_rd, phy_tx_pe, phy_tx_rdy, phy_txclk, phy_txd, busy, done, underrun;
  logic [15:0] len = 0;
  logic md_rdy, rxclk, rxd;
  logic [7:0] fifo_rdata, fwdata = 0;
  logic fifo_empty, fwr = 0, ffull;
  logic [7:0] fcount;
  int ndone = 0, nunder = 0;

  // FIFO in front of the machine (deep enough to hold a whole test frame)
  sync_fifo #(.DEPTH(128), .W(8)) fifo (.clk, .rst_n, .flush(1'b0), .wr_en(fwr), .wdata(fwdata),
    .rd_en(fifo_rd), .rdata(fifo_rdata), .full(ffull), .empty(fifo_empty), .count(fcount));
  always @(posedge clk) begin
    if (done) ndone++;
    if (underrun) nunder++;
  end
  task automatic fill(input bytes_t d);
    foreach (d[i]) begin
      @(negedge clk); fwr = 1; fwdata = d[i];
    end
    @(negedge clk); fwr = 0;
  endtask

  pai_tx_ctrl dut (.*);
  phy_model #(.HALF(5), .PREAMBLE(30)) phy (.clk, .tx_pe(phy_tx_pe), .txd(phy_txd), .tx_rdy(phy_tx_rdy),
    .txclk(phy_txclk), .rx_pe(1'b0), .md_rdy, .rxclk, .rxd);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t d, got;
    logic [31:0] c;
    int n, t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      d.delete();
      n = $urandom_range(100, 1);
      repeat (n) d.push_back(8'($urandom));
      fill(d);
      len = 16'(n);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      wait (phy_tx_rdy); t0 = $time;
      wait (!busy); t1 = $time;
      repeat (5) @(negedge clk);
      got = phy.tx_frames.pop_front();
      c = crc32_ref(d);
      check(got.size() == n + 4, $sformatf("frame %0d: %0d bytes on air, %0d expected", f, got.size(), n + 4));
      for (int i = 0; i < n; i++) if (got[i] != d[i]) begin check(0, $sformatf("frame %0d byte %0d", f, i)); break; end
      check({got[n + 3], got[n + 2], got[n + 1], got[n]} == c, $sformatf("frame %0d FCS", f));
      check(ndone == f + 1, "done pulse");
      // one bit per bit-clock period (10 clocks of 10 ns)
      check((t1 - t0) / 100 >= 8 * (n + 4) - 1 && (t1 - t0) / 100 <= 8 * (n + 4) + 2,
            $sformatf("frame %0d took %0d bit periods", f, (t1 - t0) / 100));
    end
    // underrun: only 5 of 20 bytes available
    d.delete();
    repeat (5) d.push_back(8'($urandom));
    fill(d); len = 20;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (!busy);
    repeat (5) @(negedge clk);
    check(nunder == 1 && ndone == 8, "underrun reported instead of done");
    check(!phy_tx_pe, "PHY transmit path released after underrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
