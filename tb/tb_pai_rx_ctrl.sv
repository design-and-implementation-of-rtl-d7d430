// tb_pai_rx_ctrl - receive control machine with the PHY model and a FIFO:
// frames with a correct FCS must arrive byte for byte with crc_ok, a frame
// with a flipped bit must be flagged, a frame longer than max_len must be
// cut and flagged too_long, and a FIFO that is not drained must report
// overflow.
module tb_pai_rx_ctrl;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic enable = 0, phy_rx_pe, phy_md_rdy, phy_rxclk, phy_rxd;
  logic [15:0] max_len = 2346, len;
  logic fifo_full, fifo_wr, frame_start, frame_end, crc_ok, overflow, too_long, active;
  logic [7:0] fifo_wdata;
  logic tx_rdy, txclk, rd_en = 0, fempty, ffull;
  logic [7:0] frdata;
  logic [6:0] fcount;
  int nstart = 0, nend = 0;

  pai_rx_ctrl dut (.*);
  sync_fifo #(.DEPTH(64), .W(8)) fifo (.clk, .rst_n, .flush(frame_start), .wr_en(fifo_wr), .wdata(fifo_wdata),
    .rd_en(rd_en), .rdata(frdata), .full(ffull), .empty(fempty), .count(fcount));
  assign fifo_full = ffull;
  phy_model #(.HALF(5)) phy (.clk, .tx_pe(1'b0), .txd(1'b0), .tx_rdy, .txclk,
    .rx_pe(phy_rx_pe), .md_rdy(phy_md_rdy), .rxclk(phy_rxclk), .rxd(phy_rxd));

  // drain the FIFO into a queue whenever allowed
  bit drain = 1;
  byte unsigned got[$];
  always @(negedge clk) begin
    rd_en = drain && !fempty;
    if (rd_en) got.push_back(frdata);
  end
  always @(posedge clk) begin
    if (frame_start) nstart++;
    if (frame_end) nend++;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t d;
    logic [31:0] c;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    @(negedge clk);
    check(phy_rx_pe, "receive path powered when enabled");
    for (int f = 0; f < 9; f++) begin
      d.delete();
      n = $urandom_range(90, 1);
      repeat (n) d.push_back(8'($urandom));
      c = crc32_ref(d);
      for (int k = 0; k < 4; k++) d.push_back(c[8*k +: 8]);
      if (f == 3) d[n / 2] ^= 8'h10;          // corrupt one bit
      max_len = (f == 5) ? 16'(n / 2 + 1) : 16'd2346;
      drain = (f != 7);
      got.delete();
      phy.send_frame(d);
      repeat (30) @(negedge clk);
      check(nend == f + 1 && nstart == f + 1, "one start and one end per frame");
      if (f == 5) begin
        check(too_long && len == n / 2 + 1, $sformatf("too long: len %0d", len));
        check(got.size() == n / 2 + 1, $sformatf("too long: %0d bytes kept of %0d", got.size(), n / 2 + 1));
        foreach (got[i]) if (got[i] != d[i]) begin check(0, $sformatf("too long: byte %0d", i)); break; end
      end else if (f == 7) begin
        check(overflow && len == 64, $sformatf("overflow: len %0d", len));
      end else begin
        check(len == n + 4 && got.size() == n + 4, $sformatf("frame %0d length %0d/%0d", f, len, got.size()));
        foreach (got[i]) if (got[i] != d[i]) begin check(0, $sformatf("frame %0d byte %0d", f, i)); break; end
        check(crc_ok == (f != 3), $sformatf("frame %0d crc_ok %b", f, crc_ok));
        check(!overflow && !too_long, "no error flags");
      end
      drain = 1;
      repeat (80) @(negedge clk);
    end
    enable = 0;
    @(negedge clk);
    check(!phy_rx_pe, "receive path released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
