// tb_sync_fifo - random push/pop traffic against a queue model of the 64-byte
// FIFO: data order, full/empty flags, fill level and flush.
module tb_sync_fifo;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic flush = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wdata = 0, rdata;
  logic full, empty;
  logic [6:0] count;
  byte unsigned q[$];
  int saw_full = 0;

  sync_fifo #(.DEPTH(DEPTH), .W(8)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(empty && !full && count == 0, "empty after reset");
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check current state against the model
      check(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() != 0) check(rdata == q[0], $sformatf("head %h vs %h", rdata, q[0]));
      if (full) saw_full++;
      // choose next operation; bias to fill in the first half
      wr_en = !full && ($urandom_range(99, 0) < (t < 2000 ? 70 : 30));
      rd_en = !empty && ($urandom_range(99, 0) < (t < 2000 ? 30 : 70));
      wdata = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
    end
    check(saw_full > 0, "FIFO reached full at least once");
    @(negedge clk);
    wr_en = 0; rd_en = 0; flush = 1;
    @(negedge clk);
    flush = 0;
    check(empty && count == 0, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
