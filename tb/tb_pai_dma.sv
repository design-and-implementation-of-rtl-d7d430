// tb_pai_dma - both DMA directions against a bus memory model with random
// wait states and a randomly delayed grant: the transmit machine must copy
// len bytes from memory into a FIFO that fills up at random, the receive
// machine must copy FIFO bytes to memory in order. Checks data, order,
// counts, one bus tenure per byte and the hold-off by a full FIFO.
module tb_pai_dma;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // shared memory (TX reads, RX writes), grant model per DMA
  logic start_t = 0, start_r = 0, stop_r = 0;
  logic [31:0] addr_t = 0, addr_r = 0;
  logic [15:0] len_t = 0;
  logic busy_t, busy_r, err_t, err_r;
  logic [15:0] count_t, count_r;
  logic fwr_t, frd_r, unused_frd_t, unused_fwr_r;
  logic [7:0] fwd_t, unused_fwd_r;
  logic ffull_t = 0, fempty_r = 1;
  logic [7:0] frd_data_r = 0;
  logic breq_t, breq_r, gnt_t = 0, gnt_r = 0;
  asb_req_t req_t, req_r, req_mem;
  asb_rsp_t rsp_mem;

  pai_dma #(.TO_MEM(1'b0)) dut_t (.clk, .rst_n, .start(start_t), .stop(1'b0), .addr(addr_t), .len(len_t),
    .busy(busy_t), .err(err_t), .count(count_t), .fifo_wr(fwr_t), .fifo_wdata(fwd_t), .fifo_full(ffull_t),
    .fifo_rd(unused_frd_t), .fifo_rdata(8'h00), .fifo_empty(1'b1),
    .m_breq(breq_t), .m_gnt(gnt_t), .m_req(req_t), .m_rsp(rsp_mem));
  pai_dma #(.TO_MEM(1'b1)) dut_r (.clk, .rst_n, .start(start_r), .stop(stop_r), .addr(addr_r), .len(16'd0),
    .busy(busy_r), .err(err_r), .count(count_r), .fifo_wr(unused_fwr_r), .fifo_wdata(unused_fwd_r),
    .fifo_full(1'b0), .fifo_rd(frd_r), .fifo_rdata(frd_data_r), .fifo_empty(fempty_r),
    .m_breq(breq_r), .m_gnt(gnt_r), .m_req(req_r), .m_rsp(rsp_mem));

  // the two machines are used one at a time
  assign req_mem = gnt_t ? req_t : req_r;
  bus_mem_model #(.AW(12), .MAXWAIT(3)) mem (.clk, .rst_n, .req(req_mem), .rsp(rsp_mem));

  // grant after a random delay, held while requested
  always @(posedge clk) begin
    gnt_t <= breq_t && (gnt_t || $urandom_range(2, 0) == 0);
    gnt_r <= breq_r && (gnt_r || $urandom_range(2, 0) == 0);
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned txq[$], rxq[$];
  int tenures = 0;
  logic breq_t_q;
  always @(posedge clk) begin
    breq_t_q <= breq_t;
    if (breq_t && !breq_t_q) tenures++;
  end

  initial begin
    int n, lvl, saw_full = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- transmit direction ----------------
    for (int t = 0; t < 5; t++) begin
      n = $urandom_range(120, 1);
      addr_t = $urandom_range(1000, 0);
      for (int i = 0; i < n; i++) mem.mem[addr_t + i] = 8'($urandom);
      len_t = 16'(n);
      txq.delete();
      tenures = 0;
      @(negedge clk); start_t = 1; @(negedge clk); start_t = 0;
      // FIFO of 4 entries drained at random by the consumer
      lvl = 0;
      while (busy_t) begin
        ffull_t = (lvl == 4);
        @(posedge clk);
        if (fwr_t) begin
          check(!ffull_t, "no write into a full FIFO");
          txq.push_back(fwd_t);
          lvl++;
        end
        if (lvl == 4) saw_full++;
        if (lvl > 0 && $urandom_range(4, 0) == 0) lvl--;
        @(negedge clk);
      end
      ffull_t = 0;
      check(txq.size() == n && count_t == n, $sformatf("tx moved %0d of %0d", txq.size(), n));
      foreach (txq[i]) if (txq[i] != mem.mem[addr_t + i]) begin check(0, $sformatf("tx byte %0d", i)); break; end
      check(tenures == n, $sformatf("one bus tenure per byte (%0d)", tenures));
    end
    // ---------------- receive direction ----------------
    for (int t = 0; t < 5; t++) begin
      n = $urandom_range(120, 1);
      addr_r = 2048 + $urandom_range(1000, 0);
      rxq.delete();
      for (int i = 0; i < n; i++) rxq.push_back(8'($urandom));
      @(negedge clk); start_r = 1; @(negedge clk); start_r = 0;
      for (int i = 0; i < n; i++) begin
        fempty_r = 0; frd_data_r = rxq[i];
        do @(posedge clk); while (!frd_r);
        @(negedge clk);
        fempty_r = 1;
        repeat ($urandom_range(3, 0)) @(negedge clk);
      end
      repeat (20) @(negedge clk);
      check(count_r == n, $sformatf("rx count %0d of %0d", count_r, n));
      for (int i = 0; i < n; i++)
        if (mem.mem[addr_r + i] != rxq[i]) begin check(0, $sformatf("rx byte %0d", i)); break; end
      @(negedge clk); stop_r = 1; @(negedge clk); stop_r = 0;
      check(!busy_r, "receive machine stopped");
    end
    check(!err_t && !err_r, "no bus errors");
    check(saw_full > 0, "transmit machine held off by a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
