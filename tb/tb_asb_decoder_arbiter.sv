// tb_asb_decoder_arbiter - four masters run random bursts of reads and writes
// to five memory slaves at the same time. Checks that read data match what
// each master wrote (so transfers reach the decoded slave), that at most one
// grant is active, that an owner is only replaced by the highest-priority
// requester, that bursts are not split, and that an unmapped address ends in
// an error.
module tb_asb_decoder_arbiter;
  import mac_pkg::*;
  localparam int NM = 4, NS = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [NM-1:0] m_breq = '0, m_gnt;
  asb_req_t m_req [NM];
  asb_rsp_t m_rsp [NM];
  asb_req_t s_req [NS];
  asb_rsp_t s_rsp [NS];

  asb_decoder_arbiter dut (.*);
  for (genvar s = 0; s < NS; s++) begin : g_slv
    bus_mem_model #(.AW(10), .MAXWAIT(3)) u_mem (.clk, .rst_n, .req(s_req[s]), .rsp(s_rsp[s]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: one grant, priority order, no split bursts.
  int owner_prev = M_CPU, switches = 0, contended = 0;
  logic [NM-1:0] breq_prev;
  always @(negedge clk) if (rst_n) begin
    int owner;
    owner = -1;
    for (int m = 0; m < NM; m++) if (m_gnt[m]) begin
      if (owner >= 0) check(0, "two grants");
      owner = m;
    end
    if (owner != owner_prev) begin
      switches++;
      if (m_breq[owner] || breq_prev[owner]) begin
        for (int j = 0; j < owner; j++)
          if (breq_prev[j]) check(0, $sformatf("master %0d granted over %0d", owner, j));
        if ($countones(breq_prev) > 1) contended++;
      end
    end
    breq_prev = m_breq;
    owner_prev = owner;
  end

  // Shadow of what each master wrote: [master][slave][offset]
  byte unsigned shadow [NM][NS][64];
  int nxfer [NM];

  task automatic master(input int m);
    repeat (60) begin
      int len = $urandom_range(4, 1);
      repeat ($urandom_range(6, 0)) @(negedge clk);
      m_breq[m] = 1;
      while (!m_gnt[m]) @(negedge clk);
      repeat (len) begin
        int s = $urandom_range(NS - 1, 0);
        int off = $urandom_range(63, 0);
        logic [31:0] base = (s == S_APB) ? 32'h8000_0000 : {4'(s), 28'd0};
        logic wr = $urandom_range(1, 0);
        logic [7:0] d = 8'($urandom);
        m_req[m] = '{valid: 1'b1, write: wr, size: SZ_BYTE, addr: base + 32'(m * 64 + off), wdata: {24'd0, d}};
        #1;
        while (!m_rsp[m].ready) begin
          check(m_gnt[m], "grant kept during a burst");
          @(negedge clk);
        end
        if (wr) shadow[m][s][off] = d;
        else check(m_rsp[m].rdata[7:0] == shadow[m][s][off],
                   $sformatf("m%0d s%0d off %0d: %h vs %h", m, s, off, m_rsp[m].rdata[7:0], shadow[m][s][off]));
        @(negedge clk);
        m_req[m] = ASB_REQ_IDLE;
        nxfer[m]++;
      end
      m_breq[m] = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    foreach (shadow[a, b, c]) shadow[a][b][c] = 0;
    foreach (m_req[m]) m_req[m] = ASB_REQ_IDLE;
    foreach (nxfer[m]) nxfer[m] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      master(0); master(1); master(2); master(3);
    join
    // unmapped address
    m_breq[M_CPU] = 1;
    while (!m_gnt[M_CPU]) @(negedge clk);
    m_req[M_CPU] = '{valid: 1'b1, write: 1'b0, size: SZ_WORD, addr: 32'h5000_0000, wdata: 0};
    #1;
    check(m_rsp[M_CPU].ready && m_rsp[M_CPU].error, "unmapped address answered with error");
    @(negedge clk);
    m_req[M_CPU] = ASB_REQ_IDLE; m_breq[M_CPU] = 0;
    check(contended > 0, $sformatf("contended arbitrations: %0d", contended));
    for (int m = 0; m < NM; m++) check(nxfer[m] > 0, "every master served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
