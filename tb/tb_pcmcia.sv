// tb_pcmcia - PCMCIA host interface with a host bus model (strobes driven at
// random times relative to the clock, WAIT# obeyed), a bus memory model on the
// master port with a randomly delayed grant, and ARM register accesses:
//  - pointer set-up and DATA writes/reads reaching memory, with WAIT# seen low
//  - mailboxes in both directions with their interrupts, IREQ# gated by the
//    configuration index in the COR, and the COR soft reset
//  - the card information structure, walked tuple by tuple
module tb_pcmcia;
  import mac_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [9:0] host_addr = 0;
  logic [7:0] host_din = 0, host_dout;
  logic host_dout_oe, host_ce_n = 1, host_oe_n = 1, host_we_n = 1, host_reg_n = 1;
  logic host_wait_n, host_ireq_n, irq, m_breq, m_gnt = 0;
  asb_req_t s_req = ASB_REQ_IDLE, m_req;
  asb_rsp_t s_rsp, m_rsp;
  pcmcia dut (.*);
  bus_mem_model #(.AW(12), .MAXWAIT(3)) mem (.clk, .rst_n, .req(m_req), .rsp(m_rsp));
  always @(posedge clk)
    if (!m_breq) m_gnt <= 1'b0;
    else if (!m_gnt && $urandom_range(0, 2) == 0) m_gnt <= 1'b1;

  int wait_seen = 0;
  always @(posedge clk) if (!host_wait_n) wait_seen++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host cycles: times in ns, not aligned with the card clock.
  task automatic host_cycle(input bit wr, input bit reg_sp, input logic [9:0] a,
                            input logic [7:0] d, output logic [7:0] q);
    #($urandom_range(1, 9));
    host_addr = a; host_reg_n = !reg_sp; host_din = d;
    #5 host_ce_n = 0;
    if (wr) host_we_n = 0; else host_oe_n = 0;
    #40;
    while (!host_wait_n) #3;
    #20 q = host_dout;
    host_we_n = 1; host_oe_n = 1;
    #5 host_ce_n = 1;
    #40;
  endtask
  task automatic host_wr(input bit reg_sp, input logic [9:0] a, input logic [7:0] d);
    logic [7:0] q;
    host_cycle(1, reg_sp, a, d, q);
  endtask
  task automatic host_rd(input bit reg_sp, input logic [9:0] a, output logic [7:0] q);
    host_cycle(0, reg_sp, a, 0, q);
  endtask

  task automatic arm_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b1, size: SZ_WORD, addr: {24'h300000, a}, wdata: d};
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask
  task automatic arm_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b0, size: SZ_WORD, addr: {24'h300000, a}, wdata: 0};
    #1 d = s_rsp.rdata;
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask

  task automatic set_ptr(input logic [31:0] p);
    for (int b = 0; b < 4; b++) host_wr(0, 10'(b), p[8*b +: 8]);
  endtask

  initial begin
    logic [7:0] q, wd [32];
    logic [31:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // data path: host writes 32 bytes, reads them back, reads memory data
    set_ptr(32'h0000_0140);
    for (int i = 0; i < 32; i++) begin wd[i] = 8'($urandom); host_wr(0, 10'd4, wd[i]); end
    for (int i = 0; i < 32; i++)
      if (mem.mem[12'h140 + i] != wd[i]) begin check(0, $sformatf("host write byte %0d", i)); break; end
    check(1, "host writes compared");
    host_rd(0, 10'd0, q);
    check(q == 8'h60, $sformatf("pointer advanced to %h", q));
    for (int i = 0; i < 64; i++) mem.mem[12'h900 + i] = 8'($urandom);
    set_ptr(32'h0000_0900);
    for (int i = 0; i < 64; i++) begin
      host_rd(0, 10'd4, q);
      if (q != mem.mem[12'h900 + i]) begin check(0, $sformatf("host read byte %0d: %h", i, q)); break; end
    end
    check(1, "host reads compared");
    check(wait_seen > 96, $sformatf("WAIT# held the host (%0d clocks)", wait_seen));
    check(mem.nxfers == 96, $sformatf("%0d memory transfers", mem.nxfers));
    // card information structure: walk the tuple chain as a host would and
    // find the configuration registers
    begin
      int a = 0, ntup = 0;
      logic [7:0] code, link, lo, hi;
      logic [15:0] cfg_base = 0;
      do begin
        host_rd(1, 10'(a), code);
        if (code != 8'hFF) begin
          host_rd(1, 10'(a + 2), link);
          if (code == 8'h1A) begin
            host_rd(1, 10'(a + 8), lo);
            host_rd(1, 10'(a + 10), hi);
            cfg_base = {hi, lo};
          end
          a += 2 * (link + 2);
          ntup++;
        end
      end while (code != 8'hFF && ntup < 20);
      check(ntup == 3, $sformatf("CIS holds %0d tuples before the end tuple", ntup));
      check(cfg_base == 16'h03F8, $sformatf("CIS points to configuration registers at %h", cfg_base));
    end
    // mailbox ARM -> host, IREQ# only once the card is configured
    arm_wr(8'h00, 32'h5A);
    #100;
    check(host_ireq_n, "no IREQ# while unconfigured");
    host_wr(1, 10'h3F8, 8'h01);
    #100;
    check(!host_ireq_n, "IREQ# once configured");
    host_rd(1, 10'h3F8, q);
    check(q == 8'h01, "COR read back");
    host_rd(0, 10'd6, q);
    check(q[0], "host sees interrupt pending");
    host_rd(0, 10'd5, q);
    check(q == 8'h5A, "host reads ARM mailbox");
    host_wr(0, 10'd6, 8'h01);
    #50;
    check(host_ireq_n, "IREQ# cleared by host");
    // mailbox host -> ARM
    check(!irq, "no ARM interrupt yet");
    host_wr(0, 10'd5, 8'hC3);
    @(negedge clk);
    check(irq, "ARM interrupt from host mailbox");
    arm_rd(8'h04, r);
    check(r == 32'hC3, "ARM reads host mailbox");
    arm_wr(8'h08, 32'h1);
    check(!irq, "ARM interrupt cleared");
    // soft reset clears pending state and the pointer
    arm_wr(8'h00, 32'h11);
    host_wr(0, 10'd5, 8'h22);
    check(irq && !host_ireq_n, "both interrupts pending");
    host_wr(1, 10'h3F8, 8'h81);
    check(!irq && host_ireq_n, "soft reset cleared the interrupts");
    arm_rd(8'h0C, r);
    check(r == 32'h01, $sformatf("COR after soft reset %h", r));
    host_rd(0, 10'd1, q);
    check(q == 8'h00, "pointer cleared by soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
