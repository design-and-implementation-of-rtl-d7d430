// tb_mem_ctrl - memory controller against the external memory model: random
// byte/halfword/word reads and writes to SRAM and Flash with several wait
// state settings on the 16-bit and the 8-bit bus, a third of them at the
// address right after the previous access; checks data and the transfer
// time: the first beat takes N wait states (S if the access is sequential),
// the further beats S wait states, plus one clock of response.
module tb_mem_ctrl;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  asb_req_t req = ASB_REQ_IDLE;
  asb_rsp_t rsp;
  logic [23:0] ext_addr;
  logic [15:0] ext_wdata, ext_rdata;
  logic ext_data_oe, ext_cs_sram_n, ext_cs_flash_n, ext_oe_n, ext_we_n;
  logic [1:0] ext_be_n;
  logic bus16_m;

  mem_ctrl dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .ext_addr, .ext_wdata, .ext_rdata,
    .ext_data_oe, .ext_cs_sram_n, .ext_cs_flash_n, .ext_oe_n, .ext_we_n, .ext_be_n);
  ext_mem_model #(.AW(10)) mem (.clk, .addr(ext_addr), .wdata(ext_wdata), .rdata(ext_rdata),
    .cs_sram_n(ext_cs_sram_n), .cs_flash_n(ext_cs_flash_n), .oe_n(ext_oe_n), .we_n(ext_we_n),
    .be_n(ext_be_n), .bus16(bus16_m));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One transfer; returns the number of clocks from issue to completion.
  task automatic xfer(input logic wr, input asb_size_e sz, input logic [31:0] a,
                      input logic [31:0] wd, output logic [31:0] rd, output int cyc);
    @(negedge clk);
    req = '{valid: 1'b1, write: wr, size: sz, addr: a, wdata: wd};
    cyc = 1;
    while (!rsp.ready) begin @(negedge clk); cyc++; end
    rd = rsp.rdata;
    @(negedge clk);
    req = ASB_REQ_IDLE;
  endtask

  byte unsigned model_s[1024], model_f[1024];

  initial begin
    logic [31:0] rd, wd, a, exp;
    int cyc, nb, ws;
    asb_size_e sz;
    logic wr, sram;
    int unsigned fws, sws, fsws, ssws;
    logic [31:0] nxt;
    bit nxt_ok, sq;
    int nseq;
    logic b16;
    foreach (model_s[i]) begin model_s[i] = 0; model_f[i] = 0; end
    bus16_m = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xfer(0, SZ_WORD, 32'h0800_0000, 0, rd, cyc);
    check(rd == 32'h0001_3113, $sformatf("MCFG reset value %h", rd));
    nseq = 0;
    for (int cfg = 0; cfg < 6; cfg++) begin
      fws = $urandom_range(4, 0); sws = $urandom_range(3, 0);
      fsws = $urandom_range(2, 0); ssws = $urandom_range(1, 0);
      b16 = (cfg % 3) != 2;
      xfer(1, SZ_WORD, 32'h0800_0000, {12'd0, 4'(ssws), 4'(fsws), 3'd0, b16, 4'(sws), 4'(fws)}, rd, cyc);
      nxt_ok = 0;
      bus16_m = b16;
      for (int t = 0; t < 150; t++) begin
        sz   = asb_size_e'($urandom_range(2, 0));
        wr   = $urandom_range(1, 0);
        sram = $urandom_range(1, 0);
        a    = $urandom_range(1023, 0);
        if (sz == SZ_HALF) a[0] = 0;
        if (sz == SZ_WORD) a[1:0] = 0;
        if (nxt_ok && $urandom_range(2, 0) == 0 && nxt[9:0] <= 10'd1020) begin
          // continue right after the previous access
          sram = nxt[24];
          a    = {22'd0, nxt[9:0]};
          sz   = (a[1:0] == 0) ? SZ_WORD : (a[0] == 0) ? SZ_HALF : SZ_BYTE;
        end
        sq = nxt_ok && {7'd0, sram, 14'd0, a[9:0]} == nxt;
        if (sq) nseq++;
        wd = $urandom;
        xfer(wr, sz, {7'd0, sram, 14'd0, a[9:0]}, wd, rd, cyc);
        nb = (sz == SZ_BYTE) ? 1 : (sz == SZ_HALF) ? (b16 ? 1 : 2) : (b16 ? 2 : 4);
        ws = sq ? (sram ? ssws : fsws) : (sram ? sws : fws);
        check(cyc == (ws + 1) + (nb - 1) * ((sram ? ssws : fsws) + 1) + 2,
              $sformatf("timing: size %0d bus16 %0d seq %0d took %0d", sz, b16, sq, cyc));
        nxt    = {7'd0, sram, 14'd0, a[9:0]} + (32'd1 << sz);
        nxt_ok = 1;
        for (int k = 0; k < (1 << sz); k++) begin
          if (wr) begin
            if (sram) model_s[a + k] = wd[8*k +: 8]; else model_f[a + k] = wd[8*k +: 8];
          end
        end
        if (!wr) begin
          exp = 0;
          for (int k = 0; k < (1 << sz); k++) exp[8*k +: 8] = sram ? model_s[a + k] : model_f[a + k];
          check(rd == exp, $sformatf("read %h size %0d: %h vs %h", a, sz, rd, exp));
        end
      end
    end
    // the model's memory agrees with the expected contents
    foreach (model_s[i]) if (mem.sram[i] != model_s[i]) begin check(0, $sformatf("sram[%0d]", i)); break; end
    check(mem.sram_cycles > 0 && mem.flash_cycles > 0, "both chip selects used");
    check(nseq > 100, $sformatf("%0d sequential accesses", nseq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
