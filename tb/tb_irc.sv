// tb_irc - interrupt controller: enable masks, FIQ/IRQ routing, fixed
// priority vectors and the one-clock output latency, driven through APB
// register accesses made on the peripheral strobe.
module tb_irc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic pclk_en = 0, psel = 0, penable = 0, pwrite = 0;
  logic [15:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic [7:0] src = 0;
  logic nfiq, nirq;
  irc dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; paddr = {4'h0, a}; pwrite = 1; pwdata = d; pclk_en = 1;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0; pclk_en = 0;
  endtask
  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; paddr = {4'h0, a}; pwrite = 0;
    @(negedge clk); penable = 1; d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [7:0] en, fsel;
    logic [31:0] rd;
    int ei, ef;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(nirq && nfiq, "lines idle after reset");
    for (int t = 0; t < 200; t++) begin
      en = 8'($urandom); fsel = 8'($urandom);
      apb_write(12'h004, en);
      apb_write(12'h008, fsel);
      src = 8'($urandom);
      @(negedge clk);   // one clock for the registered outputs
      @(negedge clk);
      ei = -1; ef = -1;
      for (int i = 7; i >= 0; i--) begin
        if (src[i] && en[i] && !fsel[i]) ei = i;
        if (src[i] && en[i] &&  fsel[i]) ef = i;
      end
      check(nirq == (ei < 0), $sformatf("nirq src %h en %h fsel %h", src, en, fsel));
      check(nfiq == (ef < 0), $sformatf("nfiq src %h en %h fsel %h", src, en, fsel));
      apb_read(12'h00C, rd);
      check(rd == (ei < 0 ? 32'h8000_0000 : 32'(ei)), $sformatf("IRQ vector %h exp %0d", rd, ei));
      apb_read(12'h010, rd);
      check(rd == (ef < 0 ? 32'h8000_0000 : 32'(ef)), $sformatf("FIQ vector %h exp %0d", rd, ef));
      apb_read(12'h000, rd);
      check(rd[7:0] == src, "raw status");
    end
    // a write without the strobe must not take effect
    @(negedge clk); psel = 1; paddr = 16'h0004; pwrite = 1; pwdata = 32'h0; penable = 1; pclk_en = 0;
    @(negedge clk); psel = 0; penable = 0;
    apb_read(12'h004, rd);
    check(rd[7:0] == en, "write only on the peripheral strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
