// tb_timers - both timers in one-shot and periodic mode with different
// prescalers: expiry time N*(PRESCALE+1) clocks, interrupt enable, flag
// clearing, reload and independence of the two counters.
module tb_timers;
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
  logic [1:0] irq;
  timers dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A write takes effect at the third rising edge after the call starts.
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; paddr = {4'h0, a}; pwrite = 1; pwdata = d;
    @(negedge clk); penable = 1; pclk_en = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0; pclk_en = 0;
  endtask
  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; paddr = {4'h0, a}; pwrite = 0;
    @(negedge clk); penable = 1; d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] rd;
    int cyc, n, pre;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int ti = t % 2;
      n = $urandom_range(40, 1); pre = $urandom_range(5, 0);
      apb_write(12'(16 * ti + 12), pre);
      apb_write(12'(16 * ti), n);
      apb_write(12'(16 * ti + 8), 32'b101);          // enable, one-shot, irq enable
      // enabled at the edge that ended the last write
      cyc = 0;
      while (!irq[ti]) begin @(negedge clk); cyc++; end
      check(cyc == n * (pre + 1), $sformatf("timer %0d N=%0d pre=%0d expired after %0d", ti, n, pre, cyc));
      check(irq[1 - ti] == 0, "other timer quiet");
      apb_read(12'(16 * ti + 8), rd);
      check(rd[0] == 0, "one-shot timer stopped");
      apb_write(12'h020, 32'(1 << ti));
      check(irq[ti] == 0, "flag cleared");
    end
    // periodic mode: timer 1, three periods
    apb_write(12'h01C, 1);
    apb_write(12'h010, 10);
    apb_write(12'h018, 32'b111);
    for (int k = 0; k < 3; k++) begin
      cyc = 0;
      while (!irq[1]) begin @(negedge clk); cyc++; end
      check(cyc >= 17 && cyc <= 20, $sformatf("periodic expiry after %0d", cyc));
      @(negedge clk); psel = 1; paddr = 16'h0020; pwrite = 1; pwdata = 2; penable = 1; pclk_en = 1;
      @(negedge clk); psel = 0; penable = 0; pwrite = 0; pclk_en = 0;
    end
    // interrupt disabled: flag set but no irq
    apb_write(12'h00C, 0);
    apb_write(12'h000, 3);
    apb_write(12'h008, 32'b001);
    repeat (10) @(negedge clk);
    apb_read(12'h020, rd);
    check(rd[0] == 1 && irq[0] == 0, "masked expiry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
