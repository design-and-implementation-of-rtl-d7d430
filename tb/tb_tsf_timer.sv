// tb_tsf_timer - the 64-bit TSF counter advances once per TICK_DIV clocks,
// loads a new value (including a carry across bit 32), and the compare
// raises one event pulse when the count reaches the armed value.
module tb_tsf_timer;
  localparam int TD = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic load = 0, arm = 0, armed, event_o;
  logic [63:0] load_value = 0, cmp_value = 0, tsf;
  int nevents = 0;
  tsf_timer #(.TICK_DIV(TD)) dut (.*);
  always @(posedge clk) if (event_o) nevents++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] t0;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (TD * 50) @(negedge clk);
    check(tsf == 50, $sformatf("50 microseconds: %0d", tsf));
    // load close to a 32-bit carry
    load_value = 64'h0000_0001_FFFF_FFFE;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check(tsf == 64'h0000_0001_FFFF_FFFE, "loaded");
    repeat (TD * 3) @(negedge clk);
    check(tsf == 64'h0000_0002_0000_0001, $sformatf("carry: %h", tsf));
    // compare
    t0 = tsf;
    cmp_value = t0 + 25;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    check(armed, "armed");
    cyc = 0;
    while (!event_o) begin @(negedge clk); cyc++; end
    check(tsf == t0 + 25, $sformatf("event at %0d", tsf - t0));
    check(cyc >= 24 * TD && cyc <= 25 * TD, $sformatf("event after %0d clocks", cyc));
    repeat (TD * 30) @(negedge clk);
    check(nevents == 1 && !armed, "single event, then disarmed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
