// tb_sbox_ram - writes all 256 locations with random data, reads them back in
// random order and checks the one-cycle read latency.
module tb_sbox_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  byte unsigned model[256];
  sbox_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = i[7:0]; wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 600; t++) begin
      addr = 8'($urandom);
      if (t % 7 == 3) begin
        we = 1; wdata = 8'($urandom); model[addr] = wdata;
        @(negedge clk); we = 0;
      end else begin
        @(negedge clk);
        check(rdata == model[addr], $sformatf("addr %0d: %h vs %h", addr, rdata, model[addr]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
