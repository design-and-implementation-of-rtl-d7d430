// tb_crc32_parallel - byte-parallel ICV engine against the bit-serial
// reference CRC-32 on random blocks and the standard check value.
module tb_crc32_parallel;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic init = 0, en = 0;
  logic [7:0] din = 0;
  logic [31:0] crc, icv;
  crc32_parallel dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t d;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      d.delete();
      if (f == 0) for (int k = 1; k <= 9; k++) d.push_back(8'(8'h30 + k));
      else repeat ($urandom_range(100, 1)) d.push_back(8'($urandom));
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      cyc = 0;
      foreach (d[n]) begin
        en = 1; din = d[n];
        @(negedge clk); cyc++;
      end
      en = 0;
      check(icv == crc32_ref(d), $sformatf("block %0d icv %h ref %h", f, icv, crc32_ref(d)));
      check(cyc == d.size(), "one byte per clock");
      if (f == 0) check(icv == 32'hCBF4_3926, "check value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
