// tb_crc32_serial - feeds random frames bit by bit (LSB first), checks the
// transmitted FCS against the reference CRC-32 and checks that data + FCS
// leaves the receive residue, and that a corrupted frame does not.
module tb_crc32_serial;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic init = 0, en = 0, din = 0;
  logic [31:0] crc;
  logic residue_ok;
  crc32_serial dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input logic b);
    @(negedge clk); en = 1; din = b;
    @(negedge clk); en = 0;
  endtask

  initial begin
    bytes_t d;
    logic [31:0] ref_crc, fcs;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      d.delete();
      repeat ($urandom_range(40, 1)) d.push_back(8'($urandom));
      if (f == 0) begin d.delete(); for (int k = 1; k <= 9; k++) d.push_back(8'(8'h30 + k)); end
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      foreach (d[n]) for (int b = 0; b < 8; b++) send_bit(d[n][b]);
      ref_crc = crc32_ref(d);
      fcs = ~crc;    // FCS bits are ~crc[0..31]
      check(fcs == ref_crc, $sformatf("frame %0d fcs %h ref %h", f, fcs, ref_crc));
      if (f == 0) check(fcs == 32'hCBF4_3926, "check value of '123456789'");
      // receive side: append FCS bits and check the residue
      for (int b = 0; b < 32; b++) send_bit(fcs[b]);
      check(residue_ok, $sformatf("frame %0d residue", f));
      // corrupted frame
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      foreach (d[n]) for (int b = 0; b < 8; b++) send_bit(d[n][b] ^ (n == 0 && b == 3));
      for (int b = 0; b < 32; b++) send_bit(fcs[b]);
      check(!residue_ok, $sformatf("frame %0d corruption detected", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
