// tb_rc4_engine - runs the key schedule for several keys (64-bit WEP seeds,
// a 128-bit seed and a published RC4 test key) and compares the keystream with
// the reference model, including the key schedule and per-byte cycle counts.
module tb_rc4_engine;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic start = 0, ks_req = 0, busy, ks_valid;
  logic [7:0] key [16];
  logic [4:0] keylen = 8;
  logic [7:0] ks_byte;
  rc4_engine dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t k, ref_ks;
    int cyc;
    foreach (key[i]) key[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      k.delete();
      if (t == 0) begin k = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05}; end       // RFC 6229 key
      else if (t == 3) repeat (16) k.push_back(8'($urandom));
      else repeat (8) k.push_back(8'($urandom));
      foreach (k[i]) key[i] = k[i];
      keylen = 5'(k.size());
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == 256 + 4 * 256 + 1, $sformatf("key schedule took %0d clocks", cyc));
      ref_ks = rc4_ref(k, 40);
      if (t == 0) check(ref_ks[0] == 8'hB2 && ref_ks[1] == 8'h39, "reference model vs RFC 6229");
      for (int n = 0; n < 40; n++) begin
        ks_req = 1; @(negedge clk); ks_req = 0;
        cyc = 1;
        while (!ks_valid) begin @(negedge clk); cyc++; end
        check(ks_byte == ref_ks[n], $sformatf("key %0d byte %0d: %h vs %h", t, n, ks_byte, ref_ks[n]));
        if (n == 0) check(cyc == 7, $sformatf("keystream latency %0d", cyc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
