// tb_wep - WEP engine through its registers with a bus memory model on its
// master port. The grant is delayed by a random number of clocks to stand in
// for other masters. For several random keys and lengths:
//  - encrypt: the output must equal plaintext||ICV XOR the RC4 reference
//    keystream, the ICV register the reference CRC-32, done/irq must follow
//  - decrypt of that output must give back the plaintext with icv_ok set
//  - decrypt after one flipped ciphertext bit must clear icv_ok
module tb_wep;
  import mac_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  asb_req_t s_req = ASB_REQ_IDLE, m_req;
  asb_rsp_t s_rsp, m_rsp;
  logic m_breq, m_gnt = 0, irq;
  wep dut (.*);
  bus_mem_model #(.AW(12), .MAXWAIT(2)) mem (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  // grant after 0..3 clocks of request, held while requested
  always @(posedge clk)
    if (!m_breq) m_gnt <= 1'b0;
    else if (!m_gnt && $urandom_range(0, 3) == 0) m_gnt <= 1'b1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b1, size: SZ_WORD, addr: {24'h200000, a}, wdata: d};
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask
  task automatic reg_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req = '{valid: 1'b1, write: 1'b0, size: SZ_WORD, addr: {24'h200000, a}, wdata: 0};
    #1 d = s_rsp.rdata;
    @(negedge clk);
    s_req = ASB_REQ_IDLE;
  endtask

  task automatic run(input logic [31:0] src, dst, len, input bit dec, output logic [31:0] st);
    reg_wr(8'h08, src);
    reg_wr(8'h0C, dst);
    reg_wr(8'h10, len);
    reg_wr(8'h00, {29'd0, 1'b1, dec, 1'b1});
    wait (irq);
    reg_rd(8'h04, st);
    reg_wr(8'h04, 32'h2);
    check(!irq && st[1] && !st[0], $sformatf("done, not busy, irq cleared (status %h)", st));
  endtask

  initial begin
    bytes_t key, pt, ks;
    logic [31:0] st, c, w;
    int n, kl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      kl = (r == 0) ? 8 : (r == 1) ? 16 : $urandom_range(4, 16);
      n  = (r == 0) ? 1 : $urandom_range(2, 200);
      key.delete();
      repeat (kl) key.push_back(8'($urandom));
      for (int k = 0; k < 4; k++) begin
        w = 0;
        for (int b = 0; b < 4; b++) if (4 * k + b < kl) w[8*b +: 8] = key[4*k+b];
        reg_wr(8'h20 + 8'(4 * k), w);
      end
      reg_wr(8'h14, kl);
      pt.delete();
      for (int i = 0; i < n; i++) begin pt.push_back(8'($urandom)); mem.mem[12'h100 + i] = pt[i]; end
      c = crc32_ref(pt);
      ks = rc4_ref(key, n + 4);
      // encrypt
      run(32'h100, 32'h400, n, 1'b0, st);
      reg_rd(8'h18, w);
      check(w == c, $sformatf("ICV %h, expected %h", w, c));
      for (int i = 0; i < n + 4; i++) begin
        logic [7:0] e;
        e = ((i < n) ? pt[i] : c[8*(i-n) +: 8]) ^ ks[i];
        if (mem.mem[12'h400 + i] != e) begin
          check(0, $sformatf("round %0d ciphertext byte %0d: %h expected %h", r, i, mem.mem[12'h400 + i], e));
          break;
        end
      end
      check(1, "ciphertext compared");
      // decrypt
      for (int i = 0; i < n; i++) mem.mem[12'h800 + i] = 8'h00;
      run(32'h400, 32'h800, n, 1'b1, st);
      check(st[2], $sformatf("round %0d: ICV correct after decrypt", r));
      for (int i = 0; i < n; i++)
        if (mem.mem[12'h800 + i] != pt[i]) begin check(0, $sformatf("round %0d plaintext byte %0d", r, i)); break; end
      // decrypt with one bit flipped (in the body or in the ICV)
      mem.mem[12'h400 + $urandom_range(0, n + 3)] ^= 8'(1 << $urandom_range(0, 7));
      run(32'h400, 32'h800, n, 1'b1, st);
      check(!st[2], $sformatf("round %0d: ICV error detected", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
