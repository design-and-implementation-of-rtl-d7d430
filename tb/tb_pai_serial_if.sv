// tb_pai_serial_if - serial programming interface against a model of a
// baseband register port (samples ser_dout on ser_clk rising edges while
// bb_cs_n is low and answers on ser_din) and of a synthesiser shift register
// latched by syn_le. Checks the bits sent, MSB first, the bits read back, the
// chip select and latch behaviour and the serial clock period.
module tb_pai_serial_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic start = 0, target = 0, busy, done, ser_clk, ser_dout, ser_din, bb_cs_n, syn_le;
  logic [5:0] nbits = 16;
  logic [7:0] div = 2;
  logic [31:0] tx_data = 0, rx_data;
  pai_serial_if dut (.*);

  // device models
  logic [31:0] bb_in = 0, syn_sh = 0, syn_latched = 0, bb_reply = 0;
  int bb_bits = 0, syn_bits = 0, nle = 0, last_rise = 0, period = 0;
  logic clk_q = 0, le_q = 0;
  assign ser_din = bb_reply[31];
  always @(posedge clk) begin
    clk_q <= ser_clk;
    le_q  <= syn_le;
    if (ser_clk && !clk_q) begin
      period = $time / 10 - last_rise;
      last_rise = $time / 10;
      if (!bb_cs_n) begin bb_in = {bb_in[30:0], ser_dout}; bb_bits++; bb_reply = bb_reply << 1; end
      else begin syn_sh = {syn_sh[30:0], ser_dout}; syn_bits++; end
    end
    if (syn_le && !le_q) begin syn_latched = syn_sh; nle++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, mask, reply0;
    int nle0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      target = t % 2;
      nbits = $urandom_range(32, 1);
      div = $urandom_range(4, 0);
      w = $urandom;
      mask = (nbits == 32) ? 32'hFFFF_FFFF : (32'd1 << nbits) - 1;
      tx_data = w;
      bb_in = 0; syn_sh = 0; bb_bits = 0; syn_bits = 0;
      bb_reply = $urandom;
      reply0 = bb_reply;
      nle0 = nle;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      wait (done);
      @(negedge clk);
      if (target == 0) begin
        check(bb_bits == nbits && syn_bits == 0, $sformatf("bb bit count %0d/%0d", bb_bits, nbits));
        check((bb_in & mask) == (w & mask), $sformatf("bb data %h vs %h", bb_in & mask, w & mask));
        check(rx_data == (reply0 >> (32 - nbits)), $sformatf("read back %h", rx_data));
      end else begin
        check(syn_bits == nbits && bb_bits == 0, "synth bit count");
        check((syn_latched & mask) == (w & mask), "synth word latched by syn_le");
        check(nle == nle0 + 1, "one latch pulse per synth word");
      end
      if (nbits > 1) check(period == 2 * (div + 1), $sformatf("ser_clk period %0d", period));
      check(bb_cs_n, "chip select released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
