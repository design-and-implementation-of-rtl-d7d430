// tb_apb_bridge - bridge with two register-file peripherals: write/read
// data, APB phase sequence (setup then enable, each one peripheral clock),
// the 1/3 clock strobe, the transfer time and the error for an unmapped
// peripheral.
module tb_apb_bridge;
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
  logic pclk_en, penable, pwrite;
  logic [15:0] paddr;
  logic [1:0] psel;
  logic [31:0] pwdata;
  logic [31:0] prdata [2];
  logic [31:0] regs [2][16];
  int strobes = 0, clocks = 0, protocol_errs = 0;

  apb_bridge dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .pclk_en, .paddr, .psel, .penable,
    .pwrite, .pwdata, .prdata);

  // Peripherals: plain register files acting on psel & penable & pclk_en.
  always_comb for (int p = 0; p < 2; p++) prdata[p] = regs[p][paddr[5:2]];
  logic [1:0] psel_prev;
  logic pen_prev;
  always_ff @(posedge clk) begin
    clocks  <= clocks + 1;
    if (pclk_en) strobes <= strobes + 1;
    for (int p = 0; p < 2; p++)
      if (psel[p] && penable && pclk_en && pwrite) regs[p][paddr[5:2]] <= pwdata;
    // APB rules: penable only with psel, and only after a setup phase
    if (penable && psel == 0) protocol_errs <= protocol_errs + 1;
    if (penable && !pen_prev && psel_prev != psel) protocol_errs <= protocol_errs + 1;
    psel_prev <= psel;
    pen_prev  <= penable;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                      output logic [31:0] rd, output logic err, output int cyc);
    @(negedge clk);
    req = '{valid: 1'b1, write: wr, size: SZ_WORD, addr: a, wdata: wd};
    cyc = 1;
    while (!rsp.ready) begin @(negedge clk); cyc++; end
    rd = rsp.rdata; err = rsp.error;
    @(negedge clk);
    req = ASB_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd, model [2][16];
    logic err;
    int cyc, p, r;
    foreach (regs[i, j]) begin regs[i][j] = 0; model[i][j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      p = $urandom_range(1, 0); r = $urandom_range(15, 0);
      if ($urandom_range(1, 0)) begin
        model[p][r] = $urandom;
        xfer(1, {16'h8000, 4'(p), 6'd0, 4'(r), 2'b00}, model[p][r], rd, err, cyc);
      end else begin
        xfer(0, {16'h8000, 4'(p), 6'd0, 4'(r), 2'b00}, 0, rd, err, cyc);
        check(rd == model[p][r], $sformatf("read p%0d r%0d %h vs %h", p, r, rd, model[p][r]));
      end
      check(!err, "no error");
      // a transfer waits for a strobe, then two peripheral clocks, then one clock
      check(cyc >= 2 * 3 + 2 && cyc <= 3 * 3 + 2, $sformatf("transfer took %0d clocks", cyc));
    end
    xfer(0, 32'h8000_5000, 0, rd, err, cyc);
    check(err && cyc <= 3, "unmapped peripheral gives an error");
    check(protocol_errs == 0, "APB phase sequence");
    check(strobes * 3 <= clocks + 3 && strobes * 3 >= clocks - 3, $sformatf("pclk_en ratio %0d/%0d", strobes, clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
