// tb_mac_top - end-to-end test of the MAC processor chip with default
// parameters. The testbench plays the ARM core running interrupt-driven
// firmware on the cpu_* port (bus request, grant, then one transfer), and
// provides external Flash/SRAM, the PHY and a PC host. Every mechanism is made
// to happen and counted:
//   tx frames on air, rx good frames, rx CRC errors, rx too-long/overflow,
//   transmit underrun (DMA runs into an unmapped address), TSF-triggered
//   transmit, WEP encrypt and decrypt (with ICV check), PCMCIA DATA accesses
//   and mailboxes both ways with IREQ#, timer expiries on IRQ and FIQ,
//   interrupt controller vector reads, bus arbitration contention (the CPU
//   requesting while another master owns the bus), external memory wait
//   states on the 16- and 8-bit bus, a sequential access taking the shorter
//   S wait states, and serial programming of the baseband.
// The interrupt handler (service) reads the vector, reads and clears the
// source, and counts. Data are checked against reference models (CRC-32,
// RC4) and against memory contents.
module tb_mac_top;
  import mac_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- chip and models ----------------
  logic cpu_breq = 0, cpu_gnt, nfiq, nirq;
  asb_req_t cpu_req = ASB_REQ_IDLE;
  asb_rsp_t cpu_rsp;
  logic [23:0] ext_addr;
  logic [15:0] ext_wdata, ext_rdata;
  logic ext_data_oe, ext_cs_sram_n, ext_cs_flash_n, ext_oe_n, ext_we_n;
  logic [1:0] ext_be_n;
  logic phy_tx_pe, phy_tx_rdy, phy_txclk, phy_txd, phy_rx_pe, phy_md_rdy, phy_rxclk, phy_rxd;
  logic ser_clk, ser_dout, ser_din, bb_cs_n, syn_le;
  logic [9:0] host_addr = 0;
  logic [7:0] host_din = 0, host_dout;
  logic host_dout_oe, host_ce_n = 1, host_oe_n = 1, host_we_n = 1, host_reg_n = 1;
  logic host_wait_n, host_ireq_n;
  logic bus16 = 1;

  mac_top dut (.*);
  ext_mem_model #(.AW(16)) xm (.clk, .addr(ext_addr), .wdata(ext_wdata), .rdata(ext_rdata),
    .cs_sram_n(ext_cs_sram_n), .cs_flash_n(ext_cs_flash_n), .oe_n(ext_oe_n), .we_n(ext_we_n),
    .be_n(ext_be_n), .bus16);
  phy_model #(.HALF(5), .PREAMBLE(40)) phy (.clk, .tx_pe(phy_tx_pe), .txd(phy_txd), .tx_rdy(phy_tx_rdy),
    .txclk(phy_txclk), .rx_pe(phy_rx_pe), .md_rdy(phy_md_rdy), .rxclk(phy_rxclk), .rxd(phy_rxd));
  assign ser_din = ser_dout;   // baseband echoes the serial data

  localparam logic [31:0] SRAM = 32'h0100_0000, MCFG = 32'h0800_0000, PAI = 32'h1000_0000,
                          WEP = 32'h2000_0000, PCM = 32'h3000_0000, IRC = 32'h8000_0000,
                          TIM = 32'h8000_1000;

  // ---------------- mechanism counters ----------------
  int n_tx, n_rx, n_crc_err, n_ovf, n_underrun, n_tsf, n_ser, n_wep_enc, n_wep_dec, n_icv_err;
  int n_tim0, n_tim1_fiq, n_irq_vec, n_pc_mbox_arm, n_pc_mbox_host, n_pc_data;
  int n_contention, n_wait_clk, n_wait_clk8, n_spurious, n_seq;
  bit wep_icv_ok;
  initial begin
    {n_tx, n_rx, n_crc_err, n_ovf, n_underrun, n_tsf, n_ser, n_wep_enc, n_wep_dec, n_icv_err} = '0;
    {n_tim0, n_tim1_fiq, n_irq_vec, n_pc_mbox_arm, n_pc_mbox_host, n_pc_data} = '0;
    {n_contention, n_wait_clk, n_wait_clk8, n_spurious, n_seq} = '0;
  end
  always @(posedge clk) begin
    if (cpu_breq && !cpu_gnt) n_contention++;   // CPU kept waiting by another master
    if (cpu_req.valid && !cpu_rsp.ready && (!ext_cs_sram_n || !ext_cs_flash_n)) begin
      if (bus16) n_wait_clk++; else n_wait_clk8++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CPU bus ----------------
  task automatic cpu_xfer(input bit wr, input logic [31:0] a, input logic [31:0] d,
                          input asb_size_e sz, output logic [31:0] q);
    @(negedge clk);
    cpu_breq = 1'b1;
    while (!cpu_gnt) @(negedge clk);
    cpu_req = '{valid: 1'b1, write: wr, size: sz, addr: a, wdata: d};
    #1;
    while (!cpu_rsp.ready) begin @(negedge clk); #1; end
    q = cpu_rsp.rdata;
    @(negedge clk);
    cpu_req  = ASB_REQ_IDLE;
    cpu_breq = 1'b0;
  endtask
  task automatic wr32(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q;
    cpu_xfer(1, a, d, SZ_WORD, q);
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] q);
    cpu_xfer(0, a, 0, SZ_WORD, q);
  endtask

  // ---------------- interrupt handler ----------------
  task automatic service();
    logic [31:0] v, s;
    if (!nfiq) begin
      rd32(IRC + 32'h10, v);
      if (v == 4) begin
        n_tim1_fiq++;
        wr32(TIM + 32'h20, 32'h2);
      end else n_spurious++;
      repeat (2) @(negedge clk);   // let the registered lines follow
    end else if (!nirq) begin
      rd32(IRC + 32'h0C, v);
      n_irq_vec++;
      case (v)
        0: begin
          rd32(PAI + 32'h04, s);
          if (s[0]) n_tx++;
          if (s[1]) n_underrun++;
          if (s[2] && !s[3] && !s[4]) n_rx++;
          if (s[3]) n_crc_err++;
          if (s[4]) n_ovf++;
          if (s[5]) n_tsf++;
          if (s[6]) n_ser++;
          wr32(PAI + 32'h04, {25'd0, s[6:0]});
        end
        1: begin
          rd32(WEP + 32'h00, v);
          rd32(WEP + 32'h04, s);
          if (v[1]) begin n_wep_dec++; wep_icv_ok = s[2]; if (!s[2]) n_icv_err++; end
          else n_wep_enc++;
          wr32(WEP + 32'h04, 32'h2);
        end
        2: begin
          rd32(PCM + 32'h04, s);
          n_pc_mbox_arm++;
          wr32(PCM + 32'h08, 32'h1);
          wr32(PCM + 32'h00, s + 1);   // reply to the host
        end
        3: begin n_tim0++; wr32(TIM + 32'h20, 32'h1); end
        default: n_spurious++;
      endcase
      repeat (2) @(negedge clk);
    end else @(negedge clk);
  endtask

  // ---------------- PC host ----------------
  task automatic host_cycle(input bit wr, input bit reg_sp, input logic [9:0] a,
                            input logic [7:0] d, output logic [7:0] q);
    #($urandom_range(1, 9));
    host_addr = a; host_reg_n = !reg_sp; host_din = d;
    #5 host_ce_n = 0;
    if (wr) host_we_n = 0; else host_oe_n = 0;
    #40;
    while (!host_wait_n) #3;
    #20 q = host_dout;
    host_we_n = 1; host_oe_n = 1;
    #5 host_ce_n = 1;
    #40;
  endtask
  task automatic host_wr(input bit reg_sp, input logic [9:0] a, input logic [7:0] d);
    logic [7:0] q;
    host_cycle(1, reg_sp, a, d, q);
  endtask
  task automatic host_rd(input bit reg_sp, input logic [9:0] a, output logic [7:0] q);
    host_cycle(0, reg_sp, a, 0, q);
  endtask

  bit host_done = 0;
  task automatic host_session();
    logic [7:0] q, wd [48];
    logic [31:0] p = SRAM + 32'h3000;
    host_wr(1, 10'h3F8, 8'h01);                  // configure the card
    for (int b = 0; b < 4; b++) host_wr(0, 10'(b), p[8*b +: 8]);
    for (int i = 0; i < 48; i++) begin
      wd[i] = 8'($urandom);
      host_wr(0, 10'd4, wd[i]);
      n_pc_data++;
    end
    for (int b = 0; b < 4; b++) host_wr(0, 10'(b), p[8*b +: 8]);
    for (int i = 0; i < 48; i++) begin
      host_rd(0, 10'd4, q);
      n_pc_data++;
      if (q != wd[i]) begin check(0, $sformatf("host read-back byte %0d", i)); break; end
    end
    for (int i = 0; i < 48; i++)
      if (xm.sram[16'(16'h3000 + i)] != wd[i]) begin check(0, $sformatf("host data in SRAM byte %0d", i)); break; end
    check(1, "host data path compared");
    host_wr(0, 10'd5, 8'h40);                    // mailbox to the ARM
    while (host_ireq_n) #10;                     // wait for the reply
    host_rd(0, 10'd5, q);
    check(q == 8'h41, $sformatf("ARM mailbox reply %h", q));
    n_pc_mbox_host++;
    host_wr(0, 10'd6, 8'h01);
    #100;
    check(host_ireq_n, "IREQ# released");
    host_done = 1;
  endtask

  // ---------------- helpers ----------------
  task automatic check_frame(input bytes_t d, input string what);
    bytes_t got;
    logic [31:0] c = crc32_ref(d);
    int n = d.size();
    check(phy.tx_frames.size() != 0, {what, ": frame on air"});
    if (phy.tx_frames.size() == 0) return;
    got = phy.tx_frames.pop_front();
    check(got.size() == n + 4, $sformatf("%s: %0d bytes on air", what, got.size()));
    for (int i = 0; i < n && i < got.size(); i++)
      if (got[i] != d[i]) begin check(0, $sformatf("%s byte %0d", what, i)); break; end
    if (got.size() == n + 4)
      check({got[n + 3], got[n + 2], got[n + 1], got[n]} == c, {what, ": FCS"});
  endtask
  task automatic put_sram(input logic [31:0] a, input bytes_t d);
    foreach (d[i]) xm.sram[16'(a + i)] = d[i];
  endtask
  function automatic bytes_t rand_bytes(input int n);
    bytes_t d;
    repeat (n) d.push_back(8'($urandom));
    return d;
  endfunction
  function automatic bytes_t with_fcs(input bytes_t d);
    logic [31:0] c = crc32_ref(d);
    for (int k = 0; k < 4; k++) d.push_back(c[8*k +: 8]);
    return d;
  endfunction

  // ---------------- test ----------------
  initial begin
    bytes_t txd, pt, key, ks, rxf;
    logic [31:0] r, c, t_lo, t_hi;
    logic [63:0] t;
    int k0, k1;
    time t0, t1;
    for (int i = 0; i < 16; i++) xm.flash[i] = 8'(8'hE0 + i);   // "firmware" words
    repeat (3) @(negedge clk);
    rst_n = 1;

    // boot: memory controller and Flash
    rd32(MCFG, r);
    check(r == 32'h0001_3113, $sformatf("MCFG reset value %h", r));
    rd32(32'h0000_0004, r);
    check(r == 32'hE7E6E5E4, $sformatf("Flash word %h", r));
    // sequential access: with no S wait states the next word comes faster
    wr32(MCFG, 32'h0001_0113);
    t0 = $time;
    rd32(32'h0000_0008, r);
    t1 = $time;
    check(r == 32'hEBEAE9E8, $sformatf("Flash word %h", r));
    rd32(32'h0000_000C, r);
    check(r == 32'hEFEEEDEC, $sformatf("Flash word %h", r));
    if ($time - t1 < t1 - t0) n_seq++;
    wr32(MCFG, 32'h0001_3113);
    // interrupt controller and timers
    wr32(IRC + 32'h04, 32'h1F);
    wr32(IRC + 32'h08, 32'h10);                  // timer 1 on FIQ
    wr32(TIM + 32'h0C, 32'd19);                  // timer 0: 1 us ticks
    wr32(TIM + 32'h00, 32'd500);                 // every 500 us
    wr32(TIM + 32'h08, 32'h7);
    wr32(TIM + 32'h10, 32'd30000);               // timer 1 one-shot, 50 ns ticks
    wr32(TIM + 32'h18, 32'h5);
    wr32(PAI + 32'h08, 32'h7F);
    // key and plaintext for WEP, frame for the PAI
    key = rand_bytes(8);
    pt  = rand_bytes(120);
    put_sram(32'h100, pt);
    for (int k = 0; k < 2; k++)
      wr32(WEP + 32'h20 + 4 * k, {key[4*k+3], key[4*k+2], key[4*k+1], key[4*k]});
    wr32(WEP + 32'h14, 8);
    txd = rand_bytes(200);
    put_sram(32'h1000, txd);

    // ---- concurrent phase: host session, WEP encrypt and a transmit ----
    fork host_session(); join_none
    wr32(WEP + 32'h08, SRAM + 32'h100);
    wr32(WEP + 32'h0C, SRAM + 32'h400);
    wr32(WEP + 32'h10, 120);
    wr32(WEP + 32'h00, 32'h5);                   // encrypt, irq enabled
    wr32(PAI + 32'h0C, SRAM + 32'h1000);
    wr32(PAI + 32'h10, 200);
    wr32(PAI + 32'h00, 32'h1);
    while (!(n_wep_enc == 1 && n_tx == 1 && host_done)) service();
    check_frame(txd, "frame sent during WEP and host traffic");
    ks = rc4_ref(key, 124);
    c = crc32_ref(pt);
    k0 = 0;
    for (int i = 0; i < 124; i++)
      if (xm.sram[16'(16'h400 + i)] != (((i < 120) ? pt[i] : c[8*(i-120) +: 8]) ^ ks[i])) k0++;
    check(k0 == 0, $sformatf("WEP ciphertext, %0d bytes wrong", k0));

    // ---- WEP decrypt, good and with a corrupted byte ----
    for (int f = 0; f < 2; f++) begin
      if (f == 1) xm.sram[16'h410] ^= 8'h80;
      wr32(WEP + 32'h08, SRAM + 32'h400);
      wr32(WEP + 32'h0C, SRAM + 32'h800);
      wr32(WEP + 32'h00, 32'h7);                 // decrypt, irq enabled
      k1 = n_wep_dec;
      while (n_wep_dec == k1) service();
      check(wep_icv_ok == (f == 0), $sformatf("decrypt %0d ICV result %b", f, wep_icv_ok));
      if (f == 0) begin
        k0 = 0;
        for (int i = 0; i < 120; i++) if (xm.sram[16'(16'h800 + i)] != pt[i]) k0++;
        check(k0 == 0, $sformatf("WEP plaintext, %0d bytes wrong", k0));
      end
    end

    // ---- receive: good frame, CRC error, too long ----
    wr32(PAI + 32'h14, SRAM + 32'h2000);
    wr32(PAI + 32'h00, 32'h2);
    rxf = with_fcs(rand_bytes(100));
    fork phy.send_frame(rxf); join_none
    while (n_rx == 0) service();
    rd32(PAI + 32'h1C, r);
    check(r == 104, $sformatf("RX_LEN %0d", r));
    k0 = 0;
    for (int i = 0; i < 104; i++) if (xm.sram[16'(16'h2000 + i)] != rxf[i]) k0++;
    check(k0 == 0, $sformatf("received frame in SRAM, %0d bytes wrong", k0));
    rxf = with_fcs(rand_bytes(60));
    rxf[17] ^= 8'h10;
    fork phy.send_frame(rxf); join_none
    while (n_crc_err == 0) service();
    wr32(PAI + 32'h18, 40);                      // RX_MAXLEN
    rxf = with_fcs(rand_bytes(80));
    fork phy.send_frame(rxf); join_none
    while (n_ovf == 0) service();
    wr32(PAI + 32'h18, 2346);
    wr32(PAI + 32'h00, 32'h0);

    // ---- transmit underrun: the DMA runs into unmapped space ----
    wr32(PAI + 32'h0C, 32'h3FFF_FFF0);
    wr32(PAI + 32'h10, 100);
    wr32(PAI + 32'h00, 32'h1);
    while (n_underrun == 0) service();
    rd32(PAI + 32'h04, r);
    check(r[11], "DMA error reported");
    check(phy.tx_frames.size() <= 1, "at most a truncated frame on air");
    phy.tx_frames.delete();

    // ---- TSF-triggered transmit ----
    txd = rand_bytes(30);
    put_sram(32'h1400, txd);
    wr32(PAI + 32'h0C, SRAM + 32'h1400);
    wr32(PAI + 32'h10, 30);
    rd32(PAI + 32'h20, t_lo);
    rd32(PAI + 32'h24, t_hi);
    t = {t_hi, t_lo} + 64'd50;
    wr32(PAI + 32'h28, t[31:0]);
    wr32(PAI + 32'h00, 32'h4);
    wr32(PAI + 32'h2C, t[63:32]);
    k1 = n_tx;
    while (n_tx == k1) service();
    check(n_tsf > 0, "TSF event seen with the transmit");
    check_frame(txd, "TSF-started frame");

    // ---- 8-bit external bus ----
    wr32(MCFG, 32'h0000_0023);                   // 8 bit, SRAM 2, Flash 3 wait states
    bus16 = 0;
    wr32(SRAM + 32'h5000, 32'hCAFE_F00D);
    rd32(SRAM + 32'h5000, r);
    check(r == 32'hCAFE_F00D, $sformatf("8-bit bus word %h", r));
    check({xm.sram[16'h5003], xm.sram[16'h5002], xm.sram[16'h5001], xm.sram[16'h5000]} == 32'hCAFE_F00D,
          "8-bit bus byte order in SRAM");
    txd = rand_bytes(40);
    put_sram(32'h1800, txd);
    wr32(PAI + 32'h0C, SRAM + 32'h1800);
    wr32(PAI + 32'h10, 40);
    wr32(PAI + 32'h00, 32'h1);
    k1 = n_tx;
    while (n_tx == k1) service();
    check_frame(txd, "frame fetched over the 8-bit bus");
    wr32(MCFG, 32'h0001_3113);
    bus16 = 1;

    // ---- serial programming of the baseband ----
    wr32(PAI + 32'h30, 32'h0000_1234);
    wr32(PAI + 32'h34, {16'd0, 8'd1, 1'b0, 1'b0, 6'd16});
    while (n_ser == 0) service();
    rd32(PAI + 32'h38, r);
    check(r[15:0] == 16'h1234, $sformatf("serial echo %h", r));

    // ---- timers: at least two periodic expiries and the FIQ ----
    while (n_tim0 < 2 || n_tim1_fiq == 0) service();

    $display("mechanism counts:");
    $display("  tx frames %0d, rx good %0d, rx CRC errors %0d, rx too long %0d, tx underruns %0d",
             n_tx, n_rx, n_crc_err, n_ovf, n_underrun);
    $display("  TSF triggers %0d, serial transfers %0d, WEP encrypt %0d, decrypt %0d (ICV errors %0d)",
             n_tsf, n_ser, n_wep_enc, n_wep_dec, n_icv_err);
    $display("  PCMCIA data accesses %0d, mailbox to ARM %0d, to host %0d",
             n_pc_data, n_pc_mbox_arm, n_pc_mbox_host);
    $display("  timer 0 IRQs %0d, timer 1 FIQs %0d, IRQ vector reads %0d, spurious %0d",
             n_tim0, n_tim1_fiq, n_irq_vec, n_spurious);
    $display("  CPU clocks waiting for the bus %0d, CPU wait clocks 16-bit %0d, 8-bit %0d, faster sequential reads %0d",
             n_contention, n_wait_clk, n_wait_clk8, n_seq);
    check(n_tx >= 3, "tx happened");
    check(n_rx >= 1, "rx happened");
    check(n_crc_err >= 1, "CRC error happened");
    check(n_ovf >= 1, "too-long frame happened");
    check(n_underrun >= 1, "underrun happened");
    check(n_tsf >= 1, "TSF trigger happened");
    check(n_ser >= 1, "serial transfer happened");
    check(n_wep_enc >= 1 && n_wep_dec >= 2 && n_icv_err >= 1, "WEP encrypt/decrypt happened");
    check(n_pc_data >= 96 && n_pc_mbox_arm >= 1 && n_pc_mbox_host >= 1, "PCMCIA access happened");
    check(n_tim0 >= 2 && n_tim1_fiq >= 1, "timers happened");
    check(n_irq_vec >= 5, "interrupt controller used");
    check(n_contention > 0, "arbitration contention happened");
    check(n_wait_clk > 0 && n_wait_clk8 > 0, "external memory wait states happened");
    check(n_seq >= 1, "sequential access timing happened");
    check(xm.sram_cycles > 0 && xm.flash_cycles > 0, "SRAM and Flash accessed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
