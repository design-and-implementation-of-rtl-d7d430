// wep - Wired Equivalent Privacy engine: encrypts or decrypts a block of
// memory with RC4 and generates/checks its CRC-32 integrity check value (ICV).
//
// Software writes the seed (IV + secret key) into SEED, the block's source
// and destination addresses and its length, and starts the engine. The RC4
// generator first runs its key schedule in the 256-byte SBOX RAM. Then the
// memory read/write state machine handles one byte at a time as a bus
// master: it reads the byte, XORs it with the next keystream byte (requested
// while the read is under way) and writes the result to the destination.
// The ICV engine folds every plaintext byte into a CRC-32.
//   Encrypt: LEN bytes are read and written, then the 4-byte ICV of the
//   plaintext is encrypted and written after them (LEN + 4 bytes out).
//   Decrypt: LEN + 4 bytes are read (body + encrypted ICV), the LEN body bytes
//   are written, and the decrypted ICV is compared with the computed one:
//   STATUS.icv_ok.
// The engine requests the bus only for the single byte transfers, so the CPU
// and other masters run between them. At the end STATUS.done is set and irq
// raised if enabled.
// Registers (system bus slave, addr[7:0]): 0x00 CTRL [0] start (self
// clearing) [1] decrypt [2] irq enable; 0x04 STATUS [0] busy [1] done (write 1
// to clear) [2] icv_ok; 0x08 SRC; 0x0C DST; 0x10 LEN; 0x14 KEYLEN (1..16,
// reset 8); 0x18 ICV (read only, ICV of the plaintext); 0x20..0x2C SEED, key
// byte k in word k/4, bits 8*(k%4)+7:8*(k%4).
// The blocks (registers, RC4 state machine, SBOX RAM, XOR, ICV module,
// memory read/write state machine and bus master) are the document's; the
// register map, byte-at-a-time transfers and the treatment of the ICV are this
// design's. The ICV covers the plaintext, as the 802.11 WEP algorithm defines.
module wep
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // slave port
  input  asb_req_t s_req,
  output asb_rsp_t s_rsp,
  // master port
  output logic     m_breq,
  input  logic     m_gnt,
  output asb_req_t m_req,
  input  asb_rsp_t m_rsp,
  output logic     irq
);

  typedef enum logic [2:0] {ST_IDLE, ST_KSA, ST_BYTE, ST_RD, ST_XOR, ST_WR, ST_DONE} state_e;
  state_e state;

  logic [31:0] src_q, dst_q, len_q, n_q;
  logic [4:0]  keylen_q;
  logic [7:0]  key_q [16];
  logic        decrypt_q, ie_q, done_q, icv_ok_q, ksa_seen;
  logic [7:0]  data_q, ks_q, out_b;
  logic        ks_have;
  logic [1:0]  icv_idx;   // byte of the ICV in the trailer, first = bits 7:0
  assign icv_idx = 2'(n_q - len_q);

  // RC4 generator.
  logic rc4_start, rc4_busy, ks_req, ks_valid;
  logic [7:0] ks_byte;
  rc4_engine u_rc4 (
    .clk, .rst_n, .start(rc4_start), .key(key_q), .keylen(keylen_q),
    .busy(rc4_busy), .ks_req, .ks_valid, .ks_byte
  );

  // ICV generator.
  logic        crc_init, crc_en;
  logic [7:0]  crc_din;
  logic [31:0] crc, icv;
  crc32_parallel u_icv (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(crc_din), .crc, .icv);

  logic in_body;
  assign in_body = (n_q < len_q);
  assign out_b   = data_q ^ ks_q;

  // Slave register interface: answers in the cycle of the request.
  logic wr_reg;
  assign wr_reg = s_req.valid && s_req.write;
  always_comb begin
    s_rsp       = ASB_RSP_IDLE;
    s_rsp.ready = s_req.valid;
    unique case (s_req.addr[7:0])
      8'h00: s_rsp.rdata = {29'd0, ie_q, decrypt_q, 1'b0};
      8'h04: s_rsp.rdata = {29'd0, icv_ok_q, done_q, state != ST_IDLE};
      8'h08: s_rsp.rdata = src_q;
      8'h0C: s_rsp.rdata = dst_q;
      8'h10: s_rsp.rdata = len_q;
      8'h14: s_rsp.rdata = 32'(keylen_q);
      8'h18: s_rsp.rdata = icv;
      8'h20: s_rsp.rdata = {key_q[3],  key_q[2],  key_q[1],  key_q[0]};
      8'h24: s_rsp.rdata = {key_q[7],  key_q[6],  key_q[5],  key_q[4]};
      8'h28: s_rsp.rdata = {key_q[11], key_q[10], key_q[9],  key_q[8]};
      8'h2C: s_rsp.rdata = {key_q[15], key_q[14], key_q[13], key_q[12]};
      default: s_rsp.rdata = '0;
    endcase
  end

  logic go;
  assign go = wr_reg && s_req.addr[7:0] == 8'h00 && s_req.wdata[0] && state == ST_IDLE;

  assign rc4_start = (state == ST_IDLE) && go;
  assign crc_init  = go;
  assign crc_din   = decrypt_q ? out_b : data_q;
  assign crc_en    = (state == ST_XOR) && ks_have && in_body;
  assign ks_req    = (state == ST_BYTE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      src_q     <= '0;
      dst_q     <= '0;
      len_q     <= '0;
      n_q       <= '0;
      keylen_q  <= 5'd8;
      decrypt_q <= 1'b0;
      ie_q      <= 1'b0;
      done_q    <= 1'b0;
      icv_ok_q  <= 1'b0;
      ksa_seen  <= 1'b0;
      data_q    <= '0;
      ks_q      <= '0;
      ks_have   <= 1'b0;
      for (int k = 0; k < 16; k++) key_q[k] <= '0;
    end else begin
      if (wr_reg && state == ST_IDLE) begin
        unique case (s_req.addr[7:0])
          8'h00: begin decrypt_q <= s_req.wdata[1]; ie_q <= s_req.wdata[2]; end
          8'h08: src_q <= s_req.wdata;
          8'h0C: dst_q <= s_req.wdata;
          8'h10: len_q <= s_req.wdata;
          8'h14: keylen_q <= (s_req.wdata[4:0] == 0 || s_req.wdata[4:0] > 16) ? 5'd16 : s_req.wdata[4:0];
          8'h20, 8'h24, 8'h28, 8'h2C:
            for (int b = 0; b < 4; b++) key_q[{s_req.addr[3:2], 2'(b)}] <= s_req.wdata[8*b +: 8];
          default: ;
        endcase
      end
      if (wr_reg && s_req.addr[7:0] == 8'h04 && s_req.wdata[1]) done_q <= 1'b0;

      if (ks_valid) begin
        ks_q    <= ks_byte;
        ks_have <= 1'b1;
      end

      unique case (state)
        ST_IDLE:
          if (go) begin
            n_q      <= '0;
            done_q   <= 1'b0;
            icv_ok_q <= 1'b1;
            ksa_seen <= 1'b0;
            state    <= ST_KSA;
          end
        ST_KSA: begin
          ksa_seen <= 1'b1;
          if (ksa_seen && !rc4_busy) state <= ST_BYTE;
        end
        ST_BYTE: begin
          ks_have <= 1'b0;
          if (decrypt_q || in_body) state <= ST_RD;
          else begin
            // Encrypt, trailer: the next ICV byte is the data.
            data_q <= icv[8*icv_idx +: 8];
            state  <= ST_XOR;
          end
        end
        ST_RD:
          if (m_req.valid && m_rsp.ready) begin
            data_q <= m_rsp.rdata[7:0];
            state  <= ST_XOR;
          end
        ST_XOR:
          if (ks_have) begin
            if (decrypt_q && !in_body && out_b != icv[8*icv_idx +: 8]) icv_ok_q <= 1'b0;
            state <= ST_WR;   // a decrypted ICV byte is not written
          end
        ST_WR:
          if ((decrypt_q && !in_body) || (m_req.valid && m_rsp.ready)) begin
            n_q <= n_q + 1'b1;
            if (n_q + 1 == len_q + 4) state <= ST_DONE;
            else state <= ST_BYTE;
          end
        default: begin   // ST_DONE
          done_q <= 1'b1;
          state  <= ST_IDLE;
        end
      endcase
    end
  end

  // Bus master: one byte transfer per RD / WR state.
  logic need_bus;
  assign need_bus = (state == ST_RD) || (state == ST_WR && !(decrypt_q && !in_body));
  assign m_breq   = need_bus;
  always_comb begin
    m_req       = ASB_REQ_IDLE;
    m_req.valid = need_bus && m_gnt;
    m_req.size  = SZ_BYTE;
    m_req.write = (state == ST_WR);
    m_req.addr  = (state == ST_WR) ? dst_q + n_q : src_q + n_q;
    m_req.wdata = (state == ST_WR) ? {24'd0, out_b} : 32'd0;   // steady during a read
  end

  assign irq = done_q && ie_q;

endmodule
