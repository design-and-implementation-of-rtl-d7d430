// rc4_engine - RC4 pseudorandom byte generator working on the SBOX RAM.
//
// start runs the key schedule for the seed key[0..keylen-1] (keylen 1..16;
// 8 for 64-bit WEP: 3-byte IV followed by the 5-byte secret key):
//   S[i] = i for all i, then for i = 0..255: j += S[i] + key[i mod keylen],
//   swap S[i], S[j].
// This takes 256 + 4*256 clocks; busy is high meanwhile. Afterwards each
// ks_req pulse produces one keystream byte (i += 1, j += S[i], swap,
// out = S[S[i] + S[j]]), delivered on ks_byte with a one-clock ks_valid pulse
// seven clocks after the request. The state lives in a 256-byte single-port
// RAM, so every swap takes separate read and write cycles.
// The algorithm and the RAM are the document's; the schedule is this design's.
module rc4_engine (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] key [16],
  input  logic [4:0] keylen,
  output logic       busy,
  input  logic       ks_req,
  output logic       ks_valid,
  output logic [7:0] ks_byte
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_FILL, ST_K1, ST_K2, ST_K3, ST_K4,
    ST_P1, ST_P2, ST_P3, ST_P4, ST_P5, ST_P6
  } state_e;
  state_e state;

  logic [7:0] i_q, j_q, si_q, sj_q, j_new;
  logic [3:0] kidx;
  logic       ram_we;
  logic [7:0] ram_addr, ram_wdata, ram_rdata;

  sbox_ram u_sbox (.clk(clk), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  always_comb begin
    j_new = j_q + ram_rdata;
    if (state == ST_K2) j_new = j_q + ram_rdata + key[kidx];
  end

  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = i_q;
    ram_wdata = '0;
    unique case (state)
      ST_FILL: begin ram_we = 1'b1; ram_addr = i_q; ram_wdata = i_q; end
      ST_K1:   ram_addr = i_q;
      ST_K2:   ram_addr = j_new;
      ST_K3:   begin ram_we = 1'b1; ram_addr = i_q; ram_wdata = ram_rdata; end
      ST_K4:   begin ram_we = 1'b1; ram_addr = j_q; ram_wdata = si_q; end
      ST_P1:   ram_addr = i_q + 1'b1;
      ST_P2:   ram_addr = j_new;
      ST_P3:   begin ram_we = 1'b1; ram_addr = i_q; ram_wdata = ram_rdata; end
      ST_P4:   begin ram_we = 1'b1; ram_addr = j_q; ram_wdata = si_q; end
      ST_P5:   ram_addr = si_q + sj_q;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      i_q      <= '0;
      j_q      <= '0;
      si_q     <= '0;
      sj_q     <= '0;
      kidx     <= '0;
      ks_valid <= 1'b0;
      ks_byte  <= '0;
    end else begin
      ks_valid <= 1'b0;
      unique case (state)
        ST_IDLE:
          if (start) begin
            i_q   <= '0;
            state <= ST_FILL;
          end else if (ks_req) state <= ST_P1;
        ST_FILL: begin
          i_q <= i_q + 1'b1;
          if (i_q == 8'hFF) begin
            j_q   <= '0;
            kidx  <= '0;
            state <= ST_K1;
          end
        end
        ST_K1: state <= ST_K2;
        ST_K2: begin
          si_q  <= ram_rdata;
          j_q   <= j_new;
          state <= ST_K3;
        end
        ST_K3: state <= ST_K4;
        ST_K4: begin
          kidx <= (5'(kidx) + 5'd1 >= keylen) ? '0 : kidx + 1'b1;
          i_q  <= i_q + 1'b1;
          if (i_q == 8'hFF) begin
            j_q   <= '0;
            state <= ST_IDLE;   // i wraps to 0
          end else state <= ST_K1;
        end
        ST_P1: begin
          i_q   <= i_q + 1'b1;
          state <= ST_P2;
        end
        ST_P2: begin
          si_q  <= ram_rdata;
          j_q   <= j_new;
          state <= ST_P3;
        end
        ST_P3: begin
          sj_q  <= ram_rdata;
          state <= ST_P4;
        end
        ST_P4: state <= ST_P5;
        ST_P5: state <= ST_P6;
        default: begin   // ST_P6
          ks_byte  <= ram_rdata;
          ks_valid <= 1'b1;
          state    <= ST_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != ST_IDLE) && !(state inside {ST_P1, ST_P2, ST_P3, ST_P4, ST_P5, ST_P6});

endmodule
