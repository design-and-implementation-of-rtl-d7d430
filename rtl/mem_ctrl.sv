// mem_ctrl - external memory interface controller (system bus slave).
//
// Connects the on-chip bus to external SRAM and Flash. Every bus transfer is
// split into external bus cycles ("beats"): on the 16-bit external bus a word
// takes two beats and a byte or halfword one; with the 8-bit option a word
// takes four beats, a halfword two and a byte one. Each beat lasts
// (wait states + 1) clocks, with programmable wait states per device. After
// the last beat the controller answers ready for one clock.
// The ARM core distinguishes non-sequential (N) and sequential (S) accesses;
// here an access is sequential when its address is the one right after the
// previous memory access (same device, no register access in between), which
// is what the core's S cycles are. Each device has an N and an S wait-state
// count: the first beat of a transfer uses N, or S if the transfer is
// sequential, and the further beats of a transfer use S. So a transfer
// started in cycle 0 completes in cycle (ws1+1) + (beats-1)*(wsS+1) + 1.
//
// Address decode inside the slave: addr[27] = 1 selects the configuration
// register MCFG, otherwise addr[24] = 1 selects SRAM (cs_sram_n) and 0 Flash
// (cs_flash_n). MCFG: [3:0] Flash N wait states, [7:4] SRAM N wait states,
// [8] bus16 (1 = 16-bit external bus), [15:12] Flash S wait states, [19:16]
// SRAM S wait states. Reset: Flash 3/3, SRAM 1/1, 16 bit (0x0001_3113).
// External signals are active low strobes; the data pins are split into
// ext_wdata / ext_rdata with an output enable (the pad makes them tri-state).
// ext_be_n[0] enables the byte on data[7:0], ext_be_n[1] the one on [15:8].
// The document asks for programmable wait states, the ARM access modes and an
// 8/16-bit bus option; the register layout, the sequential-address rule and
// the beat timing are this design's.
module mem_ctrl
  import mac_pkg::*;
#(
  parameter int EXT_AW = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  asb_req_t          s_req,
  output asb_rsp_t          s_rsp,
  output logic [EXT_AW-1:0] ext_addr,
  output logic [15:0]       ext_wdata,
  input  logic [15:0]       ext_rdata,
  output logic              ext_data_oe,
  output logic              ext_cs_sram_n,
  output logic              ext_cs_flash_n,
  output logic              ext_oe_n,
  output logic              ext_we_n,
  output logic [1:0]        ext_be_n
);

  typedef enum logic [1:0] {ST_IDLE, ST_ACCESS, ST_RESP} state_e;
  state_e state;

  logic [3:0]  flash_ws, sram_ws, flash_sws, sram_sws;
  logic [31:0] next_q;      // address following the last memory access
  logic        next_ok_q;   // next_q is valid
  logic        seq;
  logic [3:0]  nws, sws;
  logic        bus16;
  logic [2:0]  beat, nbeats;
  logic [3:0]  wcnt, ws;
  logic        is_sram;
  logic [31:0] rdata_q;
  logic        cfg_hit;

  assign cfg_hit = s_req.addr[27];

  function automatic logic [2:0] beats_for(input asb_size_e sz, input logic b16);
    unique case (sz)
      SZ_BYTE: beats_for = 3'd1;
      SZ_HALF: beats_for = b16 ? 3'd1 : 3'd2;
      default: beats_for = b16 ? 3'd2 : 3'd4;
    endcase
  endfunction

  // Address of the current beat.
  logic [31:0] base, beat_addr;
  always_comb begin
    unique case (s_req.size)
      SZ_BYTE: base = s_req.addr;
      SZ_HALF: base = {s_req.addr[31:1], 1'b0};
      default: base = {s_req.addr[31:2], 2'b00};
    endcase
    beat_addr = base + (bus16 ? {28'd0, beat, 1'b0} : {29'd0, beat});
  end

  // Sequential detection and the wait states of the addressed device.
  assign seq = next_ok_q && s_req.addr == next_q;
  assign nws = s_req.addr[24] ? sram_ws  : flash_ws;
  assign sws = s_req.addr[24] ? sram_sws : flash_sws;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      flash_ws <= 4'd3;
      sram_ws  <= 4'd1;
      flash_sws <= 4'd3;
      sram_sws  <= 4'd1;
      next_q    <= '0;
      next_ok_q <= 1'b0;
      bus16    <= 1'b1;
      beat     <= '0;
      nbeats   <= '0;
      wcnt     <= '0;
      ws       <= '0;
      is_sram  <= 1'b0;
      rdata_q  <= '0;
    end else begin
      unique case (state)
        ST_IDLE:
          if (s_req.valid) begin
            if (cfg_hit) begin
              if (s_req.write) begin
                flash_ws  <= s_req.wdata[3:0];
                sram_ws   <= s_req.wdata[7:4];
                bus16     <= s_req.wdata[8];
                flash_sws <= s_req.wdata[15:12];
                sram_sws  <= s_req.wdata[19:16];
              end
              rdata_q   <= {12'd0, sram_sws, flash_sws, 3'd0, bus16, sram_ws, flash_ws};
              next_ok_q <= 1'b0;
              state     <= ST_RESP;
            end else begin
              is_sram   <= s_req.addr[24];
              ws        <= sws;
              wcnt      <= seq ? sws : nws;
              next_q    <= base + (32'd1 << s_req.size);
              next_ok_q <= 1'b1;
              nbeats  <= beats_for(s_req.size, bus16);
              beat    <= '0;
              rdata_q <= '0;
              state   <= ST_ACCESS;
            end
          end
        ST_ACCESS:
          if (wcnt != 0) wcnt <= wcnt - 1'b1;
          else begin
            // End of a beat: capture read data.
            if (bus16) begin
              if (s_req.size == SZ_BYTE)
                rdata_q[7:0] <= s_req.addr[0] ? ext_rdata[15:8] : ext_rdata[7:0];
              else if (beat[0]) rdata_q[31:16] <= ext_rdata;
              else              rdata_q[15:0]  <= ext_rdata;
            end else begin
              unique case (beat[1:0])
                2'd0: rdata_q[7:0]   <= ext_rdata[7:0];
                2'd1: rdata_q[15:8]  <= ext_rdata[7:0];
                2'd2: rdata_q[23:16] <= ext_rdata[7:0];
                default: rdata_q[31:24] <= ext_rdata[7:0];
              endcase
            end
            if (beat + 1'b1 == nbeats) state <= ST_RESP;
            else begin
              beat <= beat + 1'b1;
              wcnt <= ws;
            end
          end
        default: state <= ST_IDLE;   // ST_RESP
      endcase
    end
  end

  always_comb begin
    s_rsp       = ASB_RSP_IDLE;
    s_rsp.ready = (state == ST_RESP);
    s_rsp.rdata = rdata_q;
  end

  // External pins.
  logic active;
  assign active = (state == ST_ACCESS);
  always_comb begin
    ext_addr       = beat_addr[EXT_AW-1:0];
    ext_cs_sram_n  = !(active && is_sram);
    ext_cs_flash_n = !(active && !is_sram);
    ext_oe_n       = !(active && !s_req.write);
    ext_we_n       = !(active && s_req.write);
    ext_data_oe    = active && s_req.write;
    ext_be_n       = 2'b11;
    ext_wdata      = '0;
    if (active) begin
      if (bus16) begin
        if (s_req.size == SZ_BYTE) begin
          ext_be_n  = s_req.addr[0] ? 2'b01 : 2'b10;
          ext_wdata = {2{s_req.wdata[7:0]}};
        end else begin
          ext_be_n  = 2'b00;
          ext_wdata = beat[0] ? s_req.wdata[31:16] : s_req.wdata[15:0];
        end
      end else begin
        ext_be_n = 2'b10;
        unique case (beat[1:0])
          2'd0: ext_wdata = {8'd0, s_req.wdata[7:0]};
          2'd1: ext_wdata = {8'd0, s_req.wdata[15:8]};
          2'd2: ext_wdata = {8'd0, s_req.wdata[23:16]};
          default: ext_wdata = {8'd0, s_req.wdata[31:24]};
        endcase
      end
    end
  end

endmodule
