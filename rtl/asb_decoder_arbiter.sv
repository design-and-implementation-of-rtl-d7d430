// asb_decoder_arbiter - central bus arbiter and address decoder.
//
// The system bus is shared by NM masters (PAI DMA, WEP, PCMCIA and the CPU,
// in that fixed priority order, index 0 highest). A master raises m_breq and
// may start transfers once m_gnt is high; it keeps m_breq high until its last
// transfer has completed. The grant is re-evaluated only when the current owner
// has dropped its request, so a burst of DMA transfers is never split. When
// nobody requests, the bus is parked on the CPU (PARK). Arbitration takes one
// clock: a request seen in cycle n gives a grant in cycle n+1.
//
// The decoder routes the owner's transfer to one of NS slaves by address
// bits [31:28] (see mac_pkg) and returns that slave's response to the owner.
// An unmapped address is answered at once with error = 1.
// The document gives the roles (a centralized arbiter and a centralized
// decoder); the priority order, parking and address map are this design's.
module asb_decoder_arbiter
  import mac_pkg::*;
#(
  parameter int NM   = NUM_MASTERS,
  parameter int NS   = NUM_SLAVES,
  parameter int PARK = M_CPU
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NM-1:0]     m_breq,
  output logic [NM-1:0]     m_gnt,
  input  asb_req_t          m_req [NM],
  output asb_rsp_t          m_rsp [NM],
  output asb_req_t          s_req [NS],
  input  asb_rsp_t          s_rsp [NS]
);

  logic [$clog2(NM)-1:0] owner_q, owner_d;
  logic                  busy;    // owner mid transfer

  asb_req_t cur;
  assign cur  = m_req[owner_q];
  assign busy = cur.valid;

  always_comb begin
    owner_d = owner_q;
    if (!m_breq[owner_q] && !busy) begin
      owner_d = PARK[$clog2(NM)-1:0];
      for (int i = NM - 1; i >= 0; i--)
        if (m_breq[i]) owner_d = i[$clog2(NM)-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) owner_q <= PARK[$clog2(NM)-1:0];
    else        owner_q <= owner_d;

  always_comb
    for (int i = 0; i < NM; i++) m_gnt[i] = (owner_q == i[$clog2(NM)-1:0]);

  // Decoder.
  logic [3:0]  region;
  logic        hit;
  int unsigned sel;
  always_comb begin
    region = cur.addr[31:28];
    hit = 1'b1;
    sel = 0;
    unique case (region)
      4'h0: sel = S_MEM;
      4'h1: sel = S_PAI;
      4'h2: sel = S_WEP;
      4'h3: sel = S_PCMCIA;
      4'h8: sel = S_APB;
      default: hit = 1'b0;
    endcase
    if (sel >= NS) hit = 1'b0;
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s] = cur;
      s_req[s].valid = cur.valid && hit && (sel == s);
    end
    for (int m = 0; m < NM; m++) m_rsp[m] = ASB_RSP_IDLE;
    if (hit) m_rsp[owner_q] = s_rsp[sel];
    else begin
      m_rsp[owner_q].ready = cur.valid;
      m_rsp[owner_q].error = cur.valid;
    end
  end

  // Bus rules: only the owner transfers, and a waiting transfer holds still.
  for (genvar m = 0; m < NM; m++) begin : g_chk
    a_grant_only : assert property (@(posedge clk) disable iff (!rst_n)
      m_req[m].valid |-> m_gnt[m])
      else $error("master %0d transfers without grant", m);
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (m_req[m].valid && !m_rsp[m].ready) |=> (m_req[m].valid && $stable(m_req[m])))
      else $error("master %0d changed a waiting transfer", m);
  end

endmodule
