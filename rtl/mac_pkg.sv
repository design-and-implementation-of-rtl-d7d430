// mac_pkg - types and constants shared by the 802.11 MAC processor blocks.
//
// The on-chip system bus follows the roles of the AMBA ASB (one arbiter, one
// central decoder, masters and slaves) but is written as a simple
// request/response bundle instead of tri-state ASB signals: a master holds
// asb_req_t (valid, address, size, write data) stable until a cycle in which
// the slave answers asb_rsp_t.ready = 1; read data and error are valid in
// that cycle. The address map below is this design's own choice.
package mac_pkg;

  typedef enum logic [1:0] {
    SZ_BYTE = 2'd0,
    SZ_HALF = 2'd1,
    SZ_WORD = 2'd2
  } asb_size_e;

  typedef struct packed {
    logic        valid;
    logic        write;
    asb_size_e   size;
    logic [31:0] addr;
    logic [31:0] wdata;
  } asb_req_t;

  typedef struct packed {
    logic        ready;
    logic        error;
    logic [31:0] rdata;
  } asb_rsp_t;

  localparam asb_req_t ASB_REQ_IDLE = '{valid: 1'b0, write: 1'b0, size: SZ_BYTE,
                                        addr: 32'h0, wdata: 32'h0};
  localparam asb_rsp_t ASB_RSP_IDLE = '{ready: 1'b0, error: 1'b0, rdata: 32'h0};

  // Masters, highest arbitration priority first.
  localparam int M_PAI    = 0;
  localparam int M_WEP    = 1;
  localparam int M_PCMCIA = 2;
  localparam int M_CPU    = 3;
  localparam int NUM_MASTERS = 4;

  // Slaves, selected by address bits [31:28].
  localparam int S_MEM    = 0;   // 0x0xxx_xxxx external memory + controller registers
  localparam int S_PAI    = 1;   // 0x1xxx_xxxx
  localparam int S_WEP    = 2;   // 0x2xxx_xxxx
  localparam int S_PCMCIA = 3;   // 0x3xxx_xxxx
  localparam int S_APB    = 4;   // 0x8xxx_xxxx bridge to the peripheral bus
  localparam int NUM_SLAVES = 5;

  // Byte and halfword transfers carry their data in the low bits of
  // wdata/rdata; the address selects the byte in memory (little endian).

  // CRC-32 polynomial x32+x26+x23+x22+x16+x12+x11+x10+x8+x7+x5+x4+x2+x+1,
  // bit-reversed form for least-significant-bit-first processing.
  localparam logic [31:0] CRC32_POLY_REFL = 32'hEDB8_8320;
  // Register contents after a frame followed by its own correct FCS.
  localparam logic [31:0] CRC32_RESIDUE   = 32'hDEBB_20E3;

endpackage
