// bus_mem_model - behavioural system bus slave holding a byte-addressed
// memory, for testbenches. Answers each transfer after a random number of
// wait clocks (0..MAXWAIT) and counts the transfers it served. Only the low
// AW address bits are decoded. Memory starts at zero; testbenches write it
// directly (mem[...]) before use and read it back to check results.
module bus_mem_model
  import mac_pkg::*;
#(
  parameter int AW      = 12,
  parameter int MAXWAIT = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  asb_req_t req,
  output asb_rsp_t rsp
);
  logic [7:0] mem [2**AW];
  int unsigned wait_left, nxfers;
  logic busy;

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    nxfers = 0;
  end

  logic [AW-1:0] a;
  assign a = req.addr[AW-1:0];

  always_comb begin
    rsp = ASB_RSP_IDLE;
    rsp.ready = req.valid && busy && wait_left == 0;
    unique case (req.size)
      SZ_BYTE: rsp.rdata = {24'd0, mem[a]};
      SZ_HALF: rsp.rdata = {16'd0, mem[a + 1], mem[a]};
      default: rsp.rdata = {mem[a + 3], mem[a + 2], mem[a + 1], mem[a]};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy      <= 1'b0;
      wait_left <= 0;
    end else if (req.valid && !busy) begin
      busy      <= 1'b1;
      wait_left <= $urandom_range(MAXWAIT, 0);
    end else if (busy && wait_left != 0) wait_left <= wait_left - 1;
    else if (rsp.ready) begin
      busy <= 1'b0;
      nxfers <= nxfers + 1;
      if (req.write)
        unique case (req.size)
          SZ_BYTE: mem[a] <= req.wdata[7:0];
          SZ_HALF: begin mem[a] <= req.wdata[7:0]; mem[a + 1] <= req.wdata[15:8]; end
          default: for (int k = 0; k < 4; k++) mem[a + AW'(k)] <= req.wdata[8*k +: 8];
        endcase
    end
endmodule
