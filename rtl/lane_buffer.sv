// lane_buffer: the n x n x b element buffer of one compute lane, with the
// double-buffering bank bit (2 * b * n * n words of W bits).
//
// Address = {bank, group g, row, col}. One write port and one read port;
// the read is synchronous (rdata valid the cycle after re). Size and
// double buffering follow the SAM architecture (n x n x b per buffer, doubled); the
// port arrangement and read latency are this design's choice.
module lane_buffer
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF,
  parameter int unsigned B    = B_DEF,
  localparam int unsigned BAW = 1 + $clog2(B) + 2 * $clog2(N_PT)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [BAW-1:0] waddr,
  input  elem_t          wdata,
  input  logic           re,
  input  logic [BAW-1:0] raddr,
  output elem_t          rdata
);
  elem_t mem [2**BAW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
