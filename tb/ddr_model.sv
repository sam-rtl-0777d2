// ddr_model: behavioural model of the external memory with one read and one
// write channel, T elements per beat.
//
// Read requests are accepted when rd_req_ready is high (randomly dropped
// when STALL is set) and answered in order LAT cycles later. Writes are
// accepted every cycle. The memory array is public so that a testbench can
// preload inputs and inspect results. Not synthesizable.
module ddr_model
  import sam_pkg::*;
#(
  parameter int unsigned T     = 2,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LAT   = 5,
  parameter bit          STALL = 1
) (
  input  logic          clk,
  input  logic          rd_req_valid,
  input  logic [AW-1:0] rd_req_addr,
  output logic          rd_req_ready,
  output logic          rd_resp_valid,
  output elem_t         rd_resp_data [T],
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_addr,
  input  elem_t         wr_data [T]
);
  elem_t mem [DEPTH];
  int    beats_read = 0, beats_written = 0, stalls = 0;

  logic          pv  [LAT];
  logic [AW-1:0] pa  [LAT];

  initial begin
    for (int i = 0; i < int'(LAT); i++) begin pv[i] = 0; pa[i] = '0; end
    rd_req_ready = 1;
  end

  always @(posedge clk) begin
    logic acc;
    acc = rd_req_valid && rd_req_ready;
    if (acc) beats_read++;
    if (rd_req_valid && !rd_req_ready) stalls++;
    for (int i = int'(LAT) - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; end
    pv[0] <= acc;
    pa[0] <= rd_req_addr;
    rd_req_ready <= STALL ? ($urandom % 4 != 0) : 1'b1;
    if (wr_valid) begin
      beats_written++;
      for (int i = 0; i < int'(T); i++) mem[int'(wr_addr) + i] <= wr_data[i];
    end
  end

  assign rd_resp_valid = pv[LAT-1];
  always_comb
    for (int i = 0; i < int'(T); i++)
      rd_resp_data[i] = mem[(int'(pa[LAT-1]) + i) % DEPTH];
endmodule
