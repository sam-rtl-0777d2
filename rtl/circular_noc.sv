// circular_noc: the circular shift network between the T lane pipelines /
// the DDR beat and the T on-chip buffers.
//
// It rotates a T-element vector: out[i] = in[(i + shift) mod T], realised as
// one T-way multiplexer per output followed by a register (one pipeline
// stage, so out_* follow in_* by one cycle). The shift amount travels with
// the data. Writing into the buffers uses shift = (T - k) mod T (element i
// goes to buffer (i + k) mod T); reading out uses shift = k. The SAM architecture
// describes it as pipelined multiplexers computing a circular shift by k;
// the single register stage is this design's choice.
module circular_noc
  import sam_pkg::*;
#(
  parameter int unsigned T = T_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(T)-1:0]      shift,
  input  elem_t                     in_data  [T],
  output logic                      out_valid,
  output elem_t                     out_data [T]
);
  localparam int unsigned KW = $clog2(T);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  for (genvar i = 0; i < T; i++) begin : g_out
    logic [KW-1:0] src;
    assign src = KW'(i) + shift;  // wraps modulo T (T is a power of two)
    always_ff @(posedge clk)
      if (in_valid) out_data[i] <= in_data[src];
  end
endmodule
