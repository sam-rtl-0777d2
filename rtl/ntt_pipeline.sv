// ntt_pipeline: streaming n-point NTT built from log2(n) ntt_stage blocks
// with spans n, n/2, ..., 2.
//
// Elements of consecutive NTTs enter one per valid cycle in natural order;
// results leave one per valid cycle in bit-reversed order of each NTT.
// A smaller power-of-two size M = 2^log_size (1 <= log_size <= log2 n) is
// run by skipping the first log2(n/M) stages, which is how the incomplete
// dimension of the decomposition is handled. log_size must be held stable
// while an NTT is in flight. Latency is not fixed (products drain in idle
// cycles); callers count valid outputs. Stage structure and stage skipping
// follow the SAM architecture; the input mux that implements the skip is this
// design's.
module ntt_pipeline
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(N_PT+1)-1:0]  log_size,
  input  logic                       in_valid,
  input  elem_t                      in_data,
  output logic                       out_valid,
  output elem_t                      out_data
);
  localparam int unsigned LN = $clog2(N_PT);

  logic  sv [LN];
  elem_t sd [LN];

  for (genvar i = 0; i < LN; i++) begin : g_st
    logic  iv;
    elem_t id;
    // stage i is the first active one when LN - i == log_size
    if (i == 0) begin : g_first
      assign iv = (log_size == ($clog2(N_PT+1))'(LN)) && in_valid;
      assign id = in_data;
    end else begin : g_rest
      logic first;
      assign first = (log_size == ($clog2(N_PT+1))'(LN - i));
      assign iv = first ? in_valid : sv[i-1];
      assign id = first ? in_data  : sd[i-1];
    end
    ntt_stage #(.S(N_PT >> (i + 1))) u_st (
      .clk, .rst_n,
      .in_valid(iv), .in_data(id),
      .out_valid(sv[i]), .out_data(sd[i])
    );
  end

  assign out_valid = sv[LN-1];
  assign out_data  = sd[LN-1];
endmodule
