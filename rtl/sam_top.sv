// sam_top: scalable NTT accelerator built on multi-dimensional decomposition.
//
// T compute lanes, each an n-point streaming NTT pipeline with a modular
// multiplier in front of it (the between-dimension twiddle factors) and an
// n x n x b double-banked buffer, are tied together by two circular shift
// networks (buffers <- DDR/pipelines, buffers -> pipelines/DDR), one shared
// on-the-fly twiddle factor generator and the controller. A size-2^log_n
// NTT over Z_p held in external memory at element addresses 0..N-1 is
// transformed in place; see sam_ctrl for the schedule.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   host:   start (pulse with log_n), busy, done (one-cycle pulse).
//   DDR rd: rd_req_valid/rd_req_addr/rd_req_ready request a beat of T
//           consecutive elements starting at rd_req_addr; rd_resp_valid/
//           rd_resp_data return beats in request order, any latency, no
//           backpressure.
//   DDR wr: wr_valid/wr_addr/wr_data write a beat of T consecutive
//           elements; the channel always accepts.
// Result order: with N = m * n^(d-1) and address digits (a_{d-1}, ...,
// a_0) (a_{d-1} of radix m), the element at an address holds output index
// k = a_{d-1} + m*a_{d-2} + m*n*a_{d-3} + ..., i.e. the digit-reversed
// order that the decomposition produces without a final transpose.
// Lane structure, shared generator and shift network follow the SAM architecture;
// the DDR channel handshakes and the output order statement are this
// design's.
module sam_top
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF,
  parameter int unsigned T    = T_DEF,
  parameter int unsigned B    = B_DEF,
  localparam int unsigned LGW = $clog2(LMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [LGW-1:0] log_n,
  output logic           busy,
  output logic           done,
  output logic           rd_req_valid,
  output logic [AW-1:0]  rd_req_addr,
  input  logic           rd_req_ready,
  input  logic           rd_resp_valid,
  input  elem_t          rd_resp_data [T],
  output logic           wr_valid,
  output logic [AW-1:0]  wr_addr,
  output elem_t          wr_data [T]
);
  localparam int unsigned LN  = $clog2(N_PT);
  localparam int unsigned LT  = $clog2(T);
  localparam int unsigned LB  = $clog2(B);
  localparam int unsigned BAW = 1 + LB + 2 * LN;

  logic           buf_re, buf_we;
  logic [BAW-1:0] buf_raddr [T], buf_waddr [T];
  logic           noc_r_valid, noc_w_valid, noc_w_src_pipe;
  logic [LT-1:0]  noc_r_shift, noc_w_shift;
  logic           mul_valid, tw_use_row;
  logic [LN-1:0]  tw_col_r, tw_row_r [T], tw_row_c [T];
  logic [$clog2(N_PT+1)-1:0] pipe_log_size;
  logic           tw_init, tw_next, tw_busy;
  logic [LGW-1:0] tw_lg_cstep, tw_lg_rstep, tw_lg_rinit;
  elem_t          col_tw, row_tw [T];

  elem_t buf_rdata [T];
  elem_t rnoc_out  [T];
  logic  rnoc_valid;
  elem_t wnoc_in   [T];
  elem_t wnoc_out  [T];
  logic  wnoc_valid;
  logic  pipe_ov   [T];
  elem_t pipe_od   [T];

  sam_ctrl #(.N_PT(N_PT), .T(T), .B(B)) u_ctrl (
    .clk, .rst_n, .start, .log_n, .busy, .done,
    .rd_req_valid, .rd_req_addr, .rd_req_ready, .rd_resp_valid,
    .wr_valid, .wr_addr,
    .buf_re, .buf_raddr, .noc_r_valid, .noc_r_shift,
    .mul_valid, .tw_use_row, .tw_col_r, .tw_row_r, .tw_row_c,
    .pipe_log_size, .pipe_out_valid(pipe_ov[0]),
    .noc_w_valid, .noc_w_src_pipe, .noc_w_shift, .buf_we, .buf_waddr,
    .tw_init, .tw_lg_cstep, .tw_lg_rstep, .tw_lg_rinit, .tw_next, .tw_busy
  );

  twiddle_gen #(.N_PT(N_PT), .T(T)) u_tw (
    .clk, .rst_n,
    .init(tw_init), .lg_cstep(tw_lg_cstep), .lg_rstep(tw_lg_rstep),
    .lg_rinit(tw_lg_rinit), .next(tw_next), .busy(tw_busy),
    .col_r(tw_col_r), .col_tw, .row_r(tw_row_r), .row_c(tw_row_c), .row_tw
  );

  // buffers -> pipelines / DDR
  circular_noc #(.T(T)) u_rnoc (
    .clk, .rst_n, .in_valid(noc_r_valid), .shift(noc_r_shift),
    .in_data(buf_rdata), .out_valid(rnoc_valid), .out_data(rnoc_out)
  );
  assign wr_data = rnoc_out;

  // DDR / pipelines -> buffers
  always_comb
    for (int l = 0; l < T; l++)
      wnoc_in[l] = noc_w_src_pipe ? pipe_od[l] : rd_resp_data[l];
  circular_noc #(.T(T)) u_wnoc (
    .clk, .rst_n, .in_valid(noc_w_valid), .shift(noc_w_shift),
    .in_data(wnoc_in), .out_valid(wnoc_valid), .out_data(wnoc_out)
  );

  for (genvar l = 0; l < T; l++) begin : g_lane
    logic  mv;
    elem_t md;

    lane_buffer #(.N_PT(N_PT), .B(B)) u_buf (
      .clk,
      .we(buf_we), .waddr(buf_waddr[l]), .wdata(wnoc_out[l]),
      .re(buf_re), .raddr(buf_raddr[l]), .rdata(buf_rdata[l])
    );

    mod_mul u_mul (
      .clk, .rst_n, .in_valid(mul_valid), .a(rnoc_out[l]),
      .b(tw_use_row ? row_tw[l] : col_tw),
      .out_valid(mv), .y(md)
    );

    ntt_pipeline #(.N_PT(N_PT)) u_pipe (
      .clk, .rst_n, .log_size(pipe_log_size),
      .in_valid(mv), .in_data(md),
      .out_valid(pipe_ov[l]), .out_data(pipe_od[l])
    );
  end

  a_wr_align: assert property (@(posedge clk) disable iff (!rst_n) buf_we == wnoc_valid);
  a_rd_align: assert property (@(posedge clk) disable iff (!rst_n)
                               (mul_valid || wr_valid) |-> rnoc_valid);
endmodule
