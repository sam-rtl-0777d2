// buf_addr_gen: address generator of on-chip buffer number BUF.
//
// The controller describes one access of all T buffers by the plane index p
// within a group of T planes, the group g, a base position (r_base, c_base)
// and which way the T lanes are spread (walk_rows: lane l takes row
// r_base + l, otherwise column c_base + l). This block returns where in
// buffer BUF the element for that access lives, and the rotation k of the
// circular shift network. Purely combinational.
//
// Natural layout (circ = 0, rounds with d_c > 1): lane l works on plane l
// of the group and keeps it in its own buffer, so every buffer uses
// (g, r_base, c_base) and k = 0.
// Circular layout (circ = 1, the last round d_c = 1, all lanes share one
// plane): element (r, c) of plane p lives in buffer (c + k) mod T with
// k = (p + r) mod T, at row (p * R + r) / T and column c. For an access at
// (r_base, c_base), with c_base or r_base a multiple of T, k = (p + r_base +
// c_base) mod T and buffer BUF serves lane (BUF - k) mod T.
// The mapping equations follow the SAM architecture (with R = n there); R = 2^lg_rows
// allows the incomplete dimension as the row dimension.
module buf_addr_gen
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF,
  parameter int unsigned T    = T_DEF,
  parameter int unsigned B    = B_DEF,
  parameter int unsigned BUF  = 0,
  localparam int unsigned LN  = $clog2(N_PT),
  localparam int unsigned LT  = $clog2(T),
  localparam int unsigned LB  = $clog2(B)
) (
  input  logic                  circ,
  input  logic                  walk_rows,
  input  logic [$clog2(LN+1)-1:0] lg_rows,
  input  logic [LB-1:0]         g,
  input  logic [LT-1:0]         p,
  input  logic [LN-1:0]         r_base,
  input  logic [LN-1:0]         c_base,
  output logic [LT-1:0]         k,
  output logic [LB-1:0]         a_g,
  output logic [LN-1:0]         a_row,
  output logic [LN-1:0]         a_col
);
  logic [LT-1:0]    kc, lane;
  logic [LN-1:0]    r, c;
  logic [LN+LT-1:0] lin;

  always_comb begin
    kc   = p + LT'(r_base) + LT'(c_base);
    lane = LT'(BUF) - kc;
    r    = walk_rows ? r_base + LN'(lane) : r_base;
    c    = walk_rows ? c_base : c_base + LN'(lane);
    lin  = ((LN+LT)'(p) << lg_rows) + (LN+LT)'(r);
    a_g  = g;
    if (circ) begin
      k     = kc;
      a_row = LN'(lin >> LT);
      a_col = c;
    end else begin
      k     = '0;
      a_row = r_base;
      a_col = c_base;
    end
  end
endmodule
