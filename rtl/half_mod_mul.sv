// half_mod_mul: W/2-bit x W-bit modular multiplier that delivers a full
// W x W modular product at half throughput.
//
// An NTT pipeline stage only multiplies during the half of its period in
// which it pairs elements, so a multiplier of half the width suffices. On a
// push the unit computes the low partial product (x[W/2-1:0] * y) mod p,
// stores it in the result FIFO and parks x[W-1:W/2] and y in the operand
// FIFOs. On a pop (in the stage's idle half) the same multiplier computes
// (x_hi * y) mod p, shifts it left by W/2, adds the parked partial product
// and reduces, giving x * y mod p on `prod` in the same cycle as `pop`.
// Push and pop must not happen in the same cycle (one shared multiplier).
// Structure (operand/result FIFOs of depth DEPTH, operand mux, shift, add)
// follows the SAM architecture; the combinational result on pop is this design's.
module half_mod_mul
  import sam_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  elem_t x,
  input  elem_t y,
  input  logic  pop,
  output elem_t prod,
  output logic  empty
);
  localparam int unsigned H  = W / 2;
  localparam int unsigned PW = $clog2(DEPTH) > 0 ? $clog2(DEPTH) : 1;
  typedef logic [H-1:0]     half_t;
  typedef logic [W+H-1:0]   mid_t;

  half_t xh_fifo [DEPTH];
  elem_t y_fifo  [DEPTH];
  elem_t r_fifo  [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;

  // shared W/2 x W multiplier with operand mux
  half_t mul_a;
  elem_t mul_b;
  mid_t  mul_p;
  elem_t mul_r;
  always_comb begin
    mul_a = pop ? xh_fifo[rp] : x[H-1:0];
    mul_b = pop ? y_fifo[rp]  : y;
    mul_p = mid_t'(mul_a) * mid_t'(mul_b);
    mul_r = elem_t'(mul_p % mid_t'(P));
  end

  // shift-and-add of the high partial product onto the stored low one
  mid_t acc;
  always_comb begin
    acc  = (mid_t'(mul_r) << H) + mid_t'(r_fifo[rp]);
    prod = elem_t'(acc % mid_t'(P));
  end

  assign empty = (cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) begin
      xh_fifo[wp] <= x[W-1:H];
      y_fifo[wp]  <= y;
      r_fifo[wp]  <= mul_r;
    end

  // one multiplier: never both in one cycle; never overflow or underflow
  a_excl:  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
  a_under: assert property (@(posedge clk) disable iff (!rst_n) !(pop && cnt == 0));
  a_over:  assert property (@(posedge clk) disable iff (!rst_n) !(push && cnt == (PW+1)'(DEPTH)));
endmodule
