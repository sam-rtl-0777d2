// mod_mul: full-width modular multiplier, one product per cycle.
//
// This is the extra multiplier that sits in front of every NTT pipeline and
// applies the between-dimension twiddle factors (y = a * b mod p). It is a
// single registered stage: operands presented with in_valid in cycle k give
// y with out_valid in cycle k+1. The SAM architecture fixes only its function; the
// one-cycle latency and the valid qualifier are this design's choice.
module mod_mul
  import sam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t a,
  input  elem_t b,
  output logic  out_valid,
  output elem_t y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= mul_mod(a, b);
    end
  end
endmodule
