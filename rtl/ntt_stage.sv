// ntt_stage: one radix-2 decimation-in-frequency stage of the streaming NTT
// pipeline, span 2*S (pairs elements S apart).
//
// The stage takes one element per valid cycle and counts valid inputs in
// blocks of 2*S. In the first half of a block (phase A) the input is parked
// in a delay FIFO of depth S. In the second half (phase B) the parked element
// x_j is paired with the arriving x_{j+S}: the sum x_j + x_{j+S} leaves at
// once, and the difference (x_j - x_{j+S}) is handed to the half-throughput
// multiplier together with the stage twiddle w^j (w a primitive 2S-th root).
// The products are popped and sent out in any later cycle in which no sum
// leaves, i.e. during the next block's phase A or idle cycles, which
// preserves the order "S sums, then S products" per block (no product
// leaves while the stage is still in phase B). Output is
// registered: out_valid one cycle after the cycle that produced it.
// Inputs of one NTT must arrive back to back only in the sense that blocks
// are aligned to the count of valid inputs; gaps are allowed anywhere.
// FIFO depth S per stage and the half-width multiplier follow the SAM architecture;
// the DIF butterfly form and the ROM computed at elaboration are this
// design's choice.
module ntt_stage
  import sam_pkg::*;
#(
  parameter int unsigned S = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t in_data,
  output logic  out_valid,
  output elem_t out_data
);
  localparam int unsigned CW = $clog2(2 * S);
  localparam int unsigned JW = $clog2(S) > 0 ? $clog2(S) : 1;

  // stage twiddle ROM: w_{2S}^j, j = 0..S-1
  elem_t rom [S];
  for (genvar j = 0; j < S; j++) begin : g_rom
    localparam elem_t TW = pow_mod(root_pow2($clog2(2 * S)), j);
    assign rom[j] = TW;
  end

  elem_t         dly [S];
  logic [CW-1:0] cnt;
  logic          phase_b;
  logic [JW-1:0] j;
  elem_t         x_par, sum, dif;
  logic          push, pop, hm_empty;
  elem_t         prod;

  assign phase_b = cnt[CW-1];
  assign j       = (S > 1) ? JW'(cnt[CW-1:0]) : '0;
  assign x_par   = dly[j];
  assign sum     = add_mod(x_par, in_data);
  assign dif     = sub_mod(x_par, in_data);
  assign push    = in_valid && phase_b;
  assign pop     = !phase_b && !hm_empty;

  half_mod_mul #(.DEPTH(S)) u_hmm (
    .clk, .rst_n,
    .push, .x(dif), .y(rom[j]),
    .pop, .prod, .empty(hm_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid) cnt <= cnt + 1'b1;
      out_valid <= push || pop;
      if (push)     out_data <= sum;
      else if (pop) out_data <= prod;
    end
  end

  always_ff @(posedge clk)
    if (in_valid && !phase_b) dly[j] <= in_data;
endmodule
