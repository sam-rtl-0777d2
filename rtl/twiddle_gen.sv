// twiddle_gen: on-the-fly generator of the between-dimension twiddle
// factors for one round (two decomposed dimensions on n x n planes).
//
// It holds two tables that the lanes read combinationally:
//   col_tw[r]     pre-column-NTT factor of plane row r (n entries)
//   row_tw[r][c]  pre-row-NTT factor of element (r, c) (n*n entries)
// and produces them with a single modular multiplier from a small ROM of
// seed roots w_{2^k}, k = 0..LMAX.
//
// init (one-cycle pulse, lg_* sampled) prepares the first twiddle set of a
// round, with wc = w_{2^lg_cstep}, wr = w_{2^lg_rstep}, wi = w_{2^lg_rinit}:
//   step_c[r] = wc^r, step_r[c] = wr^c             (2n products)
//   col_tw[r] = 1,   row_tw[r][c] = wi^(r*c)      (n*n + n products)
// next (pulse) advances to the following set of planes:
//   col_tw[r] *= step_c[r],  row_tw[r][c] *= step_r[c]   (n + n*n products)
// busy is high while either sequence runs (one product per cycle); the
// tables must not be read for a new set until busy falls.
// The set-to-set update rule, the table sizes and the single multiplier
// follow the SAM architecture. The SAM architecture keeps the n*n initial values and the per-
// dimension step roots in ROM and double-buffers the row table; here both
// are computed at round start from the seed roots and the row table is
// single-buffered, so the controller waits during an update.
// T read ports on the row table let T lanes work on T different rows of one
// plane in the last round.
module twiddle_gen
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF,
  parameter int unsigned T    = T_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [$clog2(LMAX+1)-1:0] lg_cstep,
  input  logic [$clog2(LMAX+1)-1:0] lg_rstep,
  input  logic [$clog2(LMAX+1)-1:0] lg_rinit,
  input  logic                     next,
  output logic                     busy,
  input  logic [$clog2(N_PT)-1:0]  col_r,
  output elem_t                    col_tw,
  input  logic [$clog2(N_PT)-1:0]  row_r [T],
  input  logic [$clog2(N_PT)-1:0]  row_c [T],
  output elem_t                    row_tw [T]
);
  localparam int unsigned LN = $clog2(N_PT);
  typedef logic [LN-1:0] idx_t;
  typedef enum logic [2:0] {S_IDLE, S_STEPC, S_STEPR, S_ROWI, S_UPDC, S_UPDR} st_t;

  // seed ROM: primitive 2^k-th roots of unity
  elem_t seed [LMAX+1];
  for (genvar k = 0; k <= LMAX; k++) begin : g_seed
    localparam elem_t SV = root_pow2(k);
    assign seed[k] = SV;
  end

  elem_t step_c [N_PT];
  elem_t step_r [N_PT];
  elem_t ctab   [N_PT];
  elem_t rtab   [N_PT][N_PT];

  st_t   st;
  idx_t  ir, ic;
  elem_t acc, z, wc, wr, wi;
  logic  last_c, last_r;

  assign last_c = (ic == idx_t'(N_PT - 1));
  assign last_r = (ir == idx_t'(N_PT - 1));
  assign busy   = (st != S_IDLE);

  // the one multiplier and its operand mux
  elem_t ma, mb, mp;
  always_comb begin
    ma = acc; mb = z;
    unique case (st)
      S_STEPC: begin ma = acc; mb = wc; end
      S_STEPR: begin ma = acc; mb = wr; end
      S_ROWI:  if (ic == '0) begin ma = z; mb = wi; end
               else          begin ma = acc; mb = z; end
      S_UPDC:  begin ma = ctab[ir]; mb = step_c[ir]; end
      S_UPDR:  begin ma = rtab[ir][ic]; mb = step_r[ic]; end
      default: ;
    endcase
    mp = mul_mod(ma, mb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ir <= '0; ic <= '0;
      acc <= '0; z <= '0; wc <= '0; wr <= '0; wi <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          ir <= '0; ic <= '0;
          if (init) begin
            wc  <= seed[lg_cstep];
            wr  <= seed[lg_rstep];
            wi  <= seed[lg_rinit];
            acc <= elem_t'(1);
            st  <= S_STEPC;
          end else if (next) begin
            st <= S_UPDC;
          end
        end
        S_STEPC: begin
          acc <= mp; ir <= ir + 1'b1;
          if (last_r) begin acc <= elem_t'(1); st <= S_STEPR; end
        end
        S_STEPR: begin
          acc <= mp; ir <= ir + 1'b1;
          if (last_r) st <= S_ROWI;
        end
        S_ROWI: begin
          if (ic == '0) begin
            // row r uses z = wi^r; the first row starts from 1
            if (ir == '0) begin z <= elem_t'(1); acc <= elem_t'(1); end
            else          begin z <= mp;         acc <= mp;         end
          end else begin
            acc <= mp;
          end
          ic <= ic + 1'b1;
          if (last_c) begin
            ir <= ir + 1'b1;
            if (last_r) st <= S_IDLE;
          end
        end
        S_UPDC: begin
          ir <= ir + 1'b1;
          if (last_r) st <= S_UPDR;
        end
        S_UPDR: begin
          ic <= ic + 1'b1;
          if (last_c) begin
            ir <= ir + 1'b1;
            if (last_r) st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // table writes (no reset: every entry is written by init before use)
  always_ff @(posedge clk) begin
    unique case (st)
      S_STEPC: step_c[ir] <= acc;
      S_STEPR: step_r[ir] <= acc;
      S_ROWI: begin
        if (ic == '0) begin
          ctab[ir]     <= elem_t'(1);
          rtab[ir][ic] <= elem_t'(1);
        end else begin
          rtab[ir][ic] <= acc;
        end
      end
      S_UPDC: ctab[ir]     <= mp;
      S_UPDR: rtab[ir][ic] <= mp;
      default: ;
    endcase
  end

  assign col_tw = ctab[col_r];
  for (genvar l = 0; l < T; l++) begin : g_rd
    assign row_tw[l] = rtab[row_r[l]][row_c[l]];
  end

  a_cmd: assert property (@(posedge clk) disable iff (!rst_n) !((init || next) && busy));
endmodule
