// sam_ctrl: control logic of the accelerator: round sequencing over the
// decomposed dimensions, plane enumeration, DDR fetch/store and the buffer
// and pipeline schedule of every round.
//
// A size-N NTT (N = 2^log_n) is decomposed as N = m * n^(d-1) with
// d = ceil(log_n / log2 n) and the incomplete dimension m (m <= n) being the
// one of largest address stride. The current dimension d_c starts at d-1.
// Every round works on 2-D planes: rows along dimension d_c (R = m or n
// entries, address stride n^d_c), columns along dimension d_c-1 (n entries,
// stride n^(d_c-1)). A round runs column NTTs, then row NTTs, and lowers d_c
// by 2; if d is odd the first round is a special one that runs only the
// column NTTs (dimension d-1) and lowers d_c by 1. The last round has d_c=1.
//
// Planes of a round are grouped in sets that share their twiddle factors:
// a set fixes the digits above d_c, and its planes differ in the digits
// below d_c-1 (n^(d_c-1) planes, consecutive base addresses). Sets are run
// in the order of their twiddle exponent E (the digits above d_c read in
// reversed order), so that the twiddle generator moves from one set to the
// next by a constant multiplication.
//
// Each fetch brings T*BE planes (BE <= b groups of T planes) into the lane
// buffers: LOAD (one DDR beat of T consecutive elements per request), then
// the compute passes, then STORE (one beat per cycle back to the same
// addresses, in place). Rounds with d_c > 1 keep plane l of a group in
// lane l (natural layout). In the last round each plane is contiguous and
// all T lanes share it through the circular layout.
// Natural rounds: column pass over all BE groups, then (after the pipeline
// drains) the row pass over all BE groups. Last round: per plane, column
// pass, drain, row pass, drain, twiddle update.
//
// Timing of the datapath it drives: buffer read issued in cycle 0 (buf_re),
// data out of the read network in cycle 2 (mul_valid / wr_valid with their
// twiddle indices and DDR address), product into the pipelines in cycle 3.
// Writes: the source (DDR response or pipeline output) enters the write
// network in cycle 0 (noc_w_*), the buffer write happens in cycle 1.
// Supported sizes: d >= 3 and N >= T * n^2, enforced by an assertion.
// The flow (rounds, special round, set order, fetch of b*t planes, circular
// layout in the last round) follows the SAM architecture; the plane-set order by E,
// the sequential LOAD/compute/STORE without overlap and the per-plane
// drain in the last round are this design's choices.
module sam_ctrl
  import sam_pkg::*;
#(
  parameter int unsigned N_PT = N_PT_DEF,
  parameter int unsigned T    = T_DEF,
  parameter int unsigned B    = B_DEF,
  localparam int unsigned LN  = $clog2(N_PT),
  localparam int unsigned LT  = $clog2(T),
  localparam int unsigned LB  = $clog2(B),
  localparam int unsigned BAW = 1 + LB + 2 * LN,
  localparam int unsigned LGW = $clog2(LMAX + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host command
  input  logic                   start,
  input  logic [LGW-1:0]         log_n,
  output logic                   busy,
  output logic                   done,
  // DDR read channel (requests; data goes straight to the write network)
  output logic                   rd_req_valid,
  output logic [AW-1:0]          rd_req_addr,
  input  logic                   rd_req_ready,
  input  logic                   rd_resp_valid,
  // DDR write channel (data comes from the read network)
  output logic                   wr_valid,
  output logic [AW-1:0]          wr_addr,
  // buffer read side
  output logic                   buf_re,
  output logic [BAW-1:0]         buf_raddr [T],
  output logic                   noc_r_valid,
  output logic [LT-1:0]          noc_r_shift,
  // lane multipliers and pipelines
  output logic                   mul_valid,
  output logic                   tw_use_row,
  output logic [LN-1:0]          tw_col_r,
  output logic [LN-1:0]          tw_row_r [T],
  output logic [LN-1:0]          tw_row_c [T],
  output logic [$clog2(N_PT+1)-1:0] pipe_log_size,
  input  logic                   pipe_out_valid,
  // buffer write side
  output logic                   noc_w_valid,
  output logic                   noc_w_src_pipe,
  output logic [LT-1:0]          noc_w_shift,
  output logic                   buf_we,
  output logic [BAW-1:0]         buf_waddr [T],
  // twiddle generator
  output logic                   tw_init,
  output logic [LGW-1:0]         tw_lg_cstep,
  output logic [LGW-1:0]         tw_lg_rstep,
  output logic [LGW-1:0]         tw_lg_rinit,
  output logic                   tw_next,
  input  logic                   tw_busy
);
  typedef enum logic [3:0] {
    S_IDLE, S_ROUND, S_TWINIT, S_TWWAIT, S_LOAD, S_COL, S_ROW, S_STORE,
    S_PLANE, S_FETCH, S_DONE
  } st_t;
  typedef logic [5:0]  lg_t;    // a log2 value
  typedef logic [15:0] cnt_t;

  // ---------------------------------------------------------------- command
  lg_t  lnN, d, lm, dc;
  // ---------------------------------------------------------------- round
  lg_t  lR, lPL, lNP, lBE, lNF;
  logic special, circ;
  // ---------------------------------------------------------------- fetch
  logic [AW-1:0] fetch;       // fetch index within the round
  logic          bank;
  cnt_t          q;           // plane within the fetch (last round)
  st_t           st;

  // ---- derived values of the round about to start --------------------------
  function automatic lg_t lmin(lg_t a, lg_t b);
    return (a < b) ? a : b;
  endfunction

  // base address of plane pi of the current round
  function automatic logic [AW-1:0] plane_base(logic [AW-1:0] pi);
    logic [AW-1:0] a, s;
    int unsigned   pos;
    a   = pi & ((AW'(1) << lPL) - 1'b1);
    s   = pi >> lPL;
    pos = 0;
    for (int h = DMAX - 1; h >= 0; h--) begin
      if (h <= int'(d) - 1 && h >= int'(dc) + 1) begin
        logic [AW-1:0] dig;
        int unsigned   wd;
        wd  = (h == int'(d) - 1) ? int'(lm) : LN;
        dig = (s >> pos) & ((AW'(1) << wd) - 1'b1);
        a   = a | (dig << (LN * h));
        pos = pos + wd;
      end
    end
    return a;
  endfunction

  // ---- generic three-level loop counter ------------------------------------
  cnt_t ca, cb, ce;      // issue side
  lg_t  la, lb, le;      // loop extents (log2), set on entering a state
  logic ilast, idone;
  assign ilast = (ca == cnt_t'((1 << la) - 1)) && (cb == cnt_t'((1 << lb) - 1)) &&
                 (ce == cnt_t'((1 << le) - 1));

  cnt_t ra, rb, re;      // load response side
  logic rlast;
  assign rlast = (ra == cnt_t'((1 << la) - 1)) && (rb == cnt_t'((1 << lb) - 1)) &&
                 (re == cnt_t'((1 << le) - 1));

  logic [31:0] ocnt, ototal;   // pipeline outputs seen / expected in a pass
  // per lane: natural passes cover BE groups of n*R elements, last-round
  // passes one plane shared by T lanes
  assign ototal = circ ? (32'd1 << (lR + lg_t'(LN) - lg_t'(LT)))
                       : (32'd1 << (lBE + lR + lg_t'(LN)));

  // ---- issue-side coordinates --------------------------------------------
  logic          is_load, is_store, is_col, is_row, ddr_phase;
  assign is_load   = (st == S_LOAD);
  assign is_store  = (st == S_STORE);
  assign is_col    = (st == S_COL);
  assign is_row    = (st == S_ROW);
  assign ddr_phase = is_load || is_store;

  logic [LB-1:0] i_g;
  logic [LT-1:0] i_p;
  logic [LN-1:0] i_r, i_c;
  logic          i_walk;
  logic [AW-1:0] i_addr;
  logic [LN-1:0] i_twr [T];

  always_comb begin
    i_g = '0; i_p = '0; i_r = '0; i_c = '0; i_walk = 1'b0; i_addr = '0;
    if (ddr_phase) begin
      if (!circ) begin
        i_g = LB'(ce); i_r = LN'(ca); i_c = LN'(cb);
        i_addr = plane_base(fetch * AW'(T << lBE) + AW'(ce) * AW'(T)) +
                 (AW'(ca) << (LN * dc)) + (AW'(cb) << (LN * (dc - 1)));
      end else begin
        i_g = LB'(ca >> LT); i_p = LT'(ca); i_r = LN'(cb); i_c = LN'(ce << LT);
        i_addr = plane_base(fetch * AW'(T << lBE) + AW'(ca)) +
                 (AW'(cb) << LN) + AW'(ce << LT);
      end
    end else if (is_col) begin
      if (!circ) begin i_g = LB'(ca); i_c = LN'(cb); i_r = LN'(ce); end
      else begin
        i_g = LB'(q >> LT); i_p = LT'(q); i_r = LN'(ce); i_c = LN'(cb << LT);
      end
    end else begin
      if (!circ) begin i_g = LB'(ca); i_r = LN'(cb); i_c = LN'(ce); end
      else begin
        i_g = LB'(q >> LT); i_p = LT'(q); i_r = LN'(cb << LT); i_c = LN'(ce);
        i_walk = 1'b1;
      end
    end
    for (int l = 0; l < T; l++)
      i_twr[l] = (circ && is_row) ? i_r + LN'(l) : i_r;
  end

  // ---- write-side coordinates (DDR responses or pipeline outputs) ----------
  logic [LB-1:0] w_g;
  logic [LT-1:0] w_p;
  logic [LN-1:0] w_r, w_c;
  logic          w_walk;
  logic          w_go;
  lg_t           lsz;
  logic [31:0]   oj;
  logic [LN-1:0] ofreq;

  assign lsz   = is_col ? lR : lg_t'(LN);
  assign oj    = ocnt >> lsz;
  assign ofreq = LN'(bit_rev(16'(ocnt & ((32'd1 << lsz) - 1)), int'(lsz)));

  always_comb begin
    w_g = '0; w_p = '0; w_r = '0; w_c = '0; w_walk = 1'b0;
    w_go = 1'b0;
    if (is_load) begin
      w_go = rd_resp_valid;
      if (!circ) begin w_g = LB'(re); w_r = LN'(ra); w_c = LN'(rb); end
      else begin
        w_g = LB'(ra >> LT); w_p = LT'(ra); w_r = LN'(rb); w_c = LN'(re << LT);
      end
    end else if (is_col || is_row) begin
      w_go = pipe_out_valid;
      if (!circ) begin
        if (is_col) begin w_g = LB'(oj >> LN); w_c = LN'(oj); w_r = ofreq; end
        else        begin w_g = LB'(oj >> lR); w_r = LN'(oj & ((32'd1 << lR) - 1)); w_c = ofreq; end
      end else begin
        w_g = LB'(q >> LT); w_p = LT'(q);
        if (is_col) begin w_r = ofreq; w_c = LN'(oj << LT); end
        else        begin w_r = LN'(oj << LT); w_c = ofreq; w_walk = 1'b1; end
      end
    end
  end

  // ---- address generators: one per buffer on each side -----------------
  logic [LT-1:0] rk [T];
  logic [LT-1:0] wk [T];
  logic [BAW-1:0] waddr_now [T];
  for (genvar j = 0; j < T; j++) begin : g_ag
    logic [LB-1:0] rg, wg;
    logic [LN-1:0] rrow, rcol, wrow, wcol;
    buf_addr_gen #(.N_PT(N_PT), .T(T), .B(B), .BUF(j)) u_rd (
      .circ, .walk_rows(i_walk), .lg_rows(($clog2(LN+1))'(lR)),
      .g(i_g), .p(i_p), .r_base(i_r), .c_base(i_c),
      .k(rk[j]), .a_g(rg), .a_row(rrow), .a_col(rcol)
    );
    buf_addr_gen #(.N_PT(N_PT), .T(T), .B(B), .BUF(j)) u_wr (
      .circ, .walk_rows(w_walk), .lg_rows(($clog2(LN+1))'(lR)),
      .g(w_g), .p(w_p), .r_base(w_r), .c_base(w_c),
      .k(wk[j]), .a_g(wg), .a_row(wrow), .a_col(wcol)
    );
    assign buf_raddr[j] = {bank, rg, rrow, rcol};
    assign waddr_now[j] = {bank, wg, wrow, wcol};
  end

  // ---- issue enable ----------------------------------------------------------
  logic issue;
  always_comb begin
    issue = 1'b0;
    if (!idone) begin
      if (is_load)                           issue = rd_req_ready;
      else if (is_store || is_col || is_row) issue = 1'b1;
    end
  end

  assign rd_req_valid = is_load && !idone;
  assign rd_req_addr  = i_addr;
  assign buf_re       = issue && !is_load;

  // write network input and buffer write one cycle later
  assign noc_w_valid    = w_go;
  assign noc_w_src_pipe = !is_load;
  assign noc_w_shift    = LT'(0) - wk[0];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_we <= 1'b0;
    else        buf_we <= w_go;
  end
  always_ff @(posedge clk)
    for (int j = 0; j < T; j++) buf_waddr[j] <= waddr_now[j];

  // read network and multiplier stage: two cycles after issue
  logic          d1_v, d1_store, d2_v, d2_store, d1_row, d2_row;
  logic [AW-1:0] d1_addr, d2_addr;
  logic [LN-1:0] d1_cr, d2_cr, d1_rr [T], d2_rr [T], d1_rc, d2_rc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_v <= 1'b0; d2_v <= 1'b0; d1_store <= 1'b0; d2_store <= 1'b0;
      noc_r_shift <= '0;
    end else begin
      d1_v     <= buf_re;   d2_v     <= d1_v;
      d1_store <= is_store; d2_store <= d1_store;
      noc_r_shift <= rk[0];
    end
  end
  always_ff @(posedge clk) begin
    d1_addr <= i_addr; d2_addr <= d1_addr;
    d1_row  <= is_row; d2_row  <= d1_row;
    d1_cr   <= i_r;    d2_cr   <= d1_cr;
    d1_rc   <= i_c;    d2_rc   <= d1_rc;
    for (int l = 0; l < T; l++) begin
      d1_rr[l] <= i_twr[l]; d2_rr[l] <= d1_rr[l];
    end
  end
  assign noc_r_valid = d1_v;
  assign wr_valid    = d2_v && d2_store;
  assign wr_addr     = d2_addr;
  assign mul_valid   = d2_v && !d2_store;
  assign tw_use_row  = d2_row;
  assign tw_col_r    = d2_cr;
  for (genvar l = 0; l < T; l++) begin : g_tw
    assign tw_row_r[l] = d2_rr[l];
    assign tw_row_c[l] = d2_rc;
  end
  assign pipe_log_size = ($clog2(N_PT+1))'(lsz);

  // twiddle generator commands
  assign tw_lg_cstep = LGW'(lnN - lg_t'(LN) * dc);
  assign tw_lg_rstep = LGW'(lnN - lg_t'(LN) * (dc - 1'b1));
  assign tw_lg_rinit = LGW'(lR + lg_t'(LN));

  assign busy = (st != S_IDLE);

  // ---- the state machine ---------------------------------------------------
  logic last_fetch, set_end;
  assign last_fetch = (fetch == (AW'(1) << lNF) - 1'b1);
  // a natural-layout fetch ends a twiddle set when its last plane does
  assign set_end = (((fetch + 1'b1) << (LT + lBE)) & ((AW'(1) << lPL) - 1'b1)) == '0;

  // enter a loop: set extents and clear counters
  task automatic enter(st_t s, lg_t a, lg_t b, lg_t e);
    st <= s; la <= a; lb <= b; le <= e;
    ca <= '0; cb <= '0; ce <= '0;
    ra <= '0; rb <= '0; re <= '0;
    idone <= 1'b0; ocnt <= '0;
  endtask

  task automatic enter_load();
    if (!circ) enter(S_LOAD, lR, lg_t'(LN), lBE);
    else       enter(S_LOAD, lg_t'(LT) + lBE, lR, lg_t'(LN - LT));
  endtask

  task automatic enter_store();
    if (!circ) enter(S_STORE, lR, lg_t'(LN), lBE);
    else       enter(S_STORE, lg_t'(LT) + lBE, lR, lg_t'(LN - LT));
  endtask

  task automatic enter_col();
    if (!circ) begin
      enter(S_COL, lBE, lg_t'(LN), lR);
    end else begin
      enter(S_COL, '0, lg_t'(LN - LT), lR);
    end
  endtask

  task automatic enter_row();
    if (!circ) begin
      enter(S_ROW, lBE, lR, lg_t'(LN));
    end else begin
      enter(S_ROW, '0, lR - lg_t'(LT), lg_t'(LN));
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      lnN <= '0; d <= '0; lm <= '0; dc <= '0;
      lR <= '0; lPL <= '0; lNP <= '0; lBE <= '0; lNF <= '0;
      special <= 1'b0; circ <= 1'b0;
      fetch <= '0; bank <= 1'b0; q <= '0;
      la <= '0; lb <= '0; le <= '0;
      ca <= '0; cb <= '0; ce <= '0; ra <= '0; rb <= '0; re <= '0;
      idone <= 1'b1; ocnt <= '0;
      tw_init <= 1'b0; tw_next <= 1'b0;
    end else begin
      done    <= 1'b0;
      tw_init <= 1'b0;
      tw_next <= 1'b0;

      // issue-side counters
      if (issue) begin
        if (ilast) idone <= 1'b1;
        if (ce == cnt_t'((1 << le) - 1)) begin
          ce <= '0;
          if (cb == cnt_t'((1 << lb) - 1)) begin
            cb <= '0; ca <= ca + 1'b1;
          end else cb <= cb + 1'b1;
        end else ce <= ce + 1'b1;
      end
      // load response counters
      if (is_load && rd_resp_valid) begin
        if (re == cnt_t'((1 << le) - 1)) begin
          re <= '0;
          if (rb == cnt_t'((1 << lb) - 1)) begin
            rb <= '0; ra <= ra + 1'b1;
          end else rb <= rb + 1'b1;
        end else re <= re + 1'b1;
      end
      if ((is_col || is_row) && pipe_out_valid) ocnt <= ocnt + 1'b1;

      unique case (st)
        S_IDLE: if (start) begin
          lnN <= lg_t'(log_n);
          d   <= lg_t'((int'(log_n) + LN - 1) / LN);
          lm  <= lg_t'(int'(log_n) - ((int'(log_n) + LN - 1) / LN - 1) * LN);
          dc  <= lg_t'((int'(log_n) + LN - 1) / LN - 1);
          st  <= S_ROUND;
        end
        S_ROUND: begin
          // parameters of the round on dimensions dc (rows) and dc-1 (cols)
          special <= (dc == d - 1'b1) && d[0];
          circ    <= (dc == 6'd1);
          lR      <= (dc == d - 1'b1) ? lm : lg_t'(LN);
          lPL     <= lg_t'(LN) * (dc - 1'b1);
          lNP     <= lnN - ((dc == d - 1'b1) ? lm : lg_t'(LN)) - lg_t'(LN);
          st      <= S_TWINIT;
        end
        S_TWINIT: begin
          // groups per fetch: bounded by b, by the planes of a round and
          // (natural layout) by the planes of one twiddle set
          lBE <= circ ? lmin(lg_t'(LB), lNP - lg_t'(LT))
                      : lmin(lmin(lg_t'(LB), lPL - lg_t'(LT)), lNP - lg_t'(LT));
          fetch   <= '0;
          tw_init <= 1'b1;
          st      <= S_TWWAIT;
        end
        S_TWWAIT: begin
          lNF <= lNP - lg_t'(LT) - lBE;
          if (!tw_busy && !tw_init) begin
            q <= '0;
            enter_load();
          end
        end
        S_LOAD: if (idone && rlast && rd_resp_valid) enter_col();
        S_COL: if (ocnt == ototal) begin
          if (special) enter_store();
          else         enter_row();
        end
        S_ROW: if (ocnt == ototal) begin
          if (!circ) begin
            if (set_end && !last_fetch) tw_next <= 1'b1;
            enter_store();
          end else if (q != cnt_t'((T << lBE) - 1)) begin
            tw_next <= 1'b1;
            st <= S_PLANE;
          end else begin
            if (!last_fetch) tw_next <= 1'b1;
            enter_store();
          end
        end
        S_PLANE: if (!tw_busy && !tw_next) begin
          q <= q + 1'b1;
          enter_col();
        end
        S_STORE: if (idone && !d1_v && !d2_v) begin
          st <= S_FETCH;
        end
        S_FETCH: if (!tw_busy && !tw_next) begin
          bank <= ~bank;
          if (!last_fetch) begin
            fetch <= fetch + 1'b1;
            q     <= '0;
            enter_load();
          end else if (dc != 6'd1) begin
            dc <= dc - (special ? 6'd1 : 6'd2);
            st <= S_ROUND;
          end else begin
            st <= S_DONE;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_IDLE && start) |-> (int'(log_n) >= 2 * LN + ((LT > 0) ? LT : 1) && int'(log_n) <= LMAX));
endmodule
