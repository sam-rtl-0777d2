// tb_sam_top: end-to-end test of the accelerator at reduced size (n = 4,
// T = 2 lanes, b = 2) for N = 2^5 .. 2^9, which covers every kind of round:
// the special one-dimension round (d odd), a first round on the incomplete
// dimension (m < n rows), natural-layout rounds with more than one plane
// group and twiddle set, and the last round with the circular layout.
// Inputs are random field elements in the DDR model; each result is compared
// with a directly computed transform sum_j a[j] w_N^{jk}, using the
// digit-reversed output order documented in sam_top. Mechanism counters
// (special rounds, circular rounds, incomplete-dimension passes, twiddle
// set updates, non-zero network rotations, DDR read stalls) must all be
// non-zero at the end.
module tb_sam_top;
  import sam_pkg::*;
  localparam int unsigned N_PT = 4, T = 2, B = 2;
  localparam int unsigned LN = 2;
  localparam int unsigned MAXN = 512;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [$clog2(LMAX+1)-1:0] log_n = '0;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid;
  logic [AW-1:0] rd_req_addr, wr_addr;
  elem_t rd_resp_data [T], wr_data [T];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sam_top #(.N_PT(N_PT), .T(T), .B(B)) dut (.*);
  ddr_model #(.T(T), .DEPTH(MAXN), .LAT(6), .STALL(1)) u_ddr (.*);

  // ---- mechanism counters ----------------------------------------------------
  int n_special = 0, n_circ = 0, n_incomplete = 0, n_twnext = 0, n_rot = 0;
  int n_multigroup = 0;
  always @(posedge clk) if (rst_n) begin
    // one twiddle initialisation per round
    if (dut.tw_init) begin
      if (dut.u_ctrl.special)  n_special++;
      if (dut.u_ctrl.circ)     n_circ++;
      if (dut.u_ctrl.lR < LN)  n_incomplete++;
      if (dut.u_ctrl.lBE > 0)  n_multigroup++;
    end
    if (dut.tw_next) n_twnext++;
    if (dut.noc_w_valid && dut.noc_w_shift != 0) n_rot++;
  end

  elem_t a_in [MAXN];
  elem_t x_ref [MAXN];

  function automatic elem_t rnd_elem();
    elem_t v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v % P;
  endfunction

  // output index held at address `addr` (digit reversal, top digit radix m)
  function automatic int out_index(int addr, int ln_total);
    int d, lm, k, mul, sh;
    d  = (ln_total + LN - 1) / LN;
    lm = ln_total - (d - 1) * LN;
    k  = addr >> ((d - 1) * LN);      // a_{d-1}
    mul = 1 << lm;
    for (int h = d - 2; h >= 0; h--) begin
      k += ((addr >> (h * LN)) & ((1 << LN) - 1)) * mul;
      mul <<= LN;
    end
    return k;
  endfunction

  task automatic run(int ln_total);
    int nn, cyc;
    elem_t w;
    nn = 1 << ln_total;
    for (int i = 0; i < nn; i++) begin a_in[i] = rnd_elem(); u_ddr.mem[i] = a_in[i]; end
    w = root_pow2(ln_total);
    for (int k = 0; k < nn; k++) begin
      elem_t s, wk, wp;
      s = '0; wp = elem_t'(1); wk = pow_mod(w, k);
      for (int j = 0; j < nn; j++) begin
        s  = add_mod(s, mul_mod(a_in[j], wp));
        wp = mul_mod(wp, wk);
      end
      x_ref[k] = s;
    end
    @(negedge clk);
    log_n = ($clog2(LMAX+1))'(ln_total); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    $display("N=2^%0d done in %0d cycles", ln_total, cyc);
    for (int a = 0; a < nn; a++) begin
      checks++;
      if (u_ddr.mem[a] !== x_ref[out_index(a, ln_total)]) begin
        failures++;
        if (failures < 10) $display("MISMATCH N=2^%0d addr %0d", ln_total, a);
      end
    end
    // elements beyond N are untouched
    checks++;
    if (nn < int'(MAXN) && u_ddr.mem[nn] !== elem_t'(nn)) begin
      failures++; $display("write outside the transform");
    end
  endtask

  initial begin
    for (int i = 0; i < int'(MAXN); i++) u_ddr.mem[i] = elem_t'(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 5; l <= 9; l++) begin
      run(l);
      for (int i = 0; i < int'(MAXN); i++) u_ddr.mem[i] = elem_t'(i);
    end
    checks++; if (n_special == 0)    begin failures++; $display("no special round"); end
    checks++; if (n_circ == 0)       begin failures++; $display("no circular-layout round"); end
    checks++; if (n_incomplete == 0) begin failures++; $display("no incomplete dimension"); end
    checks++; if (n_twnext == 0)     begin failures++; $display("no twiddle set update"); end
    checks++; if (n_rot == 0)        begin failures++; $display("no network rotation"); end
    checks++; if (n_multigroup == 0) begin failures++; $display("no multi-group fetch"); end
    checks++; if (u_ddr.stalls == 0) begin failures++; $display("no DDR stall"); end
    $display("special=%0d circ=%0d incomplete=%0d twnext=%0d rot=%0d multigroup=%0d ddr_stalls=%0d",
             n_special, n_circ, n_incomplete, n_twnext, n_rot, n_multigroup, u_ddr.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
