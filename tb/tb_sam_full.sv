// tb_sam_full: one complete 2^16-point NTT on the accelerator at its default
// size (n = 64, t = 4, b = 8, 256-bit field), the smallest size of the
// evaluated range. The reference is an independent iterative radix-2
// transform computed in the testbench; 16 outputs are also checked against
// the direct sum. Every output address is compared, using the
// digit-reversed output order documented in sam_top. Reports the cycle
// count of the run.
module tb_sam_full;
  import sam_pkg::*;
  localparam int unsigned T  = T_DEF;
  localparam int unsigned LN = $clog2(N_PT_DEF);
  localparam int unsigned LOGN = 16;
  localparam int unsigned NN = 1 << LOGN;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [$clog2(LMAX+1)-1:0] log_n = '0;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid;
  logic [AW-1:0] rd_req_addr, wr_addr;
  elem_t rd_resp_data [T], wr_data [T];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sam_top dut (.*);
  ddr_model #(.T(T), .DEPTH(NN), .LAT(20), .STALL(0)) u_ddr (.*);

  elem_t a_in [NN];
  elem_t x_ref [NN];

  function automatic elem_t rnd_elem();
    elem_t v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v % P;
  endfunction

  function automatic int out_index(int addr);
    int d, lm, k, mul;
    d  = (LOGN + LN - 1) / LN;
    lm = LOGN - (d - 1) * LN;
    k  = addr >> ((d - 1) * LN);
    mul = 1 << lm;
    for (int h = d - 2; h >= 0; h--) begin
      k += ((addr >> (h * LN)) & ((1 << LN) - 1)) * mul;
      mul <<= LN;
    end
    return k;
  endfunction

  // iterative radix-2 decimation-in-time transform, natural-order output
  task automatic ref_ntt();
    for (int i = 0; i < int'(NN); i++) x_ref[int'(bit_rev(16'(i), LOGN))] = a_in[i];
    for (int s = 1; s <= int'(LOGN); s++) begin
      int len;
      elem_t wl;
      len = 1 << s;
      wl  = root_pow2(s);
      for (int b0 = 0; b0 < int'(NN); b0 += len) begin
        elem_t w;
        w = elem_t'(1);
        for (int j = 0; j < len / 2; j++) begin
          elem_t u, v;
          u = x_ref[b0 + j];
          v = mul_mod(x_ref[b0 + j + len/2], w);
          x_ref[b0 + j]         = add_mod(u, v);
          x_ref[b0 + j + len/2] = sub_mod(u, v);
          w = mul_mod(w, wl);
        end
      end
    end
  endtask

  initial begin
    int cyc, k;
    elem_t wn;
    for (int i = 0; i < int'(NN); i++) begin a_in[i] = rnd_elem(); u_ddr.mem[i] = a_in[i]; end
    ref_ntt();
    // spot-check the reference against the direct sum
    wn = root_pow2(LOGN);
    for (int t = 0; t < 16; t++) begin
      elem_t s, wk, wp;
      k = (t * 4099) % NN;
      s = '0; wp = elem_t'(1); wk = pow_mod(wn, k);
      for (int j = 0; j < int'(NN); j++) begin
        s = add_mod(s, mul_mod(a_in[j], wp));
        wp = mul_mod(wp, wk);
      end
      checks++;
      if (s !== x_ref[k]) begin failures++; $display("reference mismatch at %0d", k); end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    log_n = ($clog2(LMAX+1))'(LOGN); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    $display("N=2^%0d done in %0d cycles", LOGN, cyc);
    for (int a = 0; a < int'(NN); a++) begin
      checks++;
      if (u_ddr.mem[a] !== x_ref[out_index(a)]) begin
        failures++;
        if (failures < 10) $display("MISMATCH addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
