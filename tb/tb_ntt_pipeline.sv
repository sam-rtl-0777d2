// tb_ntt_pipeline: streams random NTTs of full size n and of a smaller size
// (stage skipping) through ntt_pipeline, with and without gaps between
// inputs, and compares every output against a direct O(M^2) transform
// sum_j a[j] * w_M^{ij}, taking the bit-reversed output order into account.
// Also checks that a back-to-back stream sustains one element per cycle.
module tb_ntt_pipeline;
  import sam_pkg::*;
  localparam int unsigned N_PT = 8;
  localparam int unsigned LN = 3;
  localparam int NNTT = 4;

  logic clk = 0, rst_n = 0;
  logic [$clog2(N_PT+1)-1:0] log_size;
  logic in_valid;
  elem_t in_data;
  logic out_valid;
  elem_t out_data;
  int checks = 0, failures = 0;
  int cycles = 0;

  ntt_pipeline #(.N_PT(N_PT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  elem_t inp [NNTT][N_PT];
  elem_t expv [NNTT][N_PT];
  int got;

  function automatic elem_t rnd_elem();
    elem_t v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v % P;
  endfunction

  // collect outputs and compare
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int nt, k, f;
      nt = got >> log_size;
      k  = got & ((1 << log_size) - 1);
      f  = int'(bit_rev(16'(k), log_size));
      checks++;
      if (out_data !== expv[nt][f]) begin
        failures++;
        $display("MISMATCH ls %0d ntt %0d out %0d (freq %0d) t=%0d", log_size, nt, k, f, cycles);
      end
      got++;
    end
  end

  task automatic run(int ls, bit gaps);
    int m, first_in, last_in;
    m = 1 << ls;
    log_size = ($clog2(N_PT+1))'(ls);
    for (int t = 0; t < NNTT; t++)
      for (int i = 0; i < m; i++) begin
        elem_t s, w;
        inp[t][i] = rnd_elem();
      end
    for (int t = 0; t < NNTT; t++)
      for (int i = 0; i < m; i++) begin
        elem_t s, w;
        s = '0;
        w = root_pow2(ls);
        for (int j = 0; j < m; j++) s = add_mod(s, mul_mod(inp[t][j], pow_mod(w, (i * j) % m)));
        expv[t][i] = s;
      end
    got = 0;
    @(negedge clk);
    first_in = cycles;
    for (int t = 0; t < NNTT; t++)
      for (int i = 0; i < m; i++) begin
        in_valid = 1; in_data = inp[t][i];
        @(negedge clk);
        if (gaps && ($urandom % 3 == 0)) begin
          in_valid = 0; @(negedge clk);
        end
      end
    in_valid = 0;
    last_in = cycles;
    if (!gaps) begin
      checks++;
      if (last_in - first_in != NNTT * m) begin
        failures++; $display("input rate not 1/cycle");
      end
    end
    repeat (4 * N_PT) @(negedge clk);
    checks++;
    if (got != NNTT * m) begin
      failures++; $display("got %0d outputs, expected %0d", got, NNTT * m);
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; log_size = LN;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(LN, 0);
    run(LN, 1);
    run(2, 0);
    run(1, 1);
    run(LN, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
