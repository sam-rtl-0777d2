// tb_ntt_stage: feeds blocks of 2S elements into one stage (S = 4) back to
// back, and checks that each block comes out as the S sums x_j + x_{j+S}
// followed by the S products (x_j - x_{j+S}) * w_{2S}^j, one element per
// cycle, with references from shift-and-add arithmetic.
module tb_ntt_stage;
  import sam_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned S = 4;
  localparam int NB = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  elem_t in_data, out_data;
  int checks = 0, failures = 0;
  ntt_stage #(.S(S)) dut (.*);
  always #5 clk = ~clk;

  elem_t ex [$];
  int nout = 0, first_out = -1, last_out = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      elem_t e;
      e = ex.pop_front();
      checks++;
      if (out_data !== e) begin failures++; $display("output %0d mismatch", nout); end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      nout++;
    end
  end

  initial begin
    elem_t blk [2*S];
    elem_t w;
    in_data = '0;
    w = ref_root($clog2(2 * S));
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < int'(2*S); i++) blk[i] = ref_rand();
      for (int j = 0; j < int'(S); j++) ex.push_back(ref_add(blk[j], blk[j+S]));
      for (int j = 0; j < int'(S); j++)
        ex.push_back(ref_mul(ref_sub(blk[j], blk[j+S]), ref_pow(w, j)));
      for (int i = 0; i < int'(2*S); i++) begin
        @(negedge clk); in_valid = 1; in_data = blk[i];
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4 * S) @(negedge clk);
    checks++;
    if (nout != NB * 2 * S) begin failures++; $display("count %0d", nout); end
    checks++;
    if (last_out - first_out + 1 != NB * 2 * S) begin
      failures++; $display("output not one per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
