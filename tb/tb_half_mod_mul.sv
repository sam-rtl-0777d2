// tb_half_mod_mul: pushes bursts of up to DEPTH operand pairs (the pairing
// half of a pipeline stage), then pops them (the idle half) and checks each
// x*y mod p in order against a shift-and-add reference, plus the empty flag.
module tb_half_mod_mul;
  import sam_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty;
  elem_t x, y, prod;
  int checks = 0, failures = 0;
  half_mod_mul #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  elem_t ex [$];

  task automatic burst(int n);
    for (int i = 0; i < n; i++) begin
      elem_t a, b;
      a = (i == 0) ? P - 1 : ref_rand();
      b = (i == 1) ? P - 1 : ref_rand();
      ex.push_back(ref_mul(a, b));
      @(negedge clk); push = 1; x = a; y = b;
    end
    @(negedge clk); push = 0;
    checks++;
    if (empty) begin failures++; $display("empty with pending products"); end
    for (int i = 0; i < n; i++) begin
      elem_t e;
      pop = 1;
      #1;
      e = ex.pop_front();
      checks++;
      if (prod !== e) begin failures++; $display("product %0d mismatch", i); end
      @(negedge clk);
    end
    pop = 0;
    checks++;
    if (!empty) begin failures++; $display("not empty after draining"); end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (6) burst(1 + $urandom % DEPTH);
    burst(DEPTH);
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
