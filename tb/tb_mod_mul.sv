// tb_mod_mul: random and corner operands through mod_mul; each product is
// checked one cycle after its operands against a shift-and-add reference.
module tb_mod_mul;
  import sam_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  elem_t a, b, y;
  int checks = 0, failures = 0;
  mod_mul dut (.*);
  always #5 clk = ~clk;

  task automatic one(elem_t x, elem_t z);
    elem_t e;
    e = ref_mul(x, z);
    @(negedge clk); a = x; b = z; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || y !== e) begin failures++; $display("mismatch"); end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("valid not one cycle"); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    one('0, ref_rand());
    one(P - 1, P - 1);
    one(elem_t'(1), P - 1);
    one(ROOT, ROOT);
    for (int i = 0; i < 40; i++) one(ref_rand(), ref_rand());
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
