// tb_circular_noc: random vectors and rotations through the T = 4 network;
// checks out[i] = in[(i + shift) mod T] one cycle later and the valid flag.
module tb_circular_noc;
  import sam_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned T = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] shift;
  elem_t in_data [T], out_data [T];
  int checks = 0, failures = 0;
  circular_noc #(.T(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    shift = '0;
    for (int i = 0; i < int'(T); i++) in_data[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      elem_t v [T];
      int s;
      s = (t < 4) ? t : int'($urandom % T);
      for (int i = 0; i < int'(T); i++) begin v[i] = ref_rand(); in_data[i] = v[i]; end
      shift = 2'(s); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no valid"); end
      for (int i = 0; i < int'(T); i++) begin
        checks++;
        if (out_data[i] !== v[(i + s) % T]) begin failures++; $display("rot %0d out %0d", s, i); end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid stuck"); end
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
