// tb_lane_buffer: fills a small buffer (n = 4, b = 2, both banks) with
// random words, reads every address back (one-cycle read latency) and
// checks the data, then overwrites half and reads again.
module tb_lane_buffer;
  import sam_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned N_PT = 4, B = 2;
  localparam int unsigned BAW = 1 + 1 + 4;
  logic clk = 0, we = 0, re = 0;
  logic [BAW-1:0] waddr, raddr;
  elem_t wdata, rdata;
  int checks = 0, failures = 0;
  lane_buffer #(.N_PT(N_PT), .B(B)) dut (.*);
  always #5 clk = ~clk;

  elem_t shadow [2**BAW];

  task automatic check_all();
    for (int a = 0; a < 2**BAW; a++) begin
      @(negedge clk); re = 1; raddr = BAW'(a);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== shadow[a]) begin failures++; $display("addr %0d", a); end
    end
  endtask

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < 2**BAW; a++) begin
      shadow[a] = ref_rand();
      @(negedge clk); we = 1; waddr = BAW'(a); wdata = shadow[a];
    end
    @(negedge clk); we = 0;
    check_all();
    for (int a = 0; a < 2**BAW; a += 2) begin
      shadow[a] = ref_rand();
      @(negedge clk); we = 1; waddr = BAW'(a); wdata = shadow[a];
    end
    @(negedge clk); we = 0;
    check_all();
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
