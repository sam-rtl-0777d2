// tb_twiddle_gen: n = 4, T = 2. After init the column table must be all 1
// and row_tw[r][c] = wi^(r*c); after the s-th next, col_tw[r] = wc^(r*s)
// and row_tw[r][c] = wi^(r*c) * wr^(c*s). Roots wc, wr, wi are primitive
// roots of the orders given by lg_cstep, lg_rstep, lg_rinit. Also checks
// the busy time: 2n + n^2 cycles for init and n + n^2 for an update (one
// product per cycle), and that the T read ports are independent.
module tb_twiddle_gen;
  import sam_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned N_PT = 4, T = 2;
  logic clk = 0, rst_n = 0, init = 0, next = 0, busy;
  logic [4:0] lg_cstep, lg_rstep, lg_rinit;
  logic [1:0] col_r, row_r [T], row_c [T];
  elem_t col_tw, row_tw [T];
  int checks = 0, failures = 0;
  twiddle_gen #(.N_PT(N_PT), .T(T)) dut (.*);
  always #5 clk = ~clk;

  task automatic wait_busy(int expect_cycles);
    int c;
    c = 0;
    @(negedge clk);
    while (busy) begin @(negedge clk); c++; end
    checks++;
    if (c != expect_cycles) begin failures++; $display("busy %0d cycles, expected %0d", c, expect_cycles); end
  endtask

  // power tables, filled by repeated multiplication
  localparam int unsigned NPOW = 100;
  elem_t pc [NPOW], pr [NPOW], pi [NPOW];
  task automatic fill(ref elem_t tab [NPOW], input elem_t w, input int cnt);
    tab[0] = elem_t'(1);
    for (int k = 1; k < cnt; k++) tab[k] = ref_mul(tab[k-1], w);
  endtask

  task automatic check_set(int s, int cells);
    int r, c;
    for (int k = 0; k < cells; k++) begin
      r = k / int'(N_PT); c = k % int'(N_PT);
      col_r = 2'(r);
      row_r[0] = 2'(r); row_c[0] = 2'(c);
      row_r[1] = 2'(N_PT - 1 - r); row_c[1] = 2'(N_PT - 1 - c);
      #1;
      checks++;
      if (col_tw !== pc[r * s]) begin failures++; $display("col r%0d set%0d", r, s); end
      checks++;
      if (row_tw[0] !== ref_mul(pi[r * c], pr[c * s])) begin
        failures++; $display("row r%0d c%0d set%0d", r, c, s);
      end
      checks++;
      if (row_tw[1] !== ref_mul(pi[(N_PT-1-r) * (N_PT-1-c)], pr[(N_PT-1-c) * s])) begin
        failures++; $display("port1 r%0d c%0d set%0d", r, c, s);
      end
    end
  endtask

  task automatic round(int lc, int lr, int li, int sets);
    lg_cstep = 5'(lc); lg_rstep = 5'(lr); lg_rinit = 5'(li);
    fill(pc, ref_root(lc), NPOW); fill(pr, ref_root(lr), NPOW); fill(pi, ref_root(li), NPOW);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    wait_busy(2 * N_PT + N_PT * N_PT - 1);
    check_set(0, N_PT * N_PT);
    for (int s = 1; s < sets; s++) begin
      @(negedge clk); next = 1; @(negedge clk); next = 0;
      wait_busy(N_PT + N_PT * N_PT - 1);
      check_set(s, N_PT * N_PT);
    end
  endtask

  initial begin
    col_r = '0; row_r = '{default: '0}; row_c = '{default: '0};
    lg_cstep = '0; lg_rstep = '0; lg_rinit = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    round(3, 5, 4, 4);
    round(2, 4, 3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
