// tb_sam_ctrl: the controller alone (n = 4, T = 2, b = 2) with simple
// models around it: a DDR read channel answering 3 cycles after a request,
// pipelines modelled as a fixed 9-cycle delay of mul_valid, and a twiddle
// generator that is busy 7 cycles per command. For N = 2^5, 2^7 and 2^9 it
// checks: the number of rounds (twiddle initialisations) is ceil(d/2); in
// every round each element address is read from and written to DDR
// exactly once; the buffers are read once per compute pass plus once for
// the store; the last round uses a rotating network; done pulses once.
module tb_sam_ctrl;
  import sam_pkg::*;
  localparam int unsigned N_PT = 4, T = 2, B = 2;
  localparam int unsigned LN = 2, LT = 1;
  localparam int unsigned BAW = 1 + 1 + 4;
  localparam int unsigned MAXN = 512;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] log_n = '0;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid;
  logic [AW-1:0] rd_req_addr, wr_addr;
  logic buf_re, buf_we, noc_r_valid, noc_w_valid, noc_w_src_pipe;
  logic [BAW-1:0] buf_raddr [T], buf_waddr [T];
  logic [LT-1:0] noc_r_shift, noc_w_shift;
  logic mul_valid, tw_use_row, pipe_out_valid;
  logic [LN-1:0] tw_col_r, tw_row_r [T], tw_row_c [T];
  logic [2:0] pipe_log_size;
  logic tw_init, tw_next, tw_busy;
  logic [4:0] tw_lg_cstep, tw_lg_rstep, tw_lg_rinit;
  int checks = 0, failures = 0;

  sam_ctrl #(.N_PT(N_PT), .T(T), .B(B)) dut (.*);
  always #5 clk = ~clk;

  // models
  logic [2:0] rdq;
  logic [8:0] pq;
  int twb = 0;
  assign rd_req_ready  = 1'b1;
  assign rd_resp_valid = rdq[2];
  assign pipe_out_valid = pq[8];
  assign tw_busy = (twb > 0);
  always @(posedge clk) begin
    rdq <= {rdq[1:0], rd_req_valid};
    pq  <= {pq[7:0], mul_valid};
    if (tw_init || tw_next) twb <= 7; else if (twb > 0) twb <= twb - 1;
  end

  int rd_cnt [MAXN], wr_cnt [MAXN];
  int rounds = 0, bufreads = 0, rot = 0, dones = 0, passes = 0;
  logic was_row;
  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && rd_req_ready) for (int i = 0; i < int'(T); i++) rd_cnt[(int'(rd_req_addr) + i) % MAXN]++;
    if (wr_valid) for (int i = 0; i < int'(T); i++) wr_cnt[(int'(wr_addr) + i) % MAXN]++;
    if (buf_re) bufreads++;
    if (noc_w_valid && noc_w_shift != 0) rot++;
    if (done) dones++;
    if (tw_init) begin
      rounds++;
      passes += dut.special ? 2 : 3;
    end
  end

  task automatic check_round_cover(int nn);
    for (int a = 0; a < nn; a++) begin
      checks++;
      if (rd_cnt[a] != 1 || wr_cnt[a] != 1) begin
        failures++;
        if (failures < 10) $display("addr %0d read %0d written %0d times", a, rd_cnt[a], wr_cnt[a]);
      end
      rd_cnt[a] = 0; wr_cnt[a] = 0;
    end
  endtask

  task automatic run(int ln_total);
    int nn, d, r0, exp_rounds;
    nn = 1 << ln_total;
    d = (ln_total + LN - 1) / LN;
    exp_rounds = (d + 1) / 2;
    r0 = rounds; bufreads = 0; passes = 0; dones = 0;
    for (int a = 0; a < int'(MAXN); a++) begin rd_cnt[a] = 0; wr_cnt[a] = 0; end
    @(negedge clk); log_n = 5'(ln_total); start = 1;
    @(negedge clk); start = 0;
    // a round ends when the next one initialises its twiddles or at done
    while (!done) begin
      @(negedge clk);
      if (tw_init && rounds > r0) check_round_cover(nn);
    end
    check_round_cover(nn);
    repeat (3) @(negedge clk);
    checks++;
    if (rounds - r0 != exp_rounds) begin failures++; $display("rounds %0d expected %0d", rounds - r0, exp_rounds); end
    checks++;
    if (bufreads != passes * nn / int'(T)) begin
      failures++; $display("buffer reads %0d expected %0d", bufreads, passes * nn / int'(T));
    end
    checks++;
    if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
  endtask

  initial begin
    rdq = '0; pq = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(5); run(7); run(9);
    checks++;
    if (rot == 0) begin failures++; $display("no rotation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
