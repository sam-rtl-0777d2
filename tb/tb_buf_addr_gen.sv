// tb_buf_addr_gen: checks the buffer address generators (T = 2, n = 4)
// against the circular layout example of two 4 x 4 planes (elements 0..31):
//   buffer 0 rows: 0 5 2 7 | 8 13 10 15 | 20 17 22 19 | 28 25 30 27
//   buffer 1 rows: 4 1 6 3 | 12 9 14 11 | 16 21 18 23 | 24 29 26 31
// For every column-wise access (row r, columns c0..c0+1 of plane p) and
// every row-wise access (rows r0..r0+1, column c) each buffer must point at
// the cell that holds the element its lane needs. The natural layout is
// checked to use (g, r, c) unchanged with no rotation.
module tb_buf_addr_gen;
  import sam_pkg::*;
  localparam int unsigned N_PT = 4, T = 2, B = 2;
  int checks = 0, failures = 0;

  // layout[buffer][row][col] = element index
  int layout [2][4][4] = '{
    '{'{0, 5, 2, 7}, '{8, 13, 10, 15}, '{20, 17, 22, 19}, '{28, 25, 30, 27}},
    '{'{4, 1, 6, 3}, '{12, 9, 14, 11}, '{16, 21, 18, 23}, '{24, 29, 26, 31}}};

  logic circ, walk_rows;
  logic [1:0] lg_rows;
  logic [0:0] g, p;
  logic [1:0] r_base, c_base;
  logic [0:0] k [T], a_g [T];
  logic [1:0] a_row [T], a_col [T];

  for (genvar j = 0; j < T; j++) begin : g_dut
    buf_addr_gen #(.N_PT(N_PT), .T(T), .B(B), .BUF(j)) dut (
      .circ, .walk_rows, .lg_rows, .g, .p, .r_base, .c_base,
      .k(k[j]), .a_g(a_g[j]), .a_row(a_row[j]), .a_col(a_col[j]));
  end

  initial begin
    #1;
    lg_rows = 2; g = 0;
    circ = 1;
    for (int pp = 0; pp < 2; pp++)
      for (int rr = 0; rr < 4; rr++)
        for (int cc = 0; cc < 4; cc++) begin
          // column-wise: lanes take columns c0, c0+1 of row rr
          if (cc % 2 == 0) begin
            walk_rows = 0; p = 1'(pp); r_base = 2'(rr); c_base = 2'(cc);
            #1;
            for (int j = 0; j < int'(T); j++) begin
              int lane, want;
              lane = (j - int'(k[j]) + T) % T;
              want = pp * 16 + rr * 4 + cc + lane;
              checks++;
              if (layout[j][a_row[j]][a_col[j]] != want) begin
                failures++; $display("col access p%0d r%0d c%0d buf%0d", pp, rr, cc, j);
              end
            end
          end
          // row-wise: lanes take rows r0, r0+1 of column cc
          if (rr % 2 == 0) begin
            walk_rows = 1; p = 1'(pp); r_base = 2'(rr); c_base = 2'(cc);
            #1;
            for (int j = 0; j < int'(T); j++) begin
              int lane, want;
              lane = (j - int'(k[j]) + T) % T;
              want = pp * 16 + (rr + lane) * 4 + cc;
              checks++;
              if (layout[j][a_row[j]][a_col[j]] != want) begin
                failures++; $display("row access p%0d r%0d c%0d buf%0d", pp, rr, cc, j);
              end
            end
          end
        end
    // natural layout: identity, no rotation
    circ = 0;
    for (int t = 0; t < 20; t++) begin
      walk_rows = 1'($urandom); g = 1'($urandom); p = 1'($urandom);
      r_base = 2'($urandom); c_base = 2'($urandom);
      #1;
      for (int j = 0; j < int'(T); j++) begin
        checks++;
        if (k[j] != 0 || a_g[j] != g || a_row[j] != r_base || a_col[j] != c_base) begin
          failures++; $display("natural layout");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
