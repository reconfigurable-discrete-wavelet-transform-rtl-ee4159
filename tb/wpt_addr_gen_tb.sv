// wpt_addr_gen_tb: one address generator through a row pass and a column
// pass, with increments 2 and 1, advancing at irregular times. Every address
// and the line_first / line_last / busy flags are compared with nested loops
// over lines and positions.
module wpt_addr_gen_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, adv, col_pass, busy, line_first, line_last;
  logic [ROW_W-1:0] row0, row_addr;
  logic [COL_W-1:0] col0, col_addr;
  logic [LEN_W-1:0] n_pos, n_lines;
  logic [1:0] inc;
  int checks = 0, failures = 0;

  wpt_addr_gen dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit cp, int r0, int c0, int np, int nl, int step);
    int er, ec;
    @(posedge clk);
    col_pass <= cp; row0 <= ROW_W'(r0); col0 <= COL_W'(c0);
    n_pos <= LEN_W'(np); n_lines <= LEN_W'(nl); inc <= 2'(step);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int l = 0; l < nl; l++)
      for (int p = 0; p < np; p++) begin
        // idle for a random number of cycles, then advance
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
        er = cp ? r0 + step * p : r0 + l;
        ec = cp ? c0 + l : c0 + step * p;
        checks++;
        if (!busy || int'(row_addr) != er || int'(col_addr) != ec ||
            line_first != (p == 0) || line_last != (p == np - 1)) begin
          failures++;
          if (failures < 10)
            $display("line %0d pos %0d: busy=%0d (%0d,%0d) want (%0d,%0d) first=%0d last=%0d",
                     l, p, busy, row_addr, col_addr, er, ec, line_first, line_last);
        end
        adv <= 1'b1;
        @(posedge clk);
        adv <= 1'b0;
      end
    #1;
    checks++;
    if (busy) begin failures++; $display("still busy after the last position"); end
  endtask

  initial begin
    start = 0; adv = 0; col_pass = 0; row0 = '0; col0 = '0; n_pos = '0; n_lines = '0; inc = 2'd1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (busy) failures++;
    run(1'b0, 3, 8, 4, 5, 2);
    run(1'b1, 600, 5, 6, 3, 1);
    run(1'b0, 0, 0, 1, 1, 1);
    run(1'b1, 10, 700, 3, 4, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
