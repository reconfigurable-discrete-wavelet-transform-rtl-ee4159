// wpt_ag_tb: the input and output address generators of the WPT AG on a row
// pass and a column pass. The input side must visit the even sample of every
// pair of the source region (two samples per step along the line), the output
// side every position of the first half of the destination line, one per
// step; the two sides are advanced independently.
module wpt_ag_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pass_t pass;
  logic start, in_adv, in_busy, in_line_first, in_line_last, out_adv, out_busy;
  logic [ROW_W-1:0] in_row, out_row;
  logic [COL_W-1:0] in_col, out_col;
  int checks = 0, failures = 0;

  wpt_ag dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(pass_t p);
    int half;
    half = int'(p.len) / 2;
    @(posedge clk);
    pass <= p; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // input side first, then output side
    for (int l = 0; l < int'(p.n_lines); l++)
      for (int k = 0; k < half; k++) begin
        #1;
        checks++;
        if (p.col_pass ? (int'(in_row) != int'(p.src_row) + 2*k || int'(in_col) != int'(p.src_col) + l)
                       : (int'(in_row) != int'(p.src_row) + l || int'(in_col) != int'(p.src_col) + 2*k)) begin
          failures++;
          $display("in line %0d pos %0d: (%0d,%0d)", l, k, in_row, in_col);
        end
        checks++;
        if (!out_busy) failures++;
        in_adv <= 1'b1;
        @(posedge clk);
        in_adv <= 1'b0;
      end
    #1;
    checks++;
    if (in_busy) failures++;
    for (int l = 0; l < int'(p.n_lines); l++)
      for (int k = 0; k < half; k++) begin
        #1;
        checks++;
        if (p.col_pass ? (int'(out_row) != int'(p.dst_row) + k || int'(out_col) != int'(p.dst_col) + l)
                       : (int'(out_row) != int'(p.dst_row) + l || int'(out_col) != int'(p.dst_col) + k)) begin
          failures++;
          $display("out line %0d pos %0d: (%0d,%0d)", l, k, out_row, out_col);
        end
        out_adv <= 1'b1;
        @(posedge clk);
        out_adv <= 1'b0;
      end
    #1;
    checks++;
    if (out_busy) failures++;
  endtask

  initial begin
    pass = '0; start = 0; in_adv = 0; out_adv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(mk_pass(1'b0, 4, 16, 580, 16, 3, 8, 1'b0));
    run(mk_pass(1'b1, 580, 2, 4, 2, 5, 6, 1'b1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
