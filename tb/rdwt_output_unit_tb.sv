// rdwt_output_unit_tb: the Output Unit with an output address generator and a
// frame-memory model. A stream of coefficient pairs is fed in, lines marked by
// the first flag, each line carrying lag leading pairs that must be dropped.
// Checks that every kept low coefficient lands at the generator's address and
// the high one half a line further, that dropped pairs write nothing, and that
// done pulses once at the end of the pass. Row pass with lag 2, column pass
// with lag 0.
module rdwt_output_unit_tb;
  import rdwt_pkg::*;

  localparam int R = 32, C = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic col_pass, pe_valid, pe_first, ag_busy, ag_adv, wr_en, done, start;
  logic [LEN_W-1:0] half, n_lines;
  logic [LAG_W-1:0] lag;
  data_t pe_l, pe_h;
  logic [ROW_W-1:0] ag_row, row0;
  logic [COL_W-1:0] ag_col, col0;
  logic [1:0][ROW_W-1:0] wr_row;
  logic [1:0][COL_W-1:0] wr_col;
  data_t [1:0] wr_data;
  int checks = 0, failures = 0;

  rdwt_output_unit dut (.*);

  logic unused_f, unused_l;
  wpt_addr_gen u_ag (
    .clk, .rst_n, .start, .adv(ag_adv), .col_pass, .row0, .col0, .n_pos(half), .n_lines,
    .inc(2'd1), .row_addr(ag_row), .col_addr(ag_col), .busy(ag_busy),
    .line_first(unused_f), .line_last(unused_l)
  );

  frame_mem_model #(.ROWS(R), .COLS(C)) u_mem (
    .clk, .rd_en(1'b0), .rd_row('0), .rd_col('0), .rd_data(),
    .wr_en, .wr_row, .wr_col, .wr_data
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done;
  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic run(bit cp, int r0, int c0, int len, int nl, int lg);
    int hf, exp_m [R][C];
    hf = len / 2;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      u_mem.mem[r][c] = -16'sd1;
      exp_m[r][c] = -1;
    end
    n_done = 0;
    @(posedge clk);
    col_pass <= cp; row0 <= ROW_W'(r0); col0 <= COL_W'(c0); half <= LEN_W'(hf);
    n_lines <= LEN_W'(nl); lag <= LAG_W'(lg); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int l = 0; l < nl; l++)
      for (int k = -lg; k < hf; k++) begin
        pe_valid <= 1'b1;
        pe_first <= (k == -lg);
        pe_l <= data_t'(1000 + 100 * l + k);
        pe_h <= data_t'(-1000 - 100 * l - k);
        if (k >= 0) begin
          if (cp) begin
            exp_m[r0 + k][c0 + l]      = 1000 + 100 * l + k;
            exp_m[r0 + hf + k][c0 + l] = -1000 - 100 * l - k;
          end else begin
            exp_m[r0 + l][c0 + k]      = 1000 + 100 * l + k;
            exp_m[r0 + l][c0 + hf + k] = -1000 - 100 * l - k;
          end
        end
        @(posedge clk);
        pe_valid <= 1'b0;
        @(posedge clk);
      end
    repeat (4) @(posedge clk);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      checks++;
      if (int'(u_mem.mem[r][c]) != exp_m[r][c]) begin
        failures++;
        if (failures < 10) $display("mem[%0d][%0d] = %0d want %0d", r, c, u_mem.mem[r][c], exp_m[r][c]);
      end
    end
    checks++;
    if (n_done != 1) begin failures++; $display("done pulsed %0d times", n_done); end
  endtask

  initial begin
    col_pass = 0; pe_valid = 0; pe_first = 0; pe_l = '0; pe_h = '0; start = 0;
    row0 = '0; col0 = '0; half = '0; n_lines = '0; lag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 3, 2, 8, 4, 2);
    run(1'b1, 1, 5, 6, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
