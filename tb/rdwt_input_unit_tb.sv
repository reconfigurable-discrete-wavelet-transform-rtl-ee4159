// rdwt_input_unit_tb: the Input Unit with an input address generator and a
// frame-memory model holding mem[r][c] = 64*r + c. For a row pass (fold 2,
// lag 2) and a column pass (fold 1, lag 1) it checks the pair stream handed
// to the PE array: per line, the even/odd samples in order with the first
// pair flagged, then lag zero pairs; pairs exactly fold cycles apart; done
// at the end.
module rdwt_input_unit_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, col_pass, ag_busy, ag_line_first, ag_line_last, ag_adv;
  logic [1:0] fold;
  logic [LAG_W-1:0] lag;
  logic [ROW_W-1:0] ag_row, row0;
  logic [COL_W-1:0] ag_col, col0;
  logic [LEN_W-1:0] n_pos, n_lines;
  logic rd_en;
  logic [1:0][ROW_W-1:0] rd_row;
  logic [1:0][COL_W-1:0] rd_col;
  data_t [1:0] rd_data;
  logic pe_valid, pe_first, done;
  data_t pe_e, pe_o;
  int checks = 0, failures = 0;

  rdwt_input_unit dut (.*);

  wpt_addr_gen u_ag (
    .clk, .rst_n, .start, .adv(ag_adv), .col_pass, .row0, .col0, .n_pos, .n_lines,
    .inc(2'd2), .row_addr(ag_row), .col_addr(ag_col), .busy(ag_busy),
    .line_first(ag_line_first), .line_last(ag_line_last)
  );

  frame_mem_model #(.ROWS(32), .COLS(32)) u_mem (
    .clk, .rd_en, .rd_row, .rd_col, .rd_data,
    .wr_en(1'b0), .wr_row('0), .wr_col('0), .wr_data('0)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream
  int exp_e [$], exp_o [$], exp_f [$];
  int last_t, n_done;

  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (pe_valid) begin
      checks++;
      if (exp_e.size() == 0) begin
        failures++;
        $display("unexpected pair");
      end else begin
        if (int'(pe_e) != exp_e[0] || int'(pe_o) != exp_o[0] || int'(pe_first) != exp_f[0]) begin
          failures++;
          $display("pair (%0d,%0d,f%0d) want (%0d,%0d,f%0d)", pe_e, pe_o, pe_first,
                   exp_e[0], exp_o[0], exp_f[0]);
        end
        void'(exp_e.pop_front()); void'(exp_o.pop_front()); void'(exp_f.pop_front());
      end
      if (last_t >= 0) begin
        checks++;
        if (($time - last_t) / 10 != int'(fold)) begin
          failures++;
          $display("pairs %0d cycles apart, fold %0d", ($time - last_t) / 10, fold);
        end
      end
      last_t = $time;
    end
  end

  task automatic run(bit cp, int r0, int c0, int len, int nl, int f, int lg);
    for (int l = 0; l < nl; l++) begin
      for (int k = 0; k < len / 2; k++) begin
        if (cp) begin
          exp_e.push_back(64 * (r0 + 2*k) + c0 + l);
          exp_o.push_back(64 * (r0 + 2*k + 1) + c0 + l);
        end else begin
          exp_e.push_back(64 * (r0 + l) + c0 + 2*k);
          exp_o.push_back(64 * (r0 + l) + c0 + 2*k + 1);
        end
        exp_f.push_back(k == 0);
      end
      for (int z = 0; z < lg; z++) begin
        exp_e.push_back(0); exp_o.push_back(0); exp_f.push_back(0);
      end
    end
    last_t = -1;
    n_done = 0;
    @(posedge clk);
    col_pass <= cp; row0 <= ROW_W'(r0); col0 <= COL_W'(c0);
    n_pos <= LEN_W'(len / 2); n_lines <= LEN_W'(nl);
    fold <= 2'(f); lag <= LAG_W'(lg);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (nl * (len / 2 + lg) * f + 10) @(posedge clk);
    checks += 2;
    if (exp_e.size() != 0) begin failures++; $display("%0d pairs missing", exp_e.size()); end
    if (n_done != 1) begin failures++; $display("done pulsed %0d times", n_done); end
  endtask

  initial begin
    start = 0; col_pass = 0; row0 = '0; col0 = '0; n_pos = '0; n_lines = '0;
    fold = 2'd1; lag = '0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) u_mem.mem[r][c] = data_t'(64 * r + c);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 2, 4, 8, 3, 2, 2);
    run(1'b1, 4, 1, 6, 4, 1, 1);
    run(1'b0, 0, 0, 4, 2, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
