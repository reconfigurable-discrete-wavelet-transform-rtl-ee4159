// dwt_pe_tb: one PE on its own.
//   1. fold 1, the first PE of the (5,3) context: the output pair must be
//      (e[m], o[m] - 1/2 (e[m] + e[m+1])) with m one pair behind the input.
//   2. fold 2, the first PE of the (9,7) context: two lifting steps on one
//      MCU, the second reading the first one's results through the feedback
//      chain: (e[m] + beta (o1[m-1] + o1[m]), o1[m]), o1 = o + alpha (e[m] + e[m+1]).
// Two lines each; the first pair of a line restarts from zero history. The
// expected values are computed from the equations on arrays. Also checks that
// out_valid comes fold edges after the pair is taken.
module dwt_pe_tb;
  import rdwt_pkg::*;
  import dwt_ref_pkg::lift;

  localparam int NP = 10;   // pairs per line (plus one flush pair)

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] cfg_fold;
  pe_cfg_t cfg;
  logic in_valid, in_first, out_valid, out_first;
  data_t in_e, in_o, out_e, out_o;
  int checks = 0, failures = 0;

  dwt_pe dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e [2][-4:NP+4], o [2][-4:NP+4], o1 [2][-4:NP+4], exp_e [2][-4:NP+4], exp_o [2][-4:NP+4];
  int mode, nout, line_no, idx, t_in, t_out;

  function automatic int g(int a[-4:NP+4], int n);
    return (n < 0 || n >= NP) ? 0 : a[n];
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_first) begin idx = -1; line_no = (nout == 0) ? 0 : line_no + 1; end
    if (nout == 0) begin
      t_out = $time - 10;
      checks++;
      if ((t_out - t_in) / 10 != int'(cfg_fold)) begin
        failures++;
        $display("mode %0d: latency %0d, expected %0d", mode, (t_out - t_in) / 10, cfg_fold);
      end
    end
    checks += 2;
    if (int'(out_e) != exp_e[line_no][idx] || int'(out_o) != exp_o[line_no][idx]) begin
      failures++;
      $display("mode %0d line %0d idx %0d: got (%0d,%0d) want (%0d,%0d)", mode, line_no, idx,
               out_e, out_o, exp_e[line_no][idx], exp_o[line_no][idx]);
    end
    idx++;
    nout++;
  end

  task automatic run(int m);
    filt_cfg_t f;
    mode = m;
    f = default_filter(m == 0 ? F_53 : F_97);
    cfg = f.pe[0]; cfg_fold = f.fold;
    for (int l = 0; l < 2; l++) begin
      for (int n = -4; n <= NP + 4; n++) begin
        e[l][n] = (n >= 0 && n < NP) ? int'($urandom_range(0, 255)) : 0;
        o[l][n] = (n >= 0 && n < NP) ? int'($urandom_range(0, 255)) : 0;
      end
      for (int n = -4; n <= NP + 4; n++)
        o1[l][n] = lift(g(o[l], n), m == 0 ? -2048 : -6497, g(e[l], n) + g(e[l], n + 1));
      for (int n = -1; n < NP; n++) begin
        if (m == 0) begin
          exp_e[l][n] = g(e[l], n);
          exp_o[l][n] = o1[l][n];
        end else begin
          exp_e[l][n] = lift(g(e[l], n), -217, o1[l][n-1] + o1[l][n]);
          exp_o[l][n] = o1[l][n];
        end
      end
    end
    nout = 0;
    for (int l = 0; l < 2; l++)
      for (int n = 0; n <= NP; n++) begin
        @(posedge clk);
        in_valid <= 1'b1;
        in_first <= (n == 0);
        in_e <= data_t'(g(e[l], n));
        in_o <= data_t'(g(o[l], n));
        if (l == 0 && n == 0) t_in = $time + 10;
        for (int k = 1; k < int'(cfg_fold); k++) begin
          @(posedge clk);
          in_valid <= 1'b0;
        end
        @(posedge clk);
        in_valid <= 1'b0;
      end
    repeat (6) @(posedge clk);
    checks++;
    if (nout != 2 * (NP + 1)) begin
      failures++;
      $display("mode %0d: %0d outputs, expected %0d", m, nout, 2 * (NP + 1));
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_e = '0; in_o = '0;
    cfg = '0; cfg_fold = 2'd1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
