// dwt_pe_array_tb: runs every default filter of the PE context through the
// PE array, several lines back to back, and compares each low/high
// coefficient with the lifting equations of dwt_ref_pkg. Also checks the
// pair rate (one pair per fold cycles, i.e. 2 samples/cycle for (5,3) and 1
// sample/cycle for the four-step filters) and the latency NUM_PE*(fold+1) cycles.
module dwt_pe_array_tb;
  import rdwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N     = 24;   // samples per line
  localparam int LINES = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  filt_cfg_t cfg;
  logic in_valid, in_first, out_valid, out_first;
  data_t in_e, in_o, out_l, out_h;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dwt_pe_array dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_t x [LINES];
  line_t rl [LINES], rh [LINES];
  int    got, line_no, pos, lagc, last_out_cyc, first_in_cyc, first_out_cyc, cyc;
  int    fold;

  always @(posedge clk) cyc <= cyc + 1;

  // capture outputs
  always @(posedge clk) if (rst_n && out_valid) begin
    // out_valid seen here was registered at the previous edge
    if (got == 0) first_out_cyc = cyc - 1;
    else if (cyc - last_out_cyc != fold) begin
      failures++;
      $display("rate: outputs %0d cycles apart, fold %0d", cyc - last_out_cyc, fold);
    end
    checks++;
    last_out_cyc = cyc;
    got++;
    if (out_first) begin
      if (pos != 0 && pos != N/2) failures++;
      line_no = (got == 1) ? 0 : line_no + 1;
      pos = -int'(cfg.lag);
    end
    if (pos >= 0 && pos < N/2) begin
      checks += 2;
      if (int'(out_l) != rl[line_no][pos] || int'(out_h) != rh[line_no][pos]) begin
        failures++;
        if (failures < 20)
          $display("filter mismatch line %0d pos %0d: got L=%0d H=%0d want L=%0d H=%0d",
                   line_no, pos, out_l, out_h, rl[line_no][pos], rh[line_no][pos]);
      end
    end
    pos++;
  end

  task automatic run_filter(int fn);
    int total;
    cfg  = default_filter(fn);
    fold = int'(cfg.fold);
    got = 0; pos = 0; line_no = 0;
    for (int l = 0; l < LINES; l++) begin
      for (int i = 0; i < N; i++) x[l][i] = int'($urandom_range(0, 255)) - (fn == F_97 ? 128 : 0);
      lift_line(fn, x[l], N, rl[l], rh[l]);
    end
    total = LINES * (N/2 + int'(cfg.lag));
    @(posedge clk);
    // in_valid driven now is sampled by the array at the next edge
    first_in_cyc = cyc + 1;
    for (int l = 0; l < LINES; l++) begin
      for (int p = 0; p < N/2 + int'(cfg.lag); p++) begin
        in_valid <= 1'b1;
        in_first <= (p == 0);
        in_e     <= (p < N/2) ? data_t'(x[l][2*p])   : '0;
        in_o     <= (p < N/2) ? data_t'(x[l][2*p+1]) : '0;
        @(posedge clk);
        for (int k = 1; k < fold; k++) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (got != total) begin
      failures++;
      $display("filter %0d: %0d outputs, expected %0d", fn, got, total);
    end
    checks++;
    if (first_out_cyc - first_in_cyc != NUM_PE * (fold + 1)) begin
      failures++;
      $display("filter %0d: latency %0d, expected %0d", fn, first_out_cyc - first_in_cyc,
               NUM_PE * (fold + 1));
    end
  endtask

  initial begin
    cyc = 0;
    in_valid = 1'b0; in_first = 1'b0; in_e = '0; in_o = '0;
    cfg = default_filter(F_53);
    fold = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_filter(F_53);
    run_filter(F_97);
    run_filter(F_93);
    run_filter(F_210);
    run_filter(F_137);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
