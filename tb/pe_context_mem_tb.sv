// pe_context_mem_tb: reads every PLA entry and checks the properties the
// filter table fixes (fold 1 for the two-step (5,3), fold 2 for the others,
// the (9,7) lifting coefficients and scale factor in Q3.12, the number of
// active lifting steps), then writes user configurations into every RAM
// entry and reads them back, and checks that cfg holds when rd_en is low.
module pe_context_mem_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, rd_en;
  logic [PE_CTX_AW-1:0] wr_idx, rd_idx;
  filt_cfg_t wr_cfg, cfg;
  int checks = 0, failures = 0;

  pe_context_mem dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int i);
    @(posedge clk);
    rd_en <= 1'b1; rd_idx <= PE_CTX_AW'(i);
    @(posedge clk);
    rd_en <= 1'b0;
    #1;
  endtask

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  // lifting steps that do work: a slot with a non-zero coefficient
  function automatic int steps(filt_cfg_t f);
    int s = 0;
    for (int p = 0; p < NUM_PE; p++)
      for (int k = 0; k < int'(f.fold); k++)
        if (f.pe[p].slot[k].coef != 0) s++;
    return s;
  endfunction

  initial begin
    filt_cfg_t w [N_PE_RAM];
    wr_en = 0; rd_en = 0; wr_idx = '0; rd_idx = '0; wr_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    rd(0); expect_eq(cfg.fold, 1, "(5,3) fold"); expect_eq(steps(cfg), 2, "(5,3) steps");
    rd(1); expect_eq(cfg.fold, 2, "(9,7) fold"); expect_eq(steps(cfg), 4, "(9,7) steps");
    expect_eq(cfg.pe[0].slot[0].coef, -6497, "alpha");   // -1.586134342 * 4096
    expect_eq(cfg.pe[0].slot[1].coef, -217,  "beta");    // -0.05298011854 * 4096
    expect_eq(cfg.pe[1].slot[0].coef, 3616,  "gamma");   // 0.8829110762 * 4096
    expect_eq(cfg.pe[1].slot[1].coef, 1817,  "delta");   // 0.4435068522 * 4096
    expect_eq(cfg.k_lo, 4709, "zeta");                    // 1.149604398 * 4096
    expect_eq(cfg.k_hi, 3563, "1/zeta");
    rd(2); expect_eq(cfg.fold, 2, "(9,3) fold"); expect_eq(steps(cfg), 3, "(9,3) steps");
    rd(3); expect_eq(cfg.fold, 2, "(2,10) fold"); expect_eq(steps(cfg), 4, "(2,10) steps");
    rd(4); expect_eq(cfg.fold, 2, "(13,7) fold"); expect_eq(steps(cfg), 4, "(13,7) steps");

    // user RAM
    for (int i = 0; i < N_PE_RAM; i++) begin
      w[i] = default_filter(i % N_PE_PLA);
      w[i].k_lo = coef_t'($urandom_range(0, 65535));
      w[i].pe[1].slot[1].coef = coef_t'($urandom_range(0, 65535));
      @(posedge clk);
      wr_en <= 1'b1; wr_idx <= PE_CTX_AW'(i); wr_cfg <= w[i];
      @(posedge clk);
      wr_en <= 1'b0;
    end
    for (int i = 0; i < N_PE_RAM; i++) begin
      rd(N_PE_PLA + i);
      checks++;
      if (cfg != w[i]) begin failures++; $display("RAM entry %0d read back wrong", i); end
    end
    // holds without rd_en
    rd_idx <= '0;
    repeat (3) @(posedge clk);
    checks++;
    if (cfg != w[N_PE_RAM-1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
