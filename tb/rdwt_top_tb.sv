// rdwt_top_tb: end-to-end test of the DWT processor on a 16 x 8 frame.
//
// Runs, back to back without reset, a series of transforms, each with a
// different filter and decomposition structure, and compares the whole frame
// buffer A (and, for a 1-D program, buffer B) with a reference that applies
// the lifting equations of dwt_ref_pkg line by line following the same pass
// list. Runs:
//   (5,3)  1-level 2-D            fold 1 (two samples per cycle)
//   (9,7)  2-level dyadic          fold 2, scaling
//   (9,3)  2-level wavelet packet  three lifting steps, an idle slot
//   (13,7) 3-level dyadic          largest pipeline lag
//   (2,10) from the PE context RAM, with a user program from the AG context
//          RAM (a single row pass into buffer B)
// Counts how often each mechanism happened (fold 1, fold 2, row pass, column
// pass, flush pairs, discarded pairs, PE RAM context, AG RAM program, wavelet
// packet program, filter change) and fails on any that never did. Checks the
// cycle count of each run against the pair rate plus a bounded per-line and
// per-pass overhead.
module rdwt_top_tb;
  import rdwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int FW = 16, FH = 8;
  localparam int ROWS = 2 * FH, COLS = FW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [PE_CTX_AW-1:0] filt_sel;
  logic [AG_CTX_AW-1:0] prog_sel;
  logic pe_ctx_we, ag_ctx_we;
  logic [PE_CTX_AW-1:0] pe_ctx_widx;
  logic [AG_CTX_AW-1:0] ag_ctx_widx;
  filt_cfg_t pe_ctx_wdata;
  pass_t     ag_ctx_wdata;
  logic mem_rd_en, mem_wr_en;
  logic [1:0][ROW_W-1:0] mem_rd_row, mem_wr_row;
  logic [1:0][COL_W-1:0] mem_rd_col, mem_wr_col;
  data_t [1:0] mem_rd_data, mem_wr_data;

  rdwt_top #(.FRAME_W(FW), .FRAME_H(FH)) dut (.*);

  frame_mem_model #(.ROWS(ROWS), .COLS(COLS)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_row(mem_rd_row), .rd_col(mem_rd_col), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_row(mem_wr_row), .wr_col(mem_wr_col), .wr_data(mem_wr_data)
  );

  int checks = 0, failures = 0;
  int n_fold1 = 0, n_fold2 = 0, n_rowpass = 0, n_colpass = 0, n_flush = 0,
      n_discard = 0, n_pe_ram = 0, n_ag_ram = 0, n_wpt = 0, n_filter_change = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_in.state == dut.u_in.I_FLUSH && dut.u_in.issue) n_flush++;
    if (dut.u_out.pe_valid && !dut.u_out.keep) n_discard++;
    if (dut.pass_start) begin
      if (dut.pass.col_pass) n_colpass++; else n_rowpass++;
    end
  end

  int ref_mem [ROWS][COLS];

  // reference: apply one pass to ref_mem
  task automatic ref_pass(int filt, pass_t p);
    line_t x, l, h;
    int len, half;
    len  = int'(p.len);
    half = len / 2;
    for (int ln = 0; ln < int'(p.n_lines); ln++) begin
      for (int i = 0; i < len; i++)
        x[i] = p.col_pass ? ref_mem[int'(p.src_row) + i][int'(p.src_col) + ln]
                          : ref_mem[int'(p.src_row) + ln][int'(p.src_col) + i];
      lift_line(filt, x, len, l, h);
      for (int k = 0; k < half; k++) begin
        if (p.col_pass) begin
          ref_mem[int'(p.dst_row) + k][int'(p.dst_col) + ln]        = l[k];
          ref_mem[int'(p.dst_row) + half + k][int'(p.dst_col) + ln] = h[k];
        end else begin
          ref_mem[int'(p.dst_row) + ln][int'(p.dst_col) + k]        = l[k];
          ref_mem[int'(p.dst_row) + ln][int'(p.dst_col) + half + k] = h[k];
        end
      end
    end
  endtask

  pass_t user_prog [2];
  int    last_filt = -1;

  // load a random frame into buffer A of both memories
  task automatic load_frame();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        ref_mem[r][c] = (r < FH) ? int'($urandom_range(0, 255)) : 0;
        u_mem.mem[r][c] = data_t'(ref_mem[r][c]);
      end
  endtask

  // run one transform and compare; prog: AG address; passes from PLA or RAM
  task automatic run(int filt, int ctx_idx, int prog, string name);
    int t0, cycles, bound, a;
    pass_t p;
    filt_cfg_t fc;
    fc = default_filter(filt);
    if (last_filt >= 0 && last_filt != filt) n_filter_change++;
    last_filt = filt;
    if (fc.fold == 2'd1) n_fold1++; else n_fold2++;
    if (ctx_idx >= N_PE_PLA) n_pe_ram++;
    if (prog >= N_AG_PLA) n_ag_ram++;
    if (prog == P_2L_WPT) n_wpt++;
    load_frame();
    // reference, and a bound on the cycle count
    a = prog;
    bound = 0;
    forever begin
      p = (prog >= N_AG_PLA) ? user_prog[a - prog] : default_pass(a, FW, FH);
      ref_pass(filt, p);
      bound += int'(p.n_lines) * (int'(p.len) / 2 + int'(fc.lag)) * int'(fc.fold)
               + 2 * int'(fc.fold) + 16;
      if (p.last) break;
      a++;
    end
    @(posedge clk);
    start    <= 1'b1;
    filt_sel <= PE_CTX_AW'(ctx_idx);
    prog_sel <= AG_CTX_AW'(prog);
    @(posedge clk);
    start <= 1'b0;
    t0 = $time;
    while (!done) @(posedge clk);
    cycles = ($time - t0) / 10;
    checks++;
    if (cycles > bound) begin
      failures++;
      $display("%s: %0d cycles, more than the bound %0d", name, cycles, bound);
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (int'(u_mem.mem[r][c]) != ref_mem[r][c]) begin
          failures++;
          if (failures < 20)
            $display("%s: mem[%0d][%0d] = %0d, expected %0d", name, r, c,
                     u_mem.mem[r][c], ref_mem[r][c]);
        end
      end
    $display("%s: %0d cycles (bound %0d)", name, cycles, bound);
  endtask

  initial begin
    start = 1'b0; filt_sel = '0; prog_sel = '0;
    pe_ctx_we = 1'b0; pe_ctx_widx = '0; pe_ctx_wdata = '0;
    ag_ctx_we = 1'b0; ag_ctx_widx = '0; ag_ctx_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // user contexts: (2,10) into PE RAM entry 1; a one-pass row transform of
    // rows 2..5 of buffer A into buffer B as a user AG program
    user_prog[0] = mk_pass(1'b0, 2, 0, FH + 2, 0, 4, FW, 1'b1);
    user_prog[1] = '0;
    pe_ctx_we <= 1'b1; pe_ctx_widx <= PE_CTX_AW'(1); pe_ctx_wdata <= default_filter(F_210);
    ag_ctx_we <= 1'b1; ag_ctx_widx <= '0;            ag_ctx_wdata <= user_prog[0];
    @(posedge clk);
    pe_ctx_we <= 1'b0; ag_ctx_we <= 1'b0;

    run(F_53,  F_53,  P_1L_DYADIC, "(5,3) 1-level");
    run(F_97,  F_97,  P_2L_DYADIC, "(9,7) 2-level dyadic");
    run(F_93,  F_93,  P_2L_WPT,    "(9,3) 2-level packet");
    run(F_137, F_137, P_3L_DYADIC, "(13,7) 3-level dyadic");
    run(F_210, N_PE_PLA + 1, N_AG_PLA, "(2,10) user program");

    checks++;
    if (u_mem.bad_access != 0) begin
      failures++;
      $display("%0d out-of-range memory accesses", u_mem.bad_access);
    end
    $display("mechanisms: fold1=%0d fold2=%0d rowpass=%0d colpass=%0d flush=%0d discard=%0d pe_ram=%0d ag_ram=%0d wpt=%0d filter_change=%0d",
             n_fold1, n_fold2, n_rowpass, n_colpass, n_flush, n_discard, n_pe_ram, n_ag_ram, n_wpt, n_filter_change);
    checks += 10;
    if (n_fold1 == 0) failures++;
    if (n_fold2 == 0) failures++;
    if (n_rowpass == 0) failures++;
    if (n_colpass == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_discard == 0) failures++;
    if (n_pe_ram == 0) failures++;
    if (n_ag_ram == 0) failures++;
    if (n_wpt == 0) failures++;
    if (n_filter_change == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
