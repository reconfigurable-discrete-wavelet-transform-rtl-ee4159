// rdwt_top_full_tb: the DWT processor at its default size, a 720 x 576
// (CCIR 601) frame, running a two-level full wavelet packet transform with
// the (5,3) filter, then a two-level dyadic and a two-level packet transform
// with the (9,7) filter.
// Every word of both frame buffers is compared with the lifting-equation
// reference of dwt_ref_pkg applied pass by pass. For the (5,3) packet
// transform the cycle count must also stay within one frame time at 30
// frames/s and a 50 MHz clock (1,666,666 cycles).
module rdwt_top_full_tb;
  import rdwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int FW = 720, FH = 576;
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

  rdwt_top dut (.*);

  frame_mem_model #(.ROWS(ROWS), .COLS(COLS)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_row(mem_rd_row), .rd_col(mem_rd_col), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_row(mem_wr_row), .wr_col(mem_wr_col), .wr_data(mem_wr_data)
  );

  int checks = 0, failures = 0;
  int n_fold1 = 0, n_fold2 = 0, n_rowpass = 0, n_colpass = 0, n_flush = 0,
      n_discard = 0, n_pe_ram = 0, n_ag_ram = 0, n_wpt = 0, n_filter_change = 0;

  initial begin
    repeat (5000000) @(posedge clk);
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
  int    last_cycles;
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
    last_cycles = cycles;
  endtask

  initial begin
    start = 1'b0; filt_sel = '0; prog_sel = '0;
    pe_ctx_we = 1'b0; pe_ctx_widx = '0; pe_ctx_wdata = '0;
    ag_ctx_we = 1'b0; ag_ctx_widx = '0; ag_ctx_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    run(F_53, F_53, P_2L_WPT, "(5,3) 2-level packet, 720x576");
    checks++;
    if (last_cycles > 1666666) begin
      failures++;
      $display("(5,3) packet transform misses 30 frames/s at 50 MHz");
    end
    run(F_97, F_97, P_2L_DYADIC, "(9,7) 2-level dyadic, 720x576");
    run(F_97, F_97, P_2L_WPT, "(9,7) 2-level packet, 720x576");

    checks++;
    if (u_mem.bad_access != 0) begin
      failures++;
      $display("%0d out-of-range memory accesses", u_mem.bad_access);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
