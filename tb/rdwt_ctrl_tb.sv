// rdwt_ctrl_tb: the run sequencer against a table of pass descriptors that
// the testbench serves as the AG context (one-cycle read) and a model that
// answers each pass_start with pass_done a few cycles later. Checks that the
// filter context is read once at start, that the passes from prog_sel up to
// the one flagged last are started in order, one at a time, and that done
// pulses once at the end, for two programs of different length.
module rdwt_ctrl_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, pass_done, pe_rd_en, ag_rd_en, pass_start, busy, done;
  logic [PE_CTX_AW-1:0] filt_sel, pe_rd_idx;
  logic [AG_CTX_AW-1:0] prog_sel, ag_rd_addr;
  pass_t pass;
  int checks = 0, failures = 0;

  rdwt_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AG context model: pass k is flagged last when k is 5 or 12
  always @(posedge clk) if (ag_rd_en) begin
    pass <= '0;
    pass.n_lines <= LEN_W'(ag_rd_addr);   // tag the descriptor with its address
    pass.last    <= (ag_rd_addr == 5 || ag_rd_addr == 12);
  end

  // pass execution model
  int started [$];
  int pe_reads, n_done, outstanding;
  always @(posedge clk) begin
    pass_done <= 1'b0;
    if (rst_n) begin
      if (pe_rd_en) pe_reads++;
      if (done) n_done++;
      if (pass_start) begin
        started.push_back(int'(pass.n_lines));
        outstanding++;
        checks++;
        if (outstanding > 1) failures++;
        fork begin
          repeat (3 + $urandom_range(0, 4)) @(posedge clk);
          pass_done <= 1'b1;
          outstanding--;
        end join_none
      end
    end
  end

  task automatic run(int prog, int last);
    started.delete();
    pe_reads = 0; n_done = 0; outstanding = 0;
    @(posedge clk);
    start <= 1'b1; prog_sel <= AG_CTX_AW'(prog); filt_sel <= PE_CTX_AW'(prog % 9);
    @(posedge clk);
    start <= 1'b0;
    #1;
    checks += 2;
    if (!busy) failures++;
    if (pe_rd_idx != PE_CTX_AW'(prog % 9)) failures++;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 3;
    if (pe_reads != 1) begin failures++; $display("filter context read %0d times", pe_reads); end
    if (n_done != 1 || busy) begin failures++; $display("done %0d busy %0d", n_done, busy); end
    if (started.size() != last - prog + 1) begin
      failures++;
      $display("%0d passes started, expected %0d", started.size(), last - prog + 1);
    end
    foreach (started[i]) begin
      checks++;
      if (started[i] != prog + i) begin
        failures++;
        $display("pass %0d ran descriptor %0d", i, started[i]);
      end
    end
  endtask

  initial begin
    start = 0; filt_sel = '0; prog_sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(2, 5);
    run(7, 12);
    run(12, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
