// ag_context_mem_tb: walks each default program of the PLA (16 x 8 frame)
// and checks its shape: the number of passes up to the one flagged last,
// row/column alternation, the region sizes of each level (halved per dyadic
// level, four quarter-size subbands for the wavelet packet level) and the
// buffer ping-pong A -> B -> A. Then writes user descriptors into every RAM
// entry and reads them back.
module ag_context_mem_tb;
  import rdwt_pkg::*;

  localparam int W = 16, H = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, rd_en;
  logic [AG_CTX_AW-1:0] wr_idx, rd_addr;
  pass_t wr_pass, pass;
  int checks = 0, failures = 0;

  ag_context_mem #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a);
    @(posedge clk);
    rd_en <= 1'b1; rd_addr <= AG_CTX_AW'(a);
    @(posedge clk);
    rd_en <= 1'b0;
    #1;
  endtask

  task automatic ok(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask

  // expected region (w x h at r, c) of pass k of a program
  task automatic check_prog(int start, int npass, bit wpt);
    int lvl, w, h, r0, c0, q;
    for (int k = 0; k < npass; k++) begin
      rd(start + k);
      ok(pass.last == (k == npass - 1), $sformatf("prog %0d pass %0d: last flag", start, k));
      ok(pass.col_pass == k[0], $sformatf("prog %0d pass %0d: direction", start, k));
      if (wpt && k >= 2) begin
        q = (k - 2) / 2;           // subband: LL, HL, LH, HH
        w = W / 2; h = H / 2;
        r0 = (q >= 2) ? H / 2 : 0;
        c0 = (q % 2 == 1) ? W / 2 : 0;
      end else begin
        lvl = k / 2;
        w = W >> lvl; h = H >> lvl; r0 = 0; c0 = 0;
      end
      if (!pass.col_pass) begin
        ok(int'(pass.len) == w && int'(pass.n_lines) == h, $sformatf("prog %0d pass %0d: row size", start, k));
        ok(int'(pass.src_row) == r0 && int'(pass.dst_row) == H + r0, $sformatf("prog %0d pass %0d: A->B", start, k));
      end else begin
        ok(int'(pass.len) == h && int'(pass.n_lines) == w, $sformatf("prog %0d pass %0d: col size", start, k));
        ok(int'(pass.src_row) == H + r0 && int'(pass.dst_row) == r0, $sformatf("prog %0d pass %0d: B->A", start, k));
      end
      ok(int'(pass.src_col) == c0 && int'(pass.dst_col) == c0, $sformatf("prog %0d pass %0d: column", start, k));
    end
  endtask

  initial begin
    pass_t w [N_AG_RAM];
    wr_en = 0; rd_en = 0; wr_idx = '0; rd_addr = '0; wr_pass = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_prog(P_1L_DYADIC, 2, 1'b0);
    check_prog(P_2L_DYADIC, 4, 1'b0);
    check_prog(P_2L_WPT, 10, 1'b1);
    check_prog(P_3L_DYADIC, 6, 1'b0);
    for (int i = 0; i < N_AG_RAM; i++) begin
      w[i] = pass_t'({$urandom, $urandom, $urandom});
      @(posedge clk);
      wr_en <= 1'b1; wr_idx <= AG_CTX_AW'(i); wr_pass <= w[i];
      @(posedge clk);
      wr_en <= 1'b0;
    end
    for (int i = 0; i < N_AG_RAM; i++) begin
      rd(N_AG_PLA + i);
      ok(pass == w[i], $sformatf("RAM entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
