// dwt_scale_tb: random samples through the K / 1/K scaler, with the (9,7)
// factors and with K = 1.0, checked against round(x*K/4096) worked out in
// 64-bit integers; also checks the one-cycle latency and flag pass-through.
module dwt_scale_tb;
  import rdwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  coef_t k_lo, k_hi;
  logic in_valid, in_first, out_valid, out_first;
  data_t in_l, in_h, out_l, out_h;
  int checks = 0, failures = 0;

  dwt_scale dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sc(int x, int k);
    longint p;
    p = longint'(x) * longint'(k) + 2048;
    p = (p >= 0) ? p / 4096 : -((-p + 4095) / 4096);
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  initial begin
    int x, y;
    in_valid = 0; in_first = 0; in_l = '0; in_h = '0;
    k_lo = 16'sd4709; k_hi = 16'sd3563;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      if (i == 300) begin k_lo = ONE; k_hi = ONE; end
      x = (i == 10) ? 32767 : int'($urandom_range(0, 65535)) - 32768;
      y = (i == 11) ? -32768 : int'($urandom_range(0, 4095)) - 2048;
      @(posedge clk);
      in_valid <= 1'b1; in_first <= (i % 7 == 0);
      in_l <= data_t'(x); in_h <= data_t'(y);
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      checks += 3;
      if (!out_valid || out_first != (i % 7 == 0)) failures++;
      if (int'(out_l) != sc(x, int'(k_lo)) || int'(out_h) != sc(y, int'(k_hi))) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d: got %0d %0d want %0d %0d", x, y, out_l, out_h,
                                    sc(x, int'(k_lo)), sc(y, int'(k_hi)));
      end
      if (k_lo == ONE && (out_l != data_t'(x) || out_h != data_t'(y))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
