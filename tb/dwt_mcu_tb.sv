// dwt_mcu_tb: drives the MCU with corner and random operands in all three
// lifting-step categories and compares D with A + coef*(B op C) computed in
// 64-bit integers (rounded to nearest, ties up, then saturated to 16 bits).
module dwt_mcu_tb;
  import rdwt_pkg::*;

  op_e   op;
  coef_t coef;
  data_t a, b, c, d;
  int checks = 0, failures = 0;

  dwt_mcu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_d(op_e o, longint k, longint x, longint y, longint z);
    longint s, r;
    s = (o == OP_SUM) ? y + z : (o == OP_DIFF) ? y - z : y;
    // round(k*s/4096): floor((k*s + 2048) / 4096)
    r = k * s + 2048;
    r = (r >= 0) ? r / 4096 : -((-r + 4095) / 4096);
    r = x + r;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic check(op_e o, int k, int x, int y, int z);
    longint e;
    op = o; coef = coef_t'(k); a = data_t'(x); b = data_t'(y); c = data_t'(z);
    #1;
    e = expect_d(o, longint'(coef), longint'(a), longint'(b), longint'(c));
    checks++;
    if (longint'(d) != e) begin
      failures++;
      if (failures < 10) $display("op %0d k=%0d a=%0d b=%0d c=%0d: d=%0d expected %0d",
                                  o, coef, a, b, c, d, e);
    end
  endtask

  initial begin
    // the (5,3) steps must equal the integer JPEG2000 formulas
    for (int s = -40; s <= 40; s++) begin
      check(OP_SUM, -2048, 100, s, 0);
      checks++;
      if (int'(d) != 100 - ((s >= 0) ? s / 2 : -((-s + 1) / 2))) failures++;   // 100 - floor(s/2)
      check(OP_SUM, 1024, 7, s, 0);
      checks++;
      if (int'(d) != 7 + ((s + 2 >= 0) ? (s + 2) / 4 : -((-(s + 2) + 3) / 4))) failures++;
    end
    // saturation
    check(OP_SUM, 4095, 32000, 20000, 20000);
    check(OP_SUM, -4096, -32000, 20000, 20000);
    check(OP_DIFF, 4096, 0, -32768, 32767);
    // random, all categories
    for (int i = 0; i < 3000; i++) begin
      check(op_e'($urandom_range(0, 2)), int'($urandom_range(0, 65535)) - 32768,
            int'($urandom_range(0, 65535)) - 32768,
            int'($urandom_range(0, 65535)) - 32768,
            int'($urandom_range(0, 65535)) - 32768);
      check(op_e'($urandom_range(0, 2)), int'($urandom_range(0, 16383)) - 8192,
            int'($urandom_range(0, 1023)) - 512, int'($urandom_range(0, 1023)) - 512,
            int'($urandom_range(0, 1023)) - 512);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
