// Self-checking test of fp_mul: random operands whose products stay in the
// normal range, exact products, and the IEEE special cases, compared with the
// simulator's own double precision arithmetic (round to nearest even).
module tb_fp_mul;
  import lsrdp_pkg::*;

  word_t a, b, y;
  int    checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  function automatic word_t rnd_num(int unsigned emin, int unsigned espan);
    word_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(emin + ($urandom % espan));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check(word_t x, word_t z, word_t exp_y, string what);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h, expected %h", what, x, z, y, exp_y);
    end
  endtask

  function automatic word_t ref_mul(word_t x, word_t z);
    return $realtobits($bitstoreal(x) * $bitstoreal(z));
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x, z;
    for (int i = 0; i < 8000; i++) begin
      x = rnd_num(700, 600);
      z = rnd_num(700, 600);
      check(x, z, ref_mul(x, z), "random");
    end
    check($realtobits(3.0), $realtobits(-2.5), $realtobits(-7.5), "3*-2.5");
    check($realtobits(1.5), $realtobits(1.5), $realtobits(2.25), "1.5*1.5");
    check(64'h0, $realtobits(3.0), 64'h0, "0*3");
    check(64'h8000_0000_0000_0000, $realtobits(3.0), 64'h8000_0000_0000_0000, "-0*3");
    check(64'h7FF0_0000_0000_0000, $realtobits(-2.0), 64'hFFF0_0000_0000_0000, "inf*-2");
    check(64'h7FF0_0000_0000_0000, 64'h0, FP_QNAN, "inf*0");
    check(64'h7FF8_0000_0000_0123, $realtobits(1.0), FP_QNAN, "nan*1");
    check(64'h7FE0_0000_0000_0000, 64'h7FE0_0000_0000_0000, 64'h7FF0_0000_0000_0000, "overflow");
    check(64'h0010_0000_0000_0000, 64'h0010_0000_0000_0000, 64'h0, "underflow flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
