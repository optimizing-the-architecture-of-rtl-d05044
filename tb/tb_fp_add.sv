// Self-checking test of fp_add: random operands of moderate exponent, near
// cancellations, equal magnitudes and the IEEE special cases, each compared
// with the simulator's own double precision arithmetic (round to nearest even).
module tb_fp_add;
  import lsrdp_pkg::*;

  word_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  function automatic word_t rnd_num(int unsigned emin, int unsigned espan);
    word_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(emin + ($urandom % espan));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check(word_t x, word_t z, logic s, word_t exp_y, string what);
    a = x; b = z; sub = s;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: %h %s %h = %h, expected %h", what, x, s ? "-" : "+", z, y, exp_y);
    end
  endtask

  function automatic word_t ref_add(word_t x, word_t z, logic s);
    real r;
    r = s ? $bitstoreal(x) - $bitstoreal(z) : $bitstoreal(x) + $bitstoreal(z);
    return $realtobits(r);
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
    logic  s;
    // random, wide exponent spread (covers full alignment shifts)
    for (int i = 0; i < 4000; i++) begin
      x = rnd_num(900, 250);
      z = rnd_num(900, 250);
      s = 1'($urandom);
      check(x, z, s, ref_add(x, z, s), "random");
    end
    // close exponents: heavy cancellation and carry-out
    for (int i = 0; i < 4000; i++) begin
      x = rnd_num(1020, 3);
      z = rnd_num(1020, 3);
      if (i % 4 == 0) z[62:0] = x[62:0] ^ 63'(1 << ($urandom % 20));
      s = 1'($urandom);
      check(x, z, s, ref_add(x, z, s), "close");
    end
    // exact cancellation gives +0
    x = 64'h4009_21FB_5444_2D18;
    check(x, x, 1'b1, 64'h0, "x-x");
    // zeros, infinities, NaN
    check(64'h0, 64'h0, 1'b0, 64'h0, "0+0");
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0, 64'h8000_0000_0000_0000, "-0+-0");
    check(x, 64'h0, 1'b0, x, "x+0");
    check(64'h0, x, 1'b1, {1'b1, x[62:0]}, "0-x");
    check(64'h7FF0_0000_0000_0000, x, 1'b0, 64'h7FF0_0000_0000_0000, "inf+x");
    check(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, FP_QNAN, "inf-inf");
    check(64'h7FF0_0000_0000_0001, x, 1'b0, FP_QNAN, "nan+x");
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 64'h7FF0_0000_0000_0000, "overflow");
    // subnormal input read as zero
    check(x, 64'h0000_0000_0000_0001, 1'b0, x, "subnormal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
