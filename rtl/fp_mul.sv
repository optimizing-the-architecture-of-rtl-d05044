// 64-bit floating point multiplier: the MUL functional unit of a PE.
//
// y = a * b in IEEE-754 binary64 with round-to-nearest-even. The two 53-bit
// significands (hidden bit included) are multiplied into a 106-bit product,
// normalised by at most one position, and rounded with a guard bit and a
// sticky bit. inf * 0 and any NaN give the canonical quiet NaN; subnormal
// inputs are read as zero and results below the normal range are flushed to
// signed zero; overflow gives infinity.
//
// Purely combinational: the PE registers the result. That the PEs do 64-bit
// floating point MUL comes from the architecture; flush-to-zero and
// single-cycle timing are this design's choices.
module fp_mul
  import lsrdp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    logic               sy, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [10:0]        ea, eb;
    logic [105:0]       p;
    logic [52:0]        m;
    logic               g, st, rnd;
    logic [53:0]        mant_r;
    logic signed [13:0] exp_r;

    ea = a[62:52];
    eb = b[62:52];
    sy = a[63] ^ b[63];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_zero = (ea == 11'h000);
    b_zero = (eb == 11'h000);

    p = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    exp_r = 14'(ea) + 14'(eb) - 14'sd1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = (p[51:0] != '0);
      exp_r = exp_r + 14'sd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = (p[50:0] != '0);
    end
    rnd = g & (st | m[0]);
    mant_r = {1'b0, m} + 54'(rnd);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP_QNAN;
    else if (a_inf || b_inf)
      y = {sy, 11'h7FF, 52'd0};
    else if (a_zero || b_zero)
      y = {sy, 63'd0};
    else if (exp_r >= 14'sd2047)
      y = {sy, 11'h7FF, 52'd0};
    else if (exp_r <= 14'sd0)
      y = {sy, 63'd0};
    else
      y = {sy, exp_r[10:0], mant_r[51:0]};
  end

endmodule
