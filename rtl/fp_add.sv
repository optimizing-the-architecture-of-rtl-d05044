// 64-bit floating point adder/subtractor: the ADD/SUB functional unit of a PE.
//
// y = a + b (sub = 0) or y = a - b (sub = 1) in IEEE-754 binary64 with
// round-to-nearest-even. The operands are aligned with guard, round and
// sticky bits, added or subtracted as magnitudes, normalised with a leading
// zero count and rounded. Infinities and NaNs follow IEEE-754 (inf - inf and
// any NaN give the canonical quiet NaN). Subnormal inputs are read as zero and
// results below the normal range are flushed to signed zero; overflow gives
// infinity.
//
// Purely combinational: the PE registers the result, so the adder adds no
// cycle of its own. That the PEs do 64-bit floating point ADD/SUB comes from
// the architecture; flush-to-zero and single-cycle timing are this design's
// choices.
module fp_add
  import lsrdp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  sub,
  output word_t y
);

  localparam int unsigned MW = 56;  // hidden bit + 52 fraction + G,R,S

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;

  always_comb begin
    logic              a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, swap;
    logic              s_big, s_small, eff_sub;
    logic [10:0]       e_big, e_small;
    logic [MW-1:0]     m_big, m_small, shifted, sticky_mask;
    logic [11:0]       d;
    logic [MW:0]       sum;
    logic [MW-1:0]     norm;
    logic signed [13:0] exp_r;
    int                lz;
    logic              g, r, s, lsb, rnd;
    logic [53:0]       mant_r;

    sticky_mask = '0;
    shifted     = '0;
    norm        = '0;
    lz          = 0;
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    fa = a[51:0];
    fb = b[51:0];

    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == 11'h000);   // zero or subnormal (flushed)
    b_zero = (eb == 11'h000);

    // Larger magnitude first.
    swap    = {eb, fb} > {ea, fa};
    s_big   = swap ? sb : sa;
    s_small = swap ? sa : sb;
    e_big   = swap ? eb : ea;
    e_small = swap ? ea : eb;
    m_big   = {1'b1, (swap ? fb : fa), 3'b000};
    m_small = {1'b1, (swap ? fa : fb), 3'b000};
    eff_sub = s_big ^ s_small;

    // Align the smaller operand, collecting shifted-out bits as sticky.
    d = {1'b0, e_big} - {1'b0, e_small};
    if (d >= 12'(MW)) begin
      shifted = '0;
      shifted[0] = 1'b1;
    end else begin
      sticky_mask = (MW'(1) << d) - MW'(1);
      shifted = m_small >> d;
      shifted[0] = shifted[0] | ((m_small & sticky_mask) != '0);
    end

    if (eff_sub) sum = {1'b0, m_big} - {1'b0, shifted};
    else         sum = {1'b0, m_big} + {1'b0, shifted};

    exp_r = 14'(e_big);
    if (sum[MW]) begin
      norm  = sum[MW:1];
      norm[0] = norm[0] | sum[0];
      exp_r = exp_r + 14'sd1;
    end else begin
      for (int i = 0; i < MW; i++)
        if (sum[i]) lz = MW - 1 - i;   // last hit is the leading one
      norm  = sum[MW-1:0] << lz;
      exp_r = exp_r - 14'(lz);
    end

    // Round to nearest, ties to even.
    lsb = norm[3];
    g   = norm[2];
    r   = norm[1];
    s   = norm[0];
    rnd = g & (r | s | lsb);
    mant_r = {1'b0, norm[MW-1:3]} + 54'(rnd);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = FP_QNAN;
    else if (a_inf)
      y = {sa, 11'h7FF, 52'd0};
    else if (b_inf)
      y = {sb, 11'h7FF, 52'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 63'd0};
    else if (b_zero)
      y = {sa, ea, fa};
    else if (a_zero)
      y = {sb, eb, fb};
    else if (sum == '0)
      y = '0;                                   // exact cancellation: +0
    else if (exp_r >= 14'sd2047)
      y = {s_big, 11'h7FF, 52'd0};
    else if (exp_r <= 14'sd0)
      y = {s_big, 63'd0};                       // underflow: flush to zero
    else
      y = {s_big, exp_r[10:0], mant_r[51:0]};
  end

endmodule
