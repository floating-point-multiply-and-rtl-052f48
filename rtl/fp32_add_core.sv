// Combinational IEEE-754 single-precision adder used inside fp32_adder.
// The operand of larger magnitude is taken as `big`; the other is shifted
// right by the exponent difference into three extra bits (guard, round,
// sticky). The significands are added or subtracted, the result is
// normalised (one place right on a carry, left by the leading-zero count but
// never below the smallest exponent, which yields subnormals), rounded to
// nearest with ties to even and packed. NaN operands and inf - inf give the
// quiet NaN 0x7fc00000; an infinite operand otherwise passes through;
// overflow gives infinity. An exact zero sum is +0 unless both operands are -0.
module fp32_add_core (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] z
);
  import da_fp_pkg::*;

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  fp32_t       fa, fb, big, sml;
  logic [8:0]  e_big, e_sml, e_res;   // effective exponents (subnormal -> 1)
  logic [23:0] m_big, m_sml;          // significands with hidden bit
  logic [8:0]  diff;
  logic [26:0] ext_sml;               // {significand, g, r, s} after alignment
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [4:0]  shl;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic        g, r, s, round_up;
  logic [24:0] man_r;
  logic        sub;

  always_comb begin
    fa = a;
    fb = b;
    a_nan = (fa.exp == 8'hff) && (fa.man != '0);
    b_nan = (fb.exp == 8'hff) && (fb.man != '0);
    a_inf = (fa.exp == 8'hff) && (fa.man == '0);
    b_inf = (fb.exp == 8'hff) && (fb.man == '0);

    if ({fa.exp, fa.man} >= {fb.exp, fb.man}) begin
      big = fa; sml = fb;
    end else begin
      big = fb; sml = fa;
    end
    e_big = (big.exp == '0) ? 9'd1 : {1'b0, big.exp};
    e_sml = (sml.exp == '0) ? 9'd1 : {1'b0, sml.exp};
    m_big = {big.exp != '0, big.man};
    m_sml = {sml.exp != '0, sml.man};
    diff  = e_big - e_sml;
    sub   = big.sign ^ sml.sign;

    // align the smaller operand, collecting shifted-out bits into sticky
    ext_sml = '0;
    if (diff >= 9'd27) begin
      ext_sml[0] = |m_sml;
    end else begin
      ext_sml = {m_sml, 3'b000} >> diff;
      ext_sml[0] = ext_sml[0] | (|(({m_sml, 3'b000}) & ~(27'h7ff_ffff << diff)));
    end

    sum = sub ? ({1'b0, m_big, 3'b000} - {1'b0, ext_sml})
              : ({1'b0, m_big, 3'b000} + {1'b0, ext_sml});

    // normalise
    e_res = e_big;
    lz    = '0;
    shl   = '0;
    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      e_res = e_res + 9'd1;
    end else begin
      lz = 5'd0;
      for (int i = 0; i <= 26; i++)
        if (sum[i]) lz = 5'(26 - i);
      shl = (9'(lz) < e_res) ? lz : 5'(e_res - 9'd1);
      sum   = sum << shl;
      e_res = e_res - 9'(shl);
    end

    // round to nearest, ties to even
    g = sum[2];
    r = sum[1];
    s = sum[0];
    round_up = g & (r | s | sum[3]);
    man_r = {1'b0, sum[26:3]} + 25'(round_up);
    if (man_r[24]) begin
      man_r = man_r >> 1;
      e_res = e_res + 9'd1;
    end

    // pack
    if (a_nan || b_nan || (a_inf && b_inf && sub)) begin
      z = QNAN;
    end else if (a_inf || b_inf) begin
      z = a_inf ? a : b;
    end else if (sum == '0) begin
      z = {fa.sign & fb.sign, 31'd0};
    end else if (e_res >= 9'd255) begin
      z = {big.sign, 8'hff, 23'd0};
    end else begin
      z = {big.sign, man_r[23] ? e_res[7:0] : 8'd0, man_r[22:0]};
    end
  end

endmodule
