// Floating-point converter: turns the unsigned integer word produced by the
// LUT section into an IEEE-754 single-precision number, negated when `neg` is
// set (the sign bit of the DA address, which makes the accumulator subtract).
// A leading-one search gives the exponent (bias 127 + position of the leading
// one), the word is shifted so the leading one becomes the hidden bit, and the
// 23 bits below it form the fraction, rounded to nearest, ties to even. Zero
// converts to +0. Purely combinational. IN_W must be at most 64; the default
// 32 is the width of the LUT word.
module int_to_fp32 #(
  parameter int unsigned IN_W = da_fp_pkg::DA_DATA_W
) (
  input  logic [IN_W-1:0] mag,
  input  logic            neg,
  output logic [31:0]     flt
);
  import da_fp_pkg::*;

  logic [63:0] norm;
  logic [6:0]  msb;
  logic [22:0] frac;
  logic        guard, sticky, round_up;
  logic [24:0] frac_r;     // {carry, hidden, fraction} after rounding
  logic [7:0]  exp_r;
  fp32_t       res;

  always_comb begin
    msb = '0;
    for (int i = 0; i < IN_W; i++)
      if (mag[i]) msb = 7'(i);

    // leading one moved to bit 63
    norm     = {mag, {(64-IN_W){1'b0}}} << (7'(IN_W - 1) - msb);
    frac     = norm[62:40];
    guard    = norm[39];
    sticky   = |norm[38:0];
    round_up = guard & (sticky | frac[0]);
    frac_r   = {2'b01, frac} + 25'(round_up);
    exp_r    = 8'(FP_BIAS) + 8'(msb) + 8'(frac_r[24]);

    res.sign = neg;
    res.exp  = exp_r;
    res.man  = frac_r[24] ? frac_r[23:1] : frac_r[22:0];
    if (mag == '0) res = '0;
    flt = res;
  end

endmodule
