// Reference arithmetic for the testbenches, written independently of the
// RTL: IEEE-754 single-precision values are taken to the simulator's double
// precision `real`, added there (exact when the operands' exponents differ by
// at most 28) and rounded back to single precision, nearest-even, by
// integer arithmetic on the double's bit pattern. Integers are converted the
// same way through real (exact up to 2^53).
package fp_ref_pkg;

  // single -> double, exact (the double is assembled bit by bit)
  function automatic real f2r(logic [31:0] f);
    logic [51:0] frac;
    int          e, p;
    if (f[30:0] == '0) return $bitstoreal({f[31], 63'd0});
    if (f[30:23] != 0) begin
      e    = int'(f[30:23]) - 127;
      frac = {f[22:0], 29'd0};
    end else begin
      p = 0;
      for (int i = 0; i < 23; i++) if (f[i]) p = i;
      e    = p - 149;
      frac = 52'({f[22:0], 29'd0} << (23 - p));
    end
    return $bitstoreal({f[31], 11'(e + 1023), frac});
  endfunction

  // double -> single, round to nearest even; no NaN/inf inputs expected
  function automatic logic [31:0] r2f(real v);
    logic [63:0]  d;
    logic [52:0]  sig, rem, half;
    logic [24:0]  kept;
    int           e, sh;
    logic         rnd;
    d = $realtobits(v);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    sig = {1'b1, d[51:0]};
    sh  = 29 + ((e < 1) ? (1 - e) : 0);
    if (sh > 53) return {d[63], 31'd0};
    kept = 25'(sig >> sh);
    rem  = sig & ((53'd1 << sh) - 53'd1);
    half = 53'd1 << (sh - 1);
    rnd  = (rem > half) || (rem == half && kept[0]);
    kept = kept + 25'(rnd);
    if (e < 1) return {d[63], (kept[23] ? 8'd1 : 8'd0), kept[22:0]};
    if (kept[24]) begin kept = kept >> 1; e++; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), kept[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] ref_int(longint unsigned m, logic neg);
    if (m == 0) return 32'h0;
    return r2f(neg ? -real'(m) : real'(m));
  endfunction

endpackage
