// LUT section with a single look-up table (the basic DA organisation).
// The table has 2^K rows; row `b` holds the sum of the coefficients whose
// address bit is set, with address bit K-1 (b1) selecting x[0] and bit 0 (bK)
// selecting x[K-1], so that for K=4 row 0011 holds a(2)+a(3). The table
// contents are the pre-computed subset sums of the held coefficients; here
// they are formed from `x` by a generate loop, so the table follows the
// input data section without a separate fill phase. Reading is purely
// combinational: `data` follows `addr` in the same cycle.
// The table layout and address bit order are the published ones; forming the
// rows from the coefficient registers is this implementation's choice.
module da_lut_single #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W,
  parameter int unsigned DATA_W = da_fp_pkg::DA_DATA_W
) (
  input  logic [COEF_W-1:0] x [K],
  input  logic [K-1:0]      addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] table_q [2**K];

  // row r: sum over k of x[k] where bit (K-1-k) of r is set
  for (genvar r = 0; r < 2**K; r++) begin : g_row
    always_comb begin
      table_q[r] = '0;
      for (int k = 0; k < K; k++)
        if (((r >> (K-1-k)) & 1) != 0) table_q[r] = table_q[r] + DATA_W'(x[k]);
    end
  end

  assign data = table_q[addr];

endmodule
