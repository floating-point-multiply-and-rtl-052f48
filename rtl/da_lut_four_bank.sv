// LUT section with four-bank coefficient partitioning. The K coefficients are
// split into four groups of K/4; each group has a 2^(K/4)-row LUT (for K=4,
// four 2-row LUTs holding 0 and a(k)) addressed by its own address bits.
// Three adders in a two-level tree sum the four LUT words:
// data = (lut0 + lut1) + (lut2 + lut3). LUT words are SUB_W bits, sums DATA_W.
// Combinational. K must be a multiple of 4.
// The four 2-row banks and the three-adder tree are published; the 16-bit
// bank word width is this implementation's choice.
module da_lut_four_bank #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W,
  parameter int unsigned DATA_W = da_fp_pkg::DA_DATA_W,
  parameter int unsigned SUB_W  = da_fp_pkg::DA_SUB_W
) (
  input  logic [COEF_W-1:0] x [K],
  input  logic [K-1:0]      addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned Q = K / 4;

  logic [SUB_W-1:0]  lut_data [4];
  logic [DATA_W-1:0] sum_01, sum_23;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [COEF_W-1:0] xb [Q];
    for (genvar k = 0; k < Q; k++) begin : g_x
      assign xb[k] = x[b*Q + k];
    end
    // bank b takes address bits K-1-b*Q down to K-(b+1)*Q
    da_lut_single #(.K(Q), .COEF_W(COEF_W), .DATA_W(SUB_W)) u_lut (
      .x(xb), .addr(addr[K-1-b*Q -: Q]), .data(lut_data[b])
    );
  end

  assign sum_01 = DATA_W'(lut_data[0]) + DATA_W'(lut_data[1]);
  assign sum_23 = DATA_W'(lut_data[2]) + DATA_W'(lut_data[3]);
  assign data   = sum_01 + sum_23;

endmodule
