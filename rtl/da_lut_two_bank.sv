// LUT section with two-bank coefficient partitioning. The K coefficients are
// split into two halves; each half has its own 2^(K/2)-row LUT (for K=4, two
// 4-row LUTs instead of one 16-row LUT), addressed by its half of the address
// (bits K-1..K/2 for x[0..K/2-1], bits K/2-1..0 for the rest). An extra adder
// sums the two LUT words: data = data1 + data2. The LUT words data1/data2 are
// SUB_W bits wide (16 by default, as published) and the sum DATA_W bits.
// Combinational. K must be even.
// The split and the 16-bit half words are published; generalising to any
// even K is this implementation's.
module da_lut_two_bank #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W,
  parameter int unsigned DATA_W = da_fp_pkg::DA_DATA_W,
  parameter int unsigned SUB_W  = da_fp_pkg::DA_SUB_W
) (
  input  logic [COEF_W-1:0] x [K],
  input  logic [K-1:0]      addr,
  output logic [SUB_W-1:0]  data1,
  output logic [SUB_W-1:0]  data2,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned H = K / 2;

  logic [COEF_W-1:0] x_hi [H];
  logic [COEF_W-1:0] x_lo [H];

  for (genvar k = 0; k < H; k++) begin : g_split
    assign x_hi[k] = x[k];
    assign x_lo[k] = x[H + k];
  end

  da_lut_single #(.K(H), .COEF_W(COEF_W), .DATA_W(SUB_W)) u_lut1 (
    .x(x_hi), .addr(addr[K-1:H]), .data(data1)
  );
  da_lut_single #(.K(H), .COEF_W(COEF_W), .DATA_W(SUB_W)) u_lut2 (
    .x(x_lo), .addr(addr[H-1:0]), .data(data2)
  );

  assign data = DATA_W'(data1) + DATA_W'(data2);

endmodule
