// LUT section "single LUT and adder". In the 2^K-row table the upper half
// repeats the lower half plus a(0), so the table is halved: a 2:1 multiplexer
// driven by address bit K-1 (b1) passes either x[0] or 0, a 2^(K-1)-row LUT
// holds the subset sums of x[1..K-1] addressed by the remaining bits, and one
// adder adds the two. Combinational.
// The multiplexer, halved LUT and adder are the published structure.
module da_lut_mux_adder #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W,
  parameter int unsigned DATA_W = da_fp_pkg::DA_DATA_W
) (
  input  logic [COEF_W-1:0] x [K],
  input  logic [K-1:0]      addr,
  output logic [DATA_W-1:0] data
);

  logic [COEF_W-1:0] x_rest [K-1];
  logic [COEF_W-1:0] mux_out;
  logic [DATA_W-1:0] lut_data;

  for (genvar k = 1; k < K; k++) begin : g_rest
    assign x_rest[k-1] = x[k];
  end

  assign mux_out = addr[K-1] ? x[0] : '0;

  da_lut_single #(.K(K-1), .COEF_W(COEF_W), .DATA_W(DATA_W)) u_lut (
    .x(x_rest), .addr(addr[K-2:0]), .data(lut_data)
  );

  assign data = lut_data + DATA_W'(mux_out);

endmodule
