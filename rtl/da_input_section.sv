// Input data section of the DA floating-point MAC: the registers X(0)..X(K-1)
// that take the coefficients a(0)..a(K-1) from outside and hold them for the
// LUT section. A coefficient set is captured on the rising clock edge when
// `load` is high and kept otherwise; the held values appear on `x` one cycle
// after the load. Reset (synchronous, active low) clears them to zero.
// The design names this section and its registers X(0)..X(3); the load enable
// and the reset value are choices of this implementation.
module da_input_section #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [COEF_W-1:0] a [K],
  output logic [COEF_W-1:0] x [K]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) x[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < K; k++) x[k] <= a[k];
    end
  end

endmodule
