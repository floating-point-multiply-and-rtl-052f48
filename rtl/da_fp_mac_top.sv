// Top level: the five DA floating-point MAC organisations side by side.
//
// Element i of every port array belongs to the core built with
// ARCH = da_arch_e'(i): 0 single LUT, 1 two-bank partitioned LUT, 2 four-bank
// partitioned LUT, 3 halved LUT with a multiplexer and adder, 4 adder-based.
// The cores share only the clock and reset; each has its own coefficients,
// address handshake, clear (clken) and outputs, so they can be driven with
// the same stimulus and compared, or used independently. See da_fp_mac for
// the function and timing of one core.
module da_fp_mac_top
  import da_fp_pkg::*;
#(
  parameter int unsigned K      = DA_K,
  parameter int unsigned COEF_W = DA_COEF_W,
  parameter int unsigned DATA_W = DA_DATA_W,
  parameter int unsigned SUB_W  = DA_SUB_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clken        [NUM_ARCH],
  input  logic              a_load       [NUM_ARCH],
  input  logic [COEF_W-1:0] a            [NUM_ARCH][K],
  input  logic [K:0]        addr         [NUM_ARCH],
  input  logic              addr_stb     [NUM_ARCH],
  output logic              addr_ack     [NUM_ARCH],
  output logic [DATA_W-1:0] data         [NUM_ARCH],
  output logic [31:0]       flt_value    [NUM_ARCH],
  output logic [31:0]       output_z     [NUM_ARCH],
  output logic              output_z_stb [NUM_ARCH],
  output logic [31:0]       z            [NUM_ARCH]
);

  for (genvar i = 0; i < NUM_ARCH; i++) begin : g_mac
    da_fp_mac #(
      .ARCH(da_arch_e'(i)), .K(K), .COEF_W(COEF_W), .DATA_W(DATA_W), .SUB_W(SUB_W)
    ) u_mac (
      .clk, .rst_n,
      .clken(clken[i]), .a_load(a_load[i]), .a(a[i]),
      .addr(addr[i]), .addr_stb(addr_stb[i]), .addr_ack(addr_ack[i]),
      .data(data[i]), .flt_value(flt_value[i]),
      .output_z(output_z[i]), .output_z_stb(output_z_stb[i]), .z(z[i])
    );
  end

endmodule
