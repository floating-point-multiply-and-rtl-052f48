// One distributed-arithmetic floating-point MAC core.
//
// The coefficients a(0..K-1) are held in the input data section. Each term
// to be accumulated is a K-bit DA address b1..bK (addr[K-1:0], addr[K-1]
// selecting a(0)) plus a sign bit addr[K]: the LUT section returns the
// integer sum of the selected coefficients (data), the floating-point
// converter turns it into IEEE-754 single precision (flt_value, negated when
// addr[K] is set), and the floating-point adder adds it to the accumulator
// value z; the accumulator keeps the result, or zero while clken is 1.
//
// ARCH chooses how the LUT section is built (da_fp_pkg::da_arch_e): one
// 2^K-row LUT, two or four partitioned LUTs with adders, a halved LUT with a
// multiplexer and an adder, or multiplexers and adders only. All five give
// the same data for the same address; they differ only in structure.
//
// Interface and timing: a term is offered with addr_stb and taken on the
// rising edge where addr_ack is also high; addr and the coefficients must
// stay steady from the offer until then (coefficients loaded with a_load are
// used from the next cycle). data and flt_value are combinational from addr.
// The adder takes the term, then z on the next edge, adds in one cycle and
// offers output_z (output_z_stb), which the accumulator takes at once: z
// holds the new sum after the third rising edge following the one that took
// the term, and the next term can be taken on the fourth (one term per four
// cycles when addr_stb stays high).
// Reset is synchronous and active low.
module da_fp_mac
  import da_fp_pkg::*;
#(
  parameter da_arch_e    ARCH   = ARCH_SINGLE_LUT,
  parameter int unsigned K      = DA_K,
  parameter int unsigned COEF_W = DA_COEF_W,
  parameter int unsigned DATA_W = DA_DATA_W,
  parameter int unsigned SUB_W  = DA_SUB_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clken,
  input  logic              a_load,
  input  logic [COEF_W-1:0] a [K],
  input  logic [K:0]        addr,
  input  logic              addr_stb,
  output logic              addr_ack,
  output logic [DATA_W-1:0] data,
  output logic [31:0]       flt_value,
  output logic [31:0]       output_z,
  output logic              output_z_stb,
  output logic [31:0]       z
);

  logic [COEF_W-1:0] x [K];
  logic              output_z_ack;
  logic              z_stb;
  logic              b_ack;   // z is offered continuously; its acknowledge needs no use

  da_input_section #(.K(K), .COEF_W(COEF_W)) u_input (
    .clk, .rst_n, .load(a_load), .a, .x
  );

  // LUT section
  if (ARCH == ARCH_SINGLE_LUT) begin : g_lut
    da_lut_single #(.K(K), .COEF_W(COEF_W), .DATA_W(DATA_W)) u_lut (
      .x, .addr(addr[K-1:0]), .data
    );
  end else if (ARCH == ARCH_TWO_LUT) begin : g_lut
    logic [SUB_W-1:0] data1, data2;
    da_lut_two_bank #(.K(K), .COEF_W(COEF_W), .DATA_W(DATA_W), .SUB_W(SUB_W)) u_lut (
      .x, .addr(addr[K-1:0]), .data1, .data2, .data
    );
  end else if (ARCH == ARCH_FOUR_LUT) begin : g_lut
    da_lut_four_bank #(.K(K), .COEF_W(COEF_W), .DATA_W(DATA_W), .SUB_W(SUB_W)) u_lut (
      .x, .addr(addr[K-1:0]), .data
    );
  end else if (ARCH == ARCH_LUT_ADDER) begin : g_lut
    da_lut_mux_adder #(.K(K), .COEF_W(COEF_W), .DATA_W(DATA_W)) u_lut (
      .x, .addr(addr[K-1:0]), .data
    );
  end else begin : g_lut
    da_lut_adder_based #(.K(K), .COEF_W(COEF_W), .DATA_W(DATA_W)) u_lut (
      .x, .addr(addr[K-1:0]), .data
    );
  end

  int_to_fp32 #(.IN_W(DATA_W)) u_conv (
    .mag(data), .neg(addr[K]), .flt(flt_value)
  );

  fp32_adder u_add (
    .clk, .rst_n,
    .input_a(flt_value), .input_a_stb(addr_stb), .input_a_ack(addr_ack),
    .input_b(z),         .input_b_stb(z_stb),    .input_b_ack(b_ack),
    .output_z,           .output_z_stb,          .output_z_ack
  );

  da_accumulator u_acc (
    .clk, .rst_n, .clken,
    .sum(output_z), .sum_stb(output_z_stb), .sum_ack(output_z_ack),
    .z, .z_stb
  );

  // a term offered must stay put until it is taken
  a_addr_hold: assume property (@(posedge clk) disable iff (!rst_n)
                 addr_stb && !addr_ack |=> addr_stb && $stable(addr));

endmodule
