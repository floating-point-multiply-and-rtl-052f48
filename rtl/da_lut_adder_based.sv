// Adder-based LUT section: no table at all. Each coefficient passes a 2:1
// multiplexer that outputs x[k] when its address bit is set (bit K-1-k) and 0
// otherwise, and a binary tree of K-1 adders sums the multiplexer outputs
// (for K=4: (m0 + m1) + (m2 + m3)). All tree nodes are
// DATA_W bits wide. Combinational. K must be a power of two.
// Multiplexers and adder tree follow the published structure; the 32-bit
// node width is this implementation's choice.
module da_lut_adder_based #(
  parameter int unsigned K      = da_fp_pkg::DA_K,
  parameter int unsigned COEF_W = da_fp_pkg::DA_COEF_W,
  parameter int unsigned DATA_W = da_fp_pkg::DA_DATA_W
) (
  input  logic [COEF_W-1:0] x [K],
  input  logic [K-1:0]      addr,
  output logic [DATA_W-1:0] data
);

  // heap-ordered adder tree: node[1] is the root, node[K+k] the leaf of x[k]
  logic [DATA_W-1:0] node [1:2*K-1];

  for (genvar k = 0; k < K; k++) begin : g_mux
    assign node[K+k] = addr[K-1-k] ? DATA_W'(x[k]) : '0;
  end

  for (genvar i = 1; i < K; i++) begin : g_add
    assign node[i] = node[2*i] + node[2*i+1];
  end

  assign data = node[1];

endmodule
