// Shared types and constants of the distributed-arithmetic (DA) floating-point
// MAC. The five LUT-section organisations compared by the design are named by
// da_arch_e; the default sizes (four coefficients of four bits, a 32-bit
// integer LUT word, 16-bit half words in the partitioned LUTs) are the ones the
// design was published with. IEEE-754 single-precision field widths are
// collected here for the converter and the adder.
package da_fp_pkg;

  // LUT-section organisation of one MAC core.
  typedef enum logic [2:0] {
    ARCH_SINGLE_LUT = 3'd0,  // one 2^K-row LUT
    ARCH_TWO_LUT    = 3'd1,  // two 2^(K/2)-row LUTs and one adder
    ARCH_FOUR_LUT   = 3'd2,  // four 2-row LUTs and three adders
    ARCH_LUT_ADDER  = 3'd3,  // 2:1 mux for a(0), 2^(K-1)-row LUT, one adder
    ARCH_ADDER_ONLY = 3'd4   // four 2:1 muxes and three adders
  } da_arch_e;

  localparam int unsigned NUM_ARCH = 5;

  localparam int unsigned DA_K      = 4;   // coefficients a(0..3)
  localparam int unsigned DA_COEF_W = 4;   // a0[3:0] .. a3[3:0]
  localparam int unsigned DA_DATA_W = 32;  // DATA[31:0]
  localparam int unsigned DA_SUB_W  = 16;  // DATA1[15:0], DATA2[15:0]

  // IEEE-754 binary32
  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_MAN_W  = 23;
  localparam int unsigned FP_BIAS   = 127;

  typedef struct packed {
    logic                sign;
    logic [FP_EXP_W-1:0] exp;
    logic [FP_MAN_W-1:0] man;
  } fp32_t;

endpackage
