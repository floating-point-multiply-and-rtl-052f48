// Accumulator section of the DA floating-point MAC. It holds the running
// single-precision sum z, which is fed back to the floating-point adder as
// its b operand (offered continuously: z_stb is high whenever the section is
// out of reset), and takes every result the adder offers (sum_ack is high out
// of reset). While clken is 1 the accumulator is held at zero, so results
// offered then are discarded; with clken 0 each accepted result becomes the
// new z on the next rising edge. The clken rule is the published one; the
// handshake and the synchronous, active-low reset to +0 are this
// implementation's choice.
module da_accumulator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clken,
  input  logic [31:0] sum,
  input  logic        sum_stb,
  output logic        sum_ack,
  output logic [31:0] z,
  output logic        z_stb
);

  logic running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      z       <= '0;
    end else begin
      running <= 1'b1;
      if (clken)        z <= '0;
      else if (sum_stb && sum_ack) z <= sum;
    end
  end

  assign sum_ack = running;
  assign z_stb   = running;

endmodule
