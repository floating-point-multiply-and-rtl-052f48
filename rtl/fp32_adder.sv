// Floating-point adder of the DA MAC, IEEE-754 single precision, with a
// strobe/acknowledge handshake on each operand and on the result
// (input_a/_stb/_ack, input_b/_stb/_ack, output_z/_stb/_ack). A transfer
// happens on a rising edge where both strobe and acknowledge are high.
// The unit cycles through four states: take a (input_a_ack high), take b
// (input_b_ack high), add (one cycle, fp32_add_core, result registered) and
// offer z (output_z_stb high until acknowledged). With both sources and the
// sink always ready one addition therefore takes four clock cycles. The
// handshake signal names are the published ones; the state sequence and the
// one-cycle add are this implementation's choice. Reset is synchronous,
// active low, and returns the unit to "take a".
module fp32_adder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] input_a,
  input  logic        input_a_stb,
  output logic        input_a_ack,
  input  logic [31:0] input_b,
  input  logic        input_b_stb,
  output logic        input_b_ack,
  output logic [31:0] output_z,
  output logic        output_z_stb,
  input  logic        output_z_ack
);

  typedef enum logic [1:0] {GET_A, GET_B, ADD, PUT_Z} state_e;

  state_e      state;
  logic [31:0] a_q, b_q, sum;

  fp32_add_core u_core (.a(a_q), .b(b_q), .z(sum));

  assign input_a_ack  = (state == GET_A);
  assign input_b_ack  = (state == GET_B);
  assign output_z_stb = (state == PUT_Z);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= GET_A;
      a_q      <= '0;
      b_q      <= '0;
      output_z <= '0;
    end else begin
      unique case (state)
        GET_A: if (input_a_stb) begin a_q <= input_a; state <= GET_B; end
        GET_B: if (input_b_stb) begin b_q <= input_b; state <= ADD;   end
        ADD:   begin output_z <= sum; state <= PUT_Z; end
        PUT_Z: if (output_z_ack) state <= GET_A;
        default: state <= GET_A;
      endcase
    end
  end

  // the result must not change while it is offered and not yet taken
  a_z_stable: assert property (@(posedge clk) disable iff (!rst_n)
                output_z_stb && !output_z_ack |=> $stable(output_z) && output_z_stb);

endmodule
