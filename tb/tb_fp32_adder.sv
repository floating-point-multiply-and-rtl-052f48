// Self-checking testbench of fp32_adder, the handshaked IEEE-754 adder.
// Operand pairs go through the a, b and z handshakes with random gaps on
// the strobes and on output_z_ack, and every result is compared with
// fp_ref_pkg::ref_add. The pairs are directed cases (9 + 0, 4 + 9, x - x,
// cancellation, subnormals, overflow to infinity, NaN, inf - inf, rounding
// ties) and random operands whose exponents differ by at most 28 (where the
// double-precision reference is exact before its single rounding). It also
// checks that with strobes and acknowledge held high one addition takes
// exactly four clock cycles, and that the result is held while unacknowledged.
module tb_fp32_adder;
  import fp_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] input_a, input_b, output_z;
  logic        input_a_stb = 0, input_b_stb = 0, output_z_ack = 0;
  logic        input_a_ack, input_b_ack, output_z_stb;
  int checks = 0, failures = 0;

  fp32_adder dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_nan(logic [31:0] f);
    return f[30:23] == 8'hff && f[22:0] != 0;
  endfunction

  // one addition; gaps = 1 inserts random idle cycles around every transfer
  task automatic add(logic [31:0] a, logic [31:0] b, logic [31:0] exp_z, bit gaps);
    logic [31:0] held;
    if (gaps) repeat ($urandom % 3) @(posedge clk);
    input_a <= a; input_a_stb <= 1;
    do @(posedge clk); while (!input_a_ack);
    input_a_stb <= 0;
    if (gaps) repeat ($urandom % 3) @(posedge clk);
    input_b <= b; input_b_stb <= 1;
    do @(posedge clk); while (!input_b_ack);
    input_b_stb <= 0;
    do @(posedge clk); while (!output_z_stb);
    held = output_z;
    if (gaps) begin
      repeat ($urandom % 3) begin
        @(posedge clk);
        checks++;
        if (!output_z_stb || output_z !== held) begin
          failures++; $display("FAIL result not held while unacknowledged");
        end
      end
    end
    output_z_ack <= 1;
    @(posedge clk);
    output_z_ack <= 0;
    checks++;
    if (is_nan(exp_z) ? !is_nan(held) : (held !== exp_z)) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", a, b, held, exp_z);
    end
  endtask

  function automatic logic [31:0] rand_fp(int e_lo, int e_hi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(e_lo + int'($urandom % (e_hi - e_lo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    add(32'h4110_0000, 32'h0000_0000, 32'h4110_0000, 0);   // 9 + 0
    add(32'h4080_0000, 32'h4110_0000, 32'h4150_0000, 0);   // 4 + 9 = 13
    add(32'h4110_0000, 32'hc110_0000, 32'h0000_0000, 0);   // 9 - 9 = +0
    add(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 0);   // -0 + -0
    add(32'h3f80_0001, 32'hbf80_0000, 32'h3400_0000, 0);   // cancellation
    add(32'h0000_0001, 32'h0000_0001, 32'h0000_0002, 0);   // subnormals
    add(32'h007f_ffff, 32'h0000_0001, 32'h0080_0000, 0);   // subnormal -> normal
    add(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000, 0);   // overflow
    add(32'h7f80_0000, 32'h3f80_0000, 32'h7f80_0000, 0);   // inf + 1
    add(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000, 0);   // inf - inf
    add(32'h7fc0_1234, 32'h3f80_0000, 32'h7fc0_0000, 0);   // NaN
    add(32'h4b80_0000, 32'h3f80_0000, 32'h4b80_0000, 0);   // 2^24 + 1: tie to even
    add(32'h4b80_0000, 32'h4000_0000, 32'h4b80_0001, 0);   // 2^24 + 2
    add(32'h4b80_0001, 32'h3f80_0000, 32'h4b80_0002, 0);   // tie rounds up to even
    add(32'h3f80_0000, 32'h3380_0000, 32'h3f80_0000, 0);   // 1 + 2^-24

    // latency with everything ready: a taken, b taken, add, z offered
    input_a <= 32'h3f80_0000; input_b <= 32'h4000_0000;
    input_a_stb <= 1; input_b_stb <= 1; output_z_ack <= 1;
    do @(posedge clk); while (!input_a_ack);
    t0 = cyc;
    do @(posedge clk); while (!(output_z_stb && output_z_ack));
    t1 = cyc;
    input_a_stb <= 0; input_b_stb <= 0; output_z_ack <= 0;
    checks++;
    if (t1 - t0 != 3) begin
      failures++; $display("FAIL latency %0d cycles from a taken to z taken", t1 - t0);
    end
    // the unit must be back waiting for a
    #1;
    checks++;
    if (!input_a_ack) begin failures++; $display("FAIL not ready after an addition"); end

    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a, b;
      int ea;
      ea = 1 + int'($urandom % 220);
      a  = rand_fp(ea, ea);
      b  = rand_fp((ea > 28) ? ea - 28 : 0, ea + 28 > 254 ? 254 : ea + 28);
      if ($urandom % 8 == 0) b = {~a[31], a[30:23], a[22:0] ^ 23'($urandom % 4)};
      add(a, b, ref_add(a, b), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
