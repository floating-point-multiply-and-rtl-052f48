// Self-checking testbench of int_to_fp32, the integer-to-IEEE-754 converter.
// Directed values (the published 9 -> 0x41100000 and 4 -> 0x40800000, zero,
// powers of two, rounding ties at 2^24+1 and 2^24+3, all ones) and random
// 32-bit words of random length are converted, with random sign, and compared
// with the reference conversion of fp_ref_pkg (through double precision,
// rounded to nearest even).
module tb_int_to_fp32;
  logic [31:0] mag;
  logic        neg;
  logic [31:0] flt;
  int checks = 0, failures = 0;

  int_to_fp32 dut (.mag, .neg, .flt);

  function automatic logic [31:0] ref_conv(logic [31:0] m, logic n);
    return fp_ref_pkg::ref_int(longint'(m), n);
  endfunction

  task automatic check(logic [31:0] m, logic n);
    logic [31:0] exp_v;
    mag = m; neg = n;
    #1;
    exp_v = ref_conv(m, n);
    checks++;
    if (flt !== exp_v) begin
      failures++;
      $display("FAIL mag=%0d neg=%0b got %h expected %h", m, n, flt, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd9, 1'b0);
    if (flt !== 32'h4110_0000) begin failures++; $display("FAIL 9 not 0x41100000"); end
    checks++;
    check(32'd4, 1'b0);
    if (flt !== 32'h4080_0000) begin failures++; $display("FAIL 4 not 0x40800000"); end
    checks++;
    check(32'd0, 1'b0);
    check(32'd1, 1'b0);
    check(32'd1, 1'b1);
    check(32'h0100_0001, 1'b0);   // tie, rounds down to even
    check(32'h0100_0003, 1'b0);   // tie, rounds up to even
    check(32'h0100_0002, 1'b0);
    check(32'hffff_ffff, 1'b0);
    check(32'h8000_0000, 1'b1);
    for (int i = 0; i < 32; i++) check(32'd1 << i, i[0]);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom;
      r = r >> ($urandom % 32);
      check(r, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
