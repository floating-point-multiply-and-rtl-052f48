// Self-checking testbench of da_lut_mux_adder, the halved LUT with multiplexer and adder.
// For the published coefficients a = 2, 3, 4, 5 and then for random
// coefficient sets it applies all 16 addresses and compares `data` with the
// sum of the coefficients whose address bit is set (bit 3 selects a(0), bit 0
// selects a(3)), computed here by a plain loop. Address 0011 must give 9 and
// 0010 must give 4 for the published set.
module tb_da_lut_mux_adder;
  logic [3:0]  x [4];
  logic [3:0]  addr;
  logic [31:0] data;
  int checks = 0, failures = 0;

  da_lut_mux_adder dut (.x, .addr, .data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    for (int b = 0; b < 16; b++) begin
      int exp_v, exp_hi, exp_lo;
      addr = 4'(b);
      #1;
      exp_hi = (b[3] ? int'(x[0]) : 0) + (b[2] ? int'(x[1]) : 0);
      exp_lo = (b[1] ? int'(x[2]) : 0) + (b[0] ? int'(x[3]) : 0);
      exp_v  = exp_hi + exp_lo;
      checks++;
      if (data !== 32'(exp_v)) begin
        failures++;
        $display("FAIL x=%0d,%0d,%0d,%0d addr=%b data=%0d expected %0d",
                 x[0], x[1], x[2], x[3], addr, data, exp_v);
      end
    end
  endtask

  initial begin
    x[0] = 4'd2; x[1] = 4'd3; x[2] = 4'd4; x[3] = 4'd5;
    addr = 4'b0011;
    #1;
    checks++;
    if (data !== 32'd9) begin failures++; $display("FAIL published 0011 -> %0d", data); end
    addr = 4'b0010;
    #1;
    checks++;
    if (data !== 32'd4) begin failures++; $display("FAIL published 0010 -> %0d", data); end
    sweep();
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 4; k++) x[k] = 4'($urandom);
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
