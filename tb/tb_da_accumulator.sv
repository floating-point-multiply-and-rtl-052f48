// Self-checking testbench of da_accumulator. After reset z is +0 and both
// z_stb (b operand offered) and sum_ack are high. Offered sums are taken on
// the clock edge; while clken is 1 z is held at zero whatever is offered;
// with no sum offered z keeps its value.
module tb_da_accumulator;
  logic        clk = 0, rst_n = 0, clken = 0, sum_stb = 0;
  logic [31:0] sum = 32'h1234_5678, z;
  logic        sum_ack, z_stb;
  logic [31:0] model;
  int checks = 0, failures = 0;

  da_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (z !== 32'h0) begin failures++; $display("FAIL reset value %h", z); end
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (!sum_ack || !z_stb) begin failures++; $display("FAIL not ready after reset"); end
    model = 32'h0;
    for (int i = 0; i < 500; i++) begin
      sum     = $urandom;
      sum_stb = ($urandom % 3) != 0;
      clken   = ($urandom % 5) == 0;
      @(posedge clk); #1;
      if (clken) model = 32'h0;
      else if (sum_stb) model = sum;
      checks++;
      if (z !== model) begin
        failures++; $display("FAIL clken=%0b stb=%0b z=%h expected %h", clken, sum_stb, z, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
