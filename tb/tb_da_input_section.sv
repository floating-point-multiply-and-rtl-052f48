// Self-checking testbench of da_input_section, the coefficient registers
// X(0..3). Checks the reset value, that a load captures all four
// coefficients on the clock edge, and that they are held while load is low
// and the inputs change.
module tb_da_input_section;
  logic       clk = 0, rst_n = 0, load = 0;
  logic [3:0] a [4];
  logic [3:0] x [4];
  logic [3:0] expv [4];
  int checks = 0, failures = 0;

  da_input_section dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (x[k] !== expv[k]) begin
        failures++; $display("FAIL %s: x[%0d]=%0d expected %0d", what, k, x[k], expv[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) a[k] = 4'($urandom);
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 4; k++) expv[k] = '0;
    compare("reset");
    rst_n = 1;
    // published coefficients
    a[0] = 2; a[1] = 3; a[2] = 4; a[3] = 5; load = 1;
    @(posedge clk); #1;
    load = 0;
    expv[0] = 2; expv[1] = 3; expv[2] = 4; expv[3] = 5;
    compare("load");
    for (int i = 0; i < 300; i++) begin
      for (int k = 0; k < 4; k++) a[k] = 4'($urandom);
      load = 1'($urandom);
      @(posedge clk); #1;
      if (load) for (int k = 0; k < 4; k++) expv[k] = a[k];
      compare(load ? "load" : "hold");
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
