// Self-checking testbench of da_fp_mac (default organisation: single LUT).
// It loads the published coefficients a = 2, 3, 4, 5 and replays the
// published run: with clken = 1 the addresses 0010 and 0011 give DATA = 4
// and 9, flt_value = 0x40800000 and 0x41100000, output_z equal to flt_value
// and z = 0. It then accumulates random signed terms with clken = 0 (and
// occasional clears, coefficient reloads and back-to-back terms), checking
// data, flt_value, output_z and z against a model built from a plain
// subset sum and fp_ref_pkg. Timing checks: z is updated by the third edge
// after the term is taken, and back-to-back terms are taken four cycles apart.
module tb_da_fp_mac;
  import fp_ref_pkg::*;

  logic        clk = 0, rst_n = 0, clken = 1, a_load = 0, addr_stb = 0;
  logic [3:0]  a [4];
  logic [4:0]  addr = '0;
  logic        addr_ack, output_z_stb;
  logic [31:0] data, flt_value, output_z, z;
  int checks = 0, failures = 0;
  int cyc = 0;

  da_fp_mac dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]  coef [4];     // coefficients in use (model)
  logic [31:0] acc;          // model of z
  int          last_take;   // -2: previous term was streamed
  int          take_cyc, prev_take;

  task automatic expect32(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++; $display("FAIL %s: %h expected %h (addr %b)", what, got, want, addr);
    end
  endtask

  task automatic load(logic [3:0] c0, logic [3:0] c1, logic [3:0] c2, logic [3:0] c3);
    a[0] <= c0; a[1] <= c1; a[2] <= c2; a[3] <= c3; a_load <= 1;
    @(posedge clk);
    a_load <= 0;
    coef = '{c0, c1, c2, c3};
  endtask

  // offer one term; stream = 1 keeps addr_stb high and offers `nxt` as the
  // following term right after this one is taken
  task automatic term(logic [4:0] ad, bit stream, logic [4:0] nxt);
    int s;
    logic [31:0] f, sum_ref;
    addr <= ad; addr_stb <= 1;
    do @(posedge clk); while (!addr_ack);
    if (last_take == -2) begin
      checks++;
      if (cyc - prev_take != 4) begin
        failures++; $display("FAIL back-to-back terms %0d cycles apart", cyc - prev_take);
      end
    end
    take_cyc = cyc;
    last_take = stream ? -2 : -1;
    if (stream) addr <= nxt;
    else        addr_stb <= 0;
    prev_take = take_cyc;
    s = (ad[3] ? int'(coef[0]) : 0) + (ad[2] ? int'(coef[1]) : 0)
      + (ad[1] ? int'(coef[2]) : 0) + (ad[0] ? int'(coef[3]) : 0);
    f = ref_int(longint'(s), ad[4]);
    expect32("data", data, 32'(s));
    expect32("flt_value", flt_value, f);
    sum_ref = ref_add(f, acc);
    acc = clken ? 32'h0 : sum_ref;
    repeat (3) @(posedge clk);
    #1;
    expect32("output_z", output_z, sum_ref);
    expect32("z", z, acc);
  endtask

  initial begin
    logic [4:0] ad, nx;
    last_take = -1;
    acc = 32'h0;
    for (int k = 0; k < 4; k++) a[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load(2, 3, 4, 5);
    // published run
    term(5'b00010, 0, 5'd0);
    expect32("published flt 4", flt_value, 32'h4080_0000);
    expect32("published z", z, 32'h0);
    term(5'b00011, 0, 5'd0);
    expect32("published DATA 9", data, 32'd9);
    expect32("published flt 9", flt_value, 32'h4110_0000);
    expect32("published output_z", output_z, 32'h4110_0000);
    expect32("published z", z, 32'h0);
    // accumulation
    clken <= 0;
    @(posedge clk);
    ad = 5'($urandom);
    for (int i = 0; i < 600; i++) begin
      bit st;
      if (last_take != -2) case ($urandom % 20)
        0: begin clken <= 1; @(posedge clk); #1; acc = 32'h0; expect32("clear", z, 32'h0); clken <= 0; end
        1: load(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
        default: ;
      endcase
      st = (i != 599) && (($urandom % 2) == 1);
      nx = 5'($urandom);
      term(ad, st, nx);
      ad = nx;
    end
    addr_stb <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
