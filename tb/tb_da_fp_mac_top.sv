// End-to-end testbench of da_fp_mac_top at its default parameters. All five
// MAC organisations get the same stimulus: the published run (a = 2, 3, 4, 5,
// clken = 1, addresses 0010 and 0011 giving 4.0 and 9.0 with z = 0), then a
// random mix of accumulated terms, subtracted terms (sign bit set), clears,
// coefficient reloads, back-to-back terms and idle gaps. Every core's data,
// flt_value, output_z and z are checked against a model (plain subset sum
// plus fp_ref_pkg), and the cores must agree with each other. Each mechanism
// is counted and one that never happened counts as a failure.
module tb_da_fp_mac_top;
  import fp_ref_pkg::*;
  import da_fp_pkg::*;

  localparam int N = NUM_ARCH;

  logic        clk = 0, rst_n = 0;
  logic        clken [N], a_load [N], addr_stb [N], addr_ack [N], output_z_stb [N];
  logic [3:0]  a [N][4];
  logic [4:0]  addr [N];
  logic [31:0] data [N], flt_value [N], output_z [N], z [N];
  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_load = 0, n_clear = 0, n_add = 0, n_sub = 0, n_stream = 0, n_gap = 0;

  da_fp_mac_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]  coef [4];
  logic [31:0] acc;
  bit          streamed;
  int          prev_take;

  task automatic expect32(string what, int i, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++; $display("FAIL arch %0d %s: %h expected %h", i, what, got, want);
    end
  endtask

  task automatic set_clken(logic v);
    for (int i = 0; i < N; i++) clken[i] <= v;
  endtask

  task automatic load(logic [3:0] c [4]);
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < 4; k++) a[i][k] <= c[k];
      a_load[i] <= 1;
    end
    @(posedge clk);
    for (int i = 0; i < N; i++) a_load[i] <= 0;
    coef = c;
    n_load++;
  endtask

  task automatic term(logic [4:0] ad, bit stream, logic [4:0] nxt, logic clr);
    int s;
    logic [31:0] f, sum_ref;
    for (int i = 0; i < N; i++) begin addr[i] <= ad; addr_stb[i] <= 1; end
    do @(posedge clk); while (!addr_ack[0]);
    for (int i = 1; i < N; i++) begin
      checks++;
      if (!addr_ack[i]) begin failures++; $display("FAIL arch %0d not in step", i); end
    end
    if (streamed) begin
      checks++;
      if (cyc - prev_take != 4) begin
        failures++; $display("FAIL back-to-back terms %0d cycles apart", cyc - prev_take);
      end
      n_stream++;
    end
    prev_take = cyc;
    streamed  = stream;
    for (int i = 0; i < N; i++) begin
      if (stream) addr[i] <= nxt;
      else        addr_stb[i] <= 0;
    end
    s = (ad[3] ? int'(coef[0]) : 0) + (ad[2] ? int'(coef[1]) : 0)
      + (ad[1] ? int'(coef[2]) : 0) + (ad[0] ? int'(coef[3]) : 0);
    f = ref_int(longint'(s), ad[4]);
    for (int i = 0; i < N; i++) begin
      expect32("data", i, data[i], 32'(s));
      expect32("flt_value", i, flt_value[i], f);
    end
    sum_ref = ref_add(f, acc);
    acc = clr ? 32'h0 : sum_ref;
    if (!clr && s != 0) begin
      if (ad[4]) n_sub++; else n_add++;
    end
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      expect32("output_z", i, output_z[i], sum_ref);
      expect32("z", i, z[i], acc);
    end
  endtask

  initial begin
    logic [4:0] ad, nx;
    logic [3:0] c [4];
    streamed = 0;
    acc = 32'h0;
    for (int i = 0; i < N; i++) begin
      clken[i] = 1; a_load[i] = 0; addr_stb[i] = 0; addr[i] = '0;
      for (int k = 0; k < 4; k++) a[i][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    c = '{4'd2, 4'd3, 4'd4, 4'd5};
    load(c);
    term(5'b00010, 0, 5'd0, 1);
    for (int i = 0; i < N; i++) expect32("published flt 4", i, flt_value[i], 32'h4080_0000);
    term(5'b00011, 0, 5'd0, 1);
    for (int i = 0; i < N; i++) begin
      expect32("published DATA", i, data[i], 32'd9);
      expect32("published flt 9", i, flt_value[i], 32'h4110_0000);
      expect32("published output_z", i, output_z[i], 32'h4110_0000);
      expect32("published z", i, z[i], 32'h0);
    end
    set_clken(0);
    @(posedge clk);
    ad = 5'($urandom);
    for (int i = 0; i < 800; i++) begin
      bit st;
      if (!streamed) begin
        case ($urandom % 16)
          0: begin
            set_clken(1);
            @(posedge clk); #1;
            acc = 32'h0;
            for (int j = 0; j < N; j++) expect32("clear", j, z[j], 32'h0);
            n_clear++;
            set_clken(0);
          end
          1: begin
            for (int k = 0; k < 4; k++) c[k] = 4'($urandom);
            load(c);
          end
          2: begin repeat (1 + $urandom % 4) @(posedge clk); n_gap++; end
          default: ;
        endcase
      end
      st = (i != 799) && (($urandom % 2) == 1);
      nx = 5'($urandom);
      term(ad, st, nx, 0);
      ad = nx;
    end
    for (int i = 0; i < N; i++) addr_stb[i] <= 0;
    $display("mechanisms: load=%0d clear=%0d add=%0d subtract=%0d back_to_back=%0d idle_gap=%0d",
             n_load, n_clear, n_add, n_sub, n_stream, n_gap);
    checks++; if (n_load < 2)   begin failures++; $display("FAIL no coefficient reload"); end
    checks++; if (n_clear == 0) begin failures++; $display("FAIL no clear"); end
    checks++; if (n_add == 0)   begin failures++; $display("FAIL no added term"); end
    checks++; if (n_sub == 0)   begin failures++; $display("FAIL no subtracted term"); end
    checks++; if (n_stream == 0) begin failures++; $display("FAIL no back-to-back terms"); end
    checks++; if (n_gap == 0)   begin failures++; $display("FAIL no idle gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
