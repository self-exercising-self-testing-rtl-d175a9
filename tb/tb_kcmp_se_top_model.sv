// tb_kcmp_se_top_model: the self-exercising comparator with module D replaced
// by its transistor-level DC model, in the two characterised orders: K = 2
// (pmos 4/1 um, W/L = 4) and K = 3 (pmos 7/1 um, W/L = 7), both N = 16.
// Each runs normal comparisons at every Hamming distance (match must be 1
// exactly below K) and two full test periods of 4N vectors, in which z1 must
// alternate 0, 1, ... and (z0, z1) must stay double-rail on every vector.
// The model carries the circuit-simulated output delays of each sizing (at
// most 3.67 ns); outputs are sampled 6 ns after the vector changes at a 10 ns
// clock, or 4.5 ns after the operands change.
`timescale 1ns / 1ps

module tb_kcmp_se_top_model;
  localparam int unsigned N = 16;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic [N-1:0] op_a, op_b, ta2, tb2, ta3, tb3;
  logic m2, z02, z12, m3, z03, z13;
  int checks = 0, failures = 0;
  int n_test = 0, n_norm = 0;

  kcmp_se_top #(.N(N), .K(2), .ANALOG_D(1'b1), .WP_UM(4.0)) dut2 (
    .clk(clk), .rst_n(rst_n), .test_en(test_en), .op_a(op_a), .op_b(op_b),
    .match(m2), .z0(z02), .z1(z12), .tvg_a(ta2), .tvg_b(tb2));
  kcmp_se_top #(.N(N), .K(3), .ANALOG_D(1'b1), .WP_UM(7.0), .D0_NS(3.59), .D1_NS(1.9)) dut3 (
    .clk(clk), .rst_n(rst_n), .test_en(test_en), .op_a(op_a), .op_b(op_b),
    .match(m3), .z0(z03), .z1(z13), .tvg_a(ta3), .tvg_b(tb3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_a = '0; op_b = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int d = 0; d <= int'(N); d++)
      for (int r = 0; r < 10; r++) begin
        logic [N-1:0] flip;
        flip = '0;
        while ($countones(flip) < d) flip[$urandom_range(N - 1, 0)] = 1'b1;
        op_a = N'($urandom);
        op_b = op_a ^ flip;
        #4.5;
        checks += 2;
        if (m2 !== (d < 2)) begin failures++; $display("FAIL K=2 d=%0d", d); end
        if (m3 !== (d < 3)) begin failures++; $display("FAIL K=3 d=%0d", d); end
        n_norm++;
        @(negedge clk);
      end
    test_en = 1;
    for (int t = 0; t < 8 * int'(N); t++) begin
      logic exp_z1;
      exp_z1 = (t % 2 == 1);
      op_a = N'($urandom); op_b = N'($urandom);
      #1;
      checks += 4;
      if (z12 !== exp_z1 || z13 !== exp_z1) begin failures++; $display("FAIL test t=%0d z1 %b %b", t, z12, z13); end
      if (z02 === z12) begin failures++; $display("FAIL K=2 not double-rail t=%0d", t); end
      if (z03 === z13) begin failures++; $display("FAIL K=3 not double-rail t=%0d", t); end
      if ($countones(ta3 ^ tb3) != ((t % 2 == 0) ? 3 : 2)) failures++;
      n_test++;
      @(negedge clk);
    end
    checks++;
    if (n_test == 0 || n_norm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
