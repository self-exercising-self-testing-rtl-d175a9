// tb_kcmp_se_top: end-to-end test of the self-exercising k-order comparator
// at its default size (N = 16, K = 2).
//
// Phase 1, normal operation: random operand pairs at every Hamming distance;
// match must be 1 exactly when fewer than K bits differ.
// Phase 2, one complete test period: 4N consecutive test-phase cycles; the
// generator must present weight K and K-1 alternately (weight computed here
// from the observed register states), z1 must be 0 / 1 accordingly, z0 must
// be its complement on every cycle, and the generator must be back at its
// reset state after exactly 4N vectors.
// Phase 3, interleaving: random switching between modes; normal cycles are
// checked against the operands, test cycles for double-rail outputs and for
// ignoring the operand inputs.
// Every mechanism (match, mismatch, weight-K vector, weight-(K-1) vector,
// switches in both directions, completed test period, operands overridden in
// test mode) is counted and must occur at least once.
`timescale 1ns / 1ps

module tb_kcmp_se_top;
  localparam int unsigned N = kcmp_pkg::DEFAULT_N;
  localparam int unsigned K = kcmp_pkg::DEFAULT_K;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic [N-1:0] op_a, op_b, tvg_a, tvg_b;
  logic match, z0, z1;
  int checks = 0, failures = 0;

  int n_match = 0, n_mismatch = 0, n_vec_k = 0, n_vec_km1 = 0;
  int n_sw_on = 0, n_sw_off = 0, n_period = 0, n_override = 0;

  kcmp_se_top dut (
    .clk(clk), .rst_n(rst_n), .test_en(test_en), .op_a(op_a), .op_b(op_b),
    .match(match), .z0(z0), .z1(z1), .tvg_a(tvg_a), .tvg_b(tvg_b));

  always #5 clk = ~clk;

  task automatic rand_ops(output int d);
    logic [N-1:0] flip;
    flip = '0;
    d = int'($urandom_range(N, 0));
    while ($countones(flip) < d) flip[$urandom_range(N - 1, 0)] = 1'b1;
    op_a = N'($urandom);
    op_b = op_a ^ flip;
  endtask

  // checks made in the middle of a cycle (after the negative edge)
  task automatic check_normal(int d);
    checks++;
    if (match !== (d < int'(K))) begin
      failures++; $display("FAIL normal d=%0d match=%b", d, match);
    end
    if (d < int'(K)) n_match++; else n_mismatch++;
  endtask

  int vec_idx = 0;   // test vectors applied since reset
  task automatic check_test(int d_ops);
    int w, exp_w;
    w = $countones(tvg_a ^ tvg_b);
    exp_w = (vec_idx % 2 == 0) ? int'(K) : int'(K) - 1;
    checks += 3;
    if (w != exp_w) begin failures++; $display("FAIL test vec %0d weight %0d", vec_idx, w); end
    if (z1 !== (w < int'(K))) begin failures++; $display("FAIL test vec %0d z1=%b", vec_idx, z1); end
    if (z0 === z1) begin failures++; $display("FAIL test vec %0d not double-rail z0=%b z1=%b", vec_idx, z0, z1); end
    if (w == int'(K)) n_vec_k++; else n_vec_km1++;
    if ((d_ops < int'(K)) != (w < int'(K))) n_override++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    logic [N-1:0] a0, b0;
    op_a = '0; op_b = '0;
    #12 rst_n = 1;
    @(negedge clk);
    a0 = tvg_a; b0 = tvg_b;

    // phase 1: normal operation
    for (int t = 0; t < 300; t++) begin
      rand_ops(d);
      #1 check_normal(d);
      @(negedge clk);
    end

    // phase 2: one full test period
    test_en = 1; n_sw_on++;
    for (int t = 0; t < 4 * int'(N); t++) begin
      rand_ops(d);
      #1 check_test(d);
      @(posedge clk); vec_idx++;
      @(negedge clk);
    end
    checks++;
    if (tvg_a !== a0 || tvg_b !== b0) begin failures++; $display("FAIL generator not back after 4N vectors"); end
    else n_period++;

    // phase 3: interleaved modes
    for (int t = 0; t < 2000; t++) begin
      logic nxt;
      nxt = ($urandom_range(2, 0) == 0) ? ~test_en : test_en;
      if (nxt && !test_en) n_sw_on++;
      if (!nxt && test_en) n_sw_off++;
      test_en = nxt;
      rand_ops(d);
      #1;
      if (test_en) check_test(d); else check_normal(d);
      @(posedge clk);
      if (test_en) begin
        vec_idx++;
        if (vec_idx % (4 * int'(N)) == 0) n_period++;
      end
      @(negedge clk);
    end

    $display("mechanisms: match=%0d mismatch=%0d vecK=%0d vecK-1=%0d to_test=%0d to_normal=%0d periods=%0d override=%0d",
             n_match, n_mismatch, n_vec_k, n_vec_km1, n_sw_on, n_sw_off, n_period, n_override);
    checks += 8;
    if (n_match == 0)    failures++;
    if (n_mismatch == 0) failures++;
    if (n_vec_k == 0)    failures++;
    if (n_vec_km1 == 0)  failures++;
    if (n_sw_on == 0)    failures++;
    if (n_sw_off == 0)   failures++;
    if (n_period < 2)    failures++;
    if (n_override == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
