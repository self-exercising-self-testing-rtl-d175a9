// kcmp_selftest_harness: fault-injection harness used by tb_kcmp_selftest.
//
// Rebuilds the self-exercising comparator from its parts (test vector
// generator, XOR row, threshold stage, code / non-code indicator) with fault
// injection points on the generator outputs a_i / b_i (the XOR inputs), on the
// XOR outputs X_i, on the D output Z1 and on Z0. For every fault in the list
// below it resets the circuit, runs one full test period of 4N vectors and
// records whether (z0, z1) ever left double-rail encoding:
//   - single stuck-at-0 and stuck-at-1 on every X_i
//   - 40 random multiple stuck-at-0 and 40 multiple stuck-at-1 sets on X
//   - single stuck-at-0 / 1 on every XOR input a_i and b_i
//   - single stuck-at-0 / 1 on every cell of shift registers A and B
//   - stuck-open pull-up or pull-down path of D / buffer (output keeps its
//     previous value on a rising or on a falling transition)
//   - Z1 stuck-at-0 / 1, Z0 stuck-at-0 / 1
// The fault-free circuit must stay double-rail on every vector and every
// fault must be detected. When start rises the campaign runs; done rises at
// the end with the counts.
`timescale 1ns / 1ps

module kcmp_selftest_harness #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 2
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   detected,
  output int   faults
);

  logic         rst_n;
  logic         en;
  logic [N-1:0] a, b, a_f, b_f, x, x_f;
  logic         shift_a, shift_b, d_out, z1, z0, q, q_n;

  // fault controls
  logic [N-1:0] a_sa0, a_sa1, b_sa0, b_sa1, x_sa0, x_sa1;
  logic         z1_sa0, z1_sa1, z0_sa0, z0_sa1;
  logic [N-1:0] ca_sa0, ca_sa1, cb_sa0, cb_sa1;   // stuck shift-register cells

  kcmp_tvg #(.N(N), .K(K)) u_tvg (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b),
                                  .shift_a(shift_a), .shift_b(shift_b));
  assign a_f = (a & ~a_sa0) | a_sa1;
  assign b_f = (b & ~b_sa0) | b_sa1;
  kcmp_xor_row #(.N(N)) u_xor (.a(a_f), .b(b_f), .x(x));
  assign x_f = (x & ~x_sa0) | x_sa1;
  kcmp_threshold #(.N(N), .K(K)) u_d (.x(x_f), .lt_k(d_out));
  // Stuck-open transistors in the D / buffer path leave the output node
  // floating on one kind of transition, so it keeps its previous value:
  // no_rise models an open pull-up path, no_fall an open pull-down path.
  logic no_rise, no_fall, z1_prev, d_eff;
  always_comb begin
    d_eff = d_out;
    if (no_rise) d_eff = d_out & z1_prev;
    if (no_fall) d_eff = d_out | z1_prev;
  end
  always_ff @(posedge clk) z1_prev <= d_eff;
  assign z1 = (d_eff & ~z1_sa0) | z1_sa1;
  kcmp_cnci u_cnci (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .q_n(q_n));
  assign z0 = (q_n & ~z0_sa0) | z0_sa1;

  task automatic clear_faults();
    a_sa0 = '0; a_sa1 = '0; b_sa0 = '0; b_sa1 = '0; x_sa0 = '0; x_sa1 = '0;
    z1_sa0 = 0; z1_sa1 = 0; z0_sa0 = 0; z0_sa1 = 0;
    no_rise = 0; no_fall = 0;
    ca_sa0 = '0; ca_sa1 = '0; cb_sa0 = '0; cb_sa1 = '0;
  endtask

  for (genvar g = 0; g < int'(N); g++) begin : g_cell
    always @(ca_sa0[g] or ca_sa1[g]) begin
      if (ca_sa0[g])      force u_tvg.u_sr_a.q[g] = 1'b0;
      else if (ca_sa1[g]) force u_tvg.u_sr_a.q[g] = 1'b1;
      else                release u_tvg.u_sr_a.q[g];
    end
    always @(cb_sa0[g] or cb_sa1[g]) begin
      if (cb_sa0[g])      force u_tvg.u_sr_b.q[g] = 1'b0;
      else if (cb_sa1[g]) force u_tvg.u_sr_b.q[g] = 1'b1;
      else                release u_tvg.u_sr_b.q[g];
    end
  end

  // one full test period from reset; returns 1 when z0 == z1 on some vector
  task automatic run_period(output bit flagged);
    flagged = 0;
    en = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int t = 0; t < 4 * int'(N); t++) begin
      #1;
      if (z0 == z1) flagged = 1;
      @(negedge clk);
    end
    en = 0;
  endtask

  task automatic one_fault(string name);
    bit f;
    run_period(f);
    faults++;
    checks++;
    if (f) detected++;
    else begin
      failures++;
      $display("FAIL N=%0d K=%0d fault %s not detected", N, K, name);
    end
    clear_faults();
  endtask

  function automatic logic [N-1:0] rand_mask();
    logic [N-1:0] m;
    m = '0;
    while (m == '0) m = N'($urandom) & N'($urandom);
    return m;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; detected = 0; faults = 0;
    rst_n = 0; en = 0;
    clear_faults();
    wait (start);
    begin
      bit f;
      run_period(f);
      checks++;
      if (f) begin failures++; $display("FAIL N=%0d K=%0d fault-free circuit flagged", N, K); end
    end
    for (int i = 0; i < int'(N); i++) begin
      x_sa0[i] = 1'b1; one_fault($sformatf("X%0d/0", i));
      x_sa1[i] = 1'b1; one_fault($sformatf("X%0d/1", i));
      a_sa0[i] = 1'b1; one_fault($sformatf("A%0d/0", i));
      a_sa1[i] = 1'b1; one_fault($sformatf("A%0d/1", i));
      b_sa0[i] = 1'b1; one_fault($sformatf("B%0d/0", i));
      b_sa1[i] = 1'b1; one_fault($sformatf("B%0d/1", i));
    end
    for (int r = 0; r < 40; r++) begin
      x_sa0 = rand_mask(); one_fault("multiple X/0");
      x_sa1 = rand_mask(); one_fault("multiple X/1");
    end
    // stuck cells inside shift registers A and B: the stuck value also
    // propagates along the register. The generator's own weight assertion is
    // switched off while its cells are faulty.
    $assertoff(0, u_tvg);
    for (int i = 0; i < int'(N); i++) begin
      ca_sa0[i] = 1'b1; one_fault($sformatf("cell A%0d/0", i));
      ca_sa1[i] = 1'b1; one_fault($sformatf("cell A%0d/1", i));
      cb_sa0[i] = 1'b1; one_fault($sformatf("cell B%0d/0", i));
      cb_sa1[i] = 1'b1; one_fault($sformatf("cell B%0d/1", i));
    end
    $asserton(0, u_tvg);
    begin
      bit f;
      run_period(f);
      checks++;
      if (f) begin failures++; $display("FAIL N=%0d K=%0d flagged after releasing cell faults", N, K); end
    end
    no_rise = 1; one_fault("stuck-open pull-up");
    no_fall = 1; one_fault("stuck-open pull-down");
    z1_sa0 = 1; one_fault("Z1/0");
    z1_sa1 = 1; one_fault("Z1/1");
    z0_sa0 = 1; one_fault("Z0/0");
    z0_sa1 = 1; one_fault("Z0/1");
    done = 1;
  end

endmodule
