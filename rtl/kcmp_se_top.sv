// kcmp_se_top: self-exercising, self-testing k-order comparator.
//
// Normal operation (test_en = 0): the k-order comparator compares the
// functional operands op_a and op_b and drives match = z1 = 1 when they
// differ in fewer than K bit positions.
//
// Test phase (test_en = 1): input multiplexers replace the operands by the
// two shift registers of the test vector generator, whose XOR alternates
// between Hamming weight K (expected z1 = 0) and K-1 (expected z1 = 1), one
// vector per clock. The code / non-code indicator flip-flop toggles with every
// vector and its inverted output drives z0, so a fault-free circuit keeps
// (z0, z1) double-rail encoded, z0 != z1, on every test-phase cycle. Stuck-at
// faults on the XOR outputs or on the output of D, and faults in the
// generator or the indicator, make z0 == z1 on some vector of the 4N-vector
// period. Generator and indicator hold their state while test_en = 0, so test
// and normal cycles can be interleaved freely.
//
// Interface: clk, rst_n (asynchronous, active low), test_en, op_a, op_b in;
// match, z0, z1 out; tvg_a, tvg_b give the generator state for observation.
// Comparator path is combinational from the operand inputs (or the generator
// registers) to z1; z0 comes straight from a flip-flop.
//
// The structure (generator, multiplexers, comparator, indicator, outputs Z0
// and Z1) follows the original method. The single vector-rate clock, the reset and the
// mode input are implementation choices. ANALOG_D = 1 swaps module D for its
// behavioural transistor-level model (simulation only); WP_UM, LP_UM, D0_NS
// and D1_NS are then its pmos size and output delays, and the clock period
// must exceed both delays.
`timescale 1ns / 1ps

module kcmp_se_top #(
  parameter int unsigned N        = kcmp_pkg::DEFAULT_N,
  parameter int unsigned K        = kcmp_pkg::DEFAULT_K,
  parameter bit          ANALOG_D = 1'b0,
  parameter real         WP_UM    = 4.0,
  parameter real         LP_UM    = 1.0,
  parameter real         D0_NS    = 3.67,
  parameter real         D1_NS    = 2.42
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_en,
  input  logic [N-1:0] op_a,
  input  logic [N-1:0] op_b,
  output logic         match,
  output logic         z0,
  output logic         z1,
  output logic [N-1:0] tvg_a,
  output logic [N-1:0] tvg_b
);

  logic [N-1:0] cmp_a, cmp_b, x;
  logic         shift_a, shift_b;
  logic         cnci_q;

  kcmp_tvg #(.N(N), .K(K)) u_tvg (
    .clk(clk), .rst_n(rst_n), .en(test_en),
    .a(tvg_a), .b(tvg_b), .shift_a(shift_a), .shift_b(shift_b));

  always_comb begin
    cmp_a = test_en ? tvg_a : op_a;
    cmp_b = test_en ? tvg_b : op_b;
  end

  kcmp_comparator #(.N(N), .K(K), .ANALOG_D(ANALOG_D), .WP_UM(WP_UM), .LP_UM(LP_UM),
                    .D0_NS(D0_NS), .D1_NS(D1_NS)) u_cmp (
    .a(cmp_a), .b(cmp_b), .x(x), .lt_k(z1));

  kcmp_cnci u_cnci (.clk(clk), .rst_n(rst_n), .en(test_en), .q(cnci_q), .q_n(z0));

  assign match = z1;

endmodule
