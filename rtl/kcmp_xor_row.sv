// kcmp_xor_row: the comparing stage of a k-order comparator.
//
// A row of N two-input XOR gates. Output bit x[i] is 1 exactly where the two
// operands differ, so the Hamming weight of x is the Hamming distance of the
// operands. Each x[i] drives the gate of one pull-down transistor of the
// threshold stage (module D). During the test phase every gate sees all four
// input combinations, so the row is tested exhaustively.
//
// Interface: a, b (N bits) in; x (N bits) out. Purely combinational.
// The structure follows the original method; N defaults to the 16-bit operands the
// design is characterised at.
`timescale 1ns / 1ps

module kcmp_xor_row #(
  parameter int unsigned N = kcmp_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      x[i] = a[i] ^ b[i];
  end

endmodule
