// kcmp_cnci: code / non-code indicator of the self-exercising comparator.
//
// During the test phase the comparator alternately receives a vector of weight
// K (expected output 0) and one of weight K-1 (expected output 1). The
// indicator is a single flip-flop that changes state with every vector, so q
// runs 0, 1, 0, 1, ... in step with the expected comparator output, and its
// inverted output q_n, taken as primary output Z0, is the complement of that
// output. A fault-free comparator thus keeps (Z0, Z1) double-rail encoded
// (Z0 != Z1) through the whole test phase. It shares no logic with the shift
// registers, so a fault in either shows up as a broken alternation.
//
// Interface: clk; rst_n, asynchronous active low, clears q; en, toggle enable
// (test phase); q, q_n. One toggle per enabled rising edge. The toggle
// flip-flop follows the original method; using q_n for Z0 and the reset value 0 are
// implementation choices.
`timescale 1ns / 1ps

module kcmp_cnci (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= 1'b0;
    else if (en)
      q <= ~q;
  end

  assign q_n = ~q;

endmodule
