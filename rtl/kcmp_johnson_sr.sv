// kcmp_johnson_sr: n-bit twisted-ring shift register of the test vector
// generator.
//
// On every enabled clock edge the contents move one cell towards the high
// index and the first cell (bit 0, the leftmost and least significant cell)
// loads the inverted value of the last cell. Starting from any state the
// register returns to it after 2N shifts, and two such registers whose states
// are s steps apart (s <= N) always differ in exactly s cells.
//
// Interface: clk; rst_n, asynchronous active low, loads INIT; shift, shift
// enable; q, the N cells. One shift per enabled rising edge. The inverting
// feedback and the initial states come from the original method; the asynchronous reset
// and the shift enable are implementation choices.
`timescale 1ns / 1ps

module kcmp_johnson_sr #(
  parameter int unsigned   N    = kcmp_pkg::DEFAULT_N,
  parameter logic [N-1:0]  INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= INIT;
    else if (shift)
      q <= {q[N-2:0], ~q[N-1]};
  end

endmodule
