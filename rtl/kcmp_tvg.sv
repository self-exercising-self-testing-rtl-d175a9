// kcmp_tvg: test vector generator of the self-exercising k-order comparator.
//
// Two N-bit twisted-ring shift registers: B starts all zero, A starts with K
// ones in its leftmost cells and N-K zeros, i.e. A is K shift steps ahead of B
// and A ^ B has Hamming weight K. The registers are never shifted together:
// a phase bit alternates between shifting B (distance drops to K-1) and
// shifting A (distance back to K). The XOR row therefore sees, vector after
// vector, weight K, K-1, K, K-1, ... and every cell position takes part in
// both kinds of vector. After 4N vectors (2N shifts of each register) the
// generator is back in its initial state.
//
// Each register advances on every other vector, i.e. at half the vector rate,
// as the original method prescribes. Here a single clock runs at the vector rate and
// the phase bit gates the two shift enables; in the original method the registers have
// clocks of twice the flip-flop's period. This single-clock form is an
// implementation choice.
//
// Interface: clk; rst_n, asynchronous active low; en, advance one vector per
// clock (test phase). Outputs a, b (register states, valid from the clock
// edge), shift_a/shift_b (which register moves at the next edge).
// A concurrent assertion checks the weight alternation on every clock; it
// uses rst_n in its disable condition, which the linter reports as a reset
// used both asynchronously and synchronously. That use is in the assertion
// only, not in the logic.
`timescale 1ns / 1ps

module kcmp_tvg
  import kcmp_pkg::*;
#(
  parameter int unsigned N = kcmp_pkg::DEFAULT_N,
  parameter int unsigned K = kcmp_pkg::DEFAULT_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         shift_a,
  output logic         shift_b
);

  function automatic logic [N-1:0] first_ones(input int unsigned cnt);
    logic [N-1:0] v;
    v = '0;
    for (int unsigned i = 0; i < N; i++)
      v[i] = (i < cnt);
    return v;
  endfunction

  localparam logic [N-1:0] INIT_A = first_ones(K);

  tvg_phase_e phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      phase <= PH_SHIFT_B;
    else if (en)
      phase <= (phase == PH_SHIFT_B) ? PH_SHIFT_A : PH_SHIFT_B;
  end

  assign shift_b = en && (phase == PH_SHIFT_B);
  assign shift_a = en && (phase == PH_SHIFT_A);

  kcmp_johnson_sr #(.N(N), .INIT(INIT_A)) u_sr_a (.clk(clk), .rst_n(rst_n), .shift(shift_a), .q(a));
  kcmp_johnson_sr #(.N(N), .INIT('0))     u_sr_b (.clk(clk), .rst_n(rst_n), .shift(shift_b), .q(b));

  // The defining property of the generator: in phase PH_SHIFT_B the presented
  // pair is K shift steps apart (weight K), in phase PH_SHIFT_A K-1 steps.
  a_weight_alternates: assert property (
    @(posedge clk) disable iff (!rst_n)
      $countones(a ^ b) == ((phase == PH_SHIFT_B) ? int'(K) : int'(K) - 1))
    else $error("kcmp_tvg: weight of a^b is %0d in phase %s", $countones(a ^ b), phase.name());

  initial begin
    assert (K >= 1 && K <= N) else $error("kcmp_tvg: K must be in [1, N]");
  end

endmodule
