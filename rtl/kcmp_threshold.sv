// kcmp_threshold: logic function of module D and its output buffer.
//
// In silicon, module D is a ratioed circuit: one always-conducting pmos load
// t1 pulls node V_out up, and N parallel nmos transistors q_1..q_N, gated by
// the XOR outputs, pull it down. The transistor sizes are chosen so that V_out
// stays above the buffer's high input level while at most K-1 of the q_i
// conduct, and drops below its low input level once K of them conduct. The
// two-inverter buffer restores a full logic level. The logic it realises is
// therefore the threshold function
//
//     lt_k = (number of ones in x) < K
//
// This module gives that function as synthesizable logic: a count of the ones
// in x, saturated at K so the counter needs only clog2(K+1) bits, compared
// with K. The saturating count is an implementation choice of digital
// implementation; the transistor-level behaviour is modelled separately in
// kcmp_ratioed_d_model.
//
// Interface: x (N bits) in; lt_k out (1 = fewer than K ones). Combinational.
`timescale 1ns / 1ps

module kcmp_threshold #(
  parameter int unsigned N = kcmp_pkg::DEFAULT_N,
  parameter int unsigned K = kcmp_pkg::DEFAULT_K
) (
  input  logic [N-1:0] x,
  output logic         lt_k
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [CW-1:0] cnt;

  always_comb begin
    cnt = '0;
    for (int unsigned i = 0; i < N; i++)
      if (x[i] && (cnt != CW'(K)))
        cnt = cnt + 1'b1;
    lt_k = (cnt != CW'(K));
  end

  initial begin
    assert (K >= 1 && K <= N) else $error("kcmp_threshold: K must be in [1, N]");
  end

endmodule
