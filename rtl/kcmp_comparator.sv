// kcmp_comparator: the k-order comparator.
//
// Decides whether operands a and b differ in fewer than K bit positions. A row
// of XOR gates forms the difference vector x = a ^ b; module D with its output
// buffer turns the weight of x into one bit, lt_k = 1 while fewer than K bits
// differ and 0 once K or more do. For K = 1 this is an equality comparator.
//
// ANALOG_D selects the realisation of module D: 0 (default) uses the
// synthesizable threshold logic kcmp_threshold; 1 uses the behavioural DC
// model of the sized transistor circuit, kcmp_ratioed_d_model, for simulation
// only; WP_UM/LP_UM size its pmos load and D0_NS/D1_NS set its output delays
// (defaults: the area-optimised 2nd-order sizing, W/L = 4, 3.67 / 2.42 ns; a
// 3rd-order comparator needs about W/L = 7, 3.59 / 1.9 ns). The
// structure (XOR row feeding D) follows the original method; the switch
// between the two realisations is an addition of this implementation.
//
// Interface: a, b (N bits) in; x (N bits) out, the XOR row output; lt_k out.
// Purely combinational.
`timescale 1ns / 1ps

module kcmp_comparator #(
  parameter int unsigned N        = kcmp_pkg::DEFAULT_N,
  parameter int unsigned K        = kcmp_pkg::DEFAULT_K,
  parameter bit          ANALOG_D = 1'b0,
  parameter real         WP_UM    = 4.0,   // pmos load size, used only by the model
  parameter real         LP_UM    = 1.0,
  parameter real         D0_NS    = 3.67,  // model output delays (fall, rise)
  parameter real         D1_NS    = 2.42
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] x,
  output logic         lt_k
);

  kcmp_xor_row #(.N(N)) u_xor (.a(a), .b(b), .x(x));

  if (ANALOG_D) begin : g_d_model
    real  vout, idd;
    logic level_ok;
    kcmp_ratioed_d_model #(.N(N), .K(K), .WP_UM(WP_UM), .LP_UM(LP_UM),
                         .D0_NS(D0_NS), .D1_NS(D1_NS)) u_d (
      .x(x), .lt_k(lt_k), .vout(vout), .level_ok(level_ok), .idd(idd));
  end else begin : g_d_logic
    kcmp_threshold #(.N(N), .K(K)) u_d (.x(x), .lt_k(lt_k));
  end

endmodule
