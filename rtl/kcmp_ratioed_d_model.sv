// kcmp_ratioed_d_model: BEHAVIOURAL MODEL (not synthesizable) of module D,
// the ratioed transistor threshold circuit of the k-order comparator, with its
// two-inverter output buffer.
//
// Circuit: node V_out is pulled up by a single pmos t1 whose gate is tied to
// ground (always on) and pulled down by N parallel nmos q_1..q_N, q_i gated by
// x[i]. With lambda of the q_i on, the DC level of V_out is where the pmos
// current equals lambda times one nmos current. Following the original method's own
// analysis, t1 is taken to be saturated and the conducting q_i to be in their
// linear region over the band of interest, which gives
//
//   beta_p*(VDD+VTP)^2/2 = lambda*beta_n*((VDD-VTN)*V - V^2/2)
//   V_out = (VDD-VTN) - sqrt((VDD-VTN)^2 - beta_p*(VDD+VTP)^2/(lambda*beta_n))
//
// with beta = KP*W/L. When lambda = 0, or when the q_i cannot sink the pmos
// current even in saturation (negative discriminant), V_out is taken as VDD.
// The buffer is modelled as an ideal switch at VSW, a point inside the band
// [VIL_MAX, VIH_MIN] (VSW itself is this model's choice).
//
// Sizing rule: the circuit is a correct k-order comparator when V_out >=
// VIH_MIN with K-1 transistors on and V_out <= VIL_MAX with K on. With
// f(V) = (2*(VDD-VTN)*V - V^2)/(VDD+VTP)^2 this bounds the pmos/nmos
// aspect ratio W/L = (Wp/Wn)/(Lp/Ln):
//
//   (K-1)*(KPN/KPP)*f(VIH_MIN) <= W/L <= K*(KPN/KPP)*f(VIL_MAX)
//
// WL_MIN and WL_MAX hold these bounds; an initial check warns when the
// parameters fall outside them. The window is empty above
// K_MAX = f(VIH_MIN) / (f(VIH_MIN) - f(VIL_MAX)), about 6.1 with the default
// levels. Defaults are the 1.0 um CMOS process values
// and the area-optimised 2nd-order sizing (Wn = Ln = Lp = 1 um, Wp = 4 um).
//
// Interface: x (N bits) in; lt_k = buffered output (1 = fewer than K ones
// when correctly sized); vout = DC voltage of V_out; level_ok = 1 when V_out
// is outside the forbidden band (VIL_MAX, VIH_MIN); idd = static supply
// current in amperes, zero only when no q_i conducts (identical operands),
// otherwise the load current. vout, idd and level_ok follow x in zero time;
// lt_k follows after a fixed transport delay, D0_NS when it falls and D1_NS
// when it rises. The defaults, 3.67 ns and 2.42 ns, are the circuit-simulated
// delays of the default 2nd-order, W/L = 4 area-optimised sizing; the delays
// do not follow from the sizes inside the model and must be set together
// with them. Two changes closer together than |D0_NS - D1_NS| can reach the
// output out of order; the clock period of a design using the model must
// exceed both delays. The delay value is chosen at run time from the output
// direction, so the linter cannot rule out a zero delay and says so; it is
// zero only when D0_NS or D1_NS is set to zero.
`timescale 1ns / 1ps

module kcmp_ratioed_d_model #(
  parameter int unsigned N       = kcmp_pkg::DEFAULT_N,
  parameter int unsigned K       = kcmp_pkg::DEFAULT_K,
  parameter real         WN_UM   = 1.0,
  parameter real         LN_UM   = 1.0,
  parameter real         WP_UM   = 4.0,
  parameter real         LP_UM   = 1.0,
  parameter real         VDD     = 5.0,
  parameter real         VTN     = 0.7522,
  parameter real         VTP     = -0.8433,
  parameter real         KPN     = 1.207e-4,
  parameter real         KPP     = 3.434e-5,
  parameter real         VIL_MAX = 1.9,
  parameter real         VIH_MIN = 2.5,
  parameter real         VSW     = 2.2,
  parameter real         D0_NS   = 3.67,   // output fall delay (1 -> 0)
  parameter real         D1_NS   = 2.42    // output rise delay (0 -> 1)
) (
  input  logic [N-1:0] x,
  output logic         lt_k,
  output real          vout,
  output logic         level_ok,
  output real          idd
);

  localparam real BETA_N = KPN * WN_UM / LN_UM;
  localparam real BETA_P = KPP * WP_UM / LP_UM;
  localparam real VA     = VDD - VTN;          // nmos overdrive
  localparam real VB     = VDD + VTP;          // pmos overdrive
  localparam real F_IH   = (2.0 * VA * VIH_MIN - VIH_MIN * VIH_MIN) / (VB * VB);
  localparam real F_IL   = (2.0 * VA * VIL_MAX - VIL_MAX * VIL_MAX) / (VB * VB);
  localparam real WL     = (WP_UM / WN_UM) / (LP_UM / LN_UM);
  localparam real WL_MIN = real'(K - 1) * (KPN / KPP) * F_IH;
  localparam real WL_MAX = real'(K) * (KPN / KPP) * F_IL;
  // largest order for which the W/L window is not empty
  localparam real K_MAX  = F_IH / (F_IH - F_IL);

  int unsigned lambda;
  real         disc;
  logic        lt_now;    // buffer output in the DC steady state

  always_comb begin
    lambda = 0;
    for (int unsigned i = 0; i < N; i++)
      lambda += int'(x[i]);
    if (lambda == 0) begin
      disc = 0.0;
      vout = VDD;
      idd  = 0.0;
    end else begin
      disc = VA * VA - BETA_P * VB * VB / (real'(lambda) * BETA_N);
      vout = (disc < 0.0) ? VDD : VA - $sqrt(disc);
      idd  = (disc < 0.0) ? real'(lambda) * BETA_N * VA * VA / 2.0
                          : BETA_P * VB * VB / 2.0;
    end
    lt_now   = (vout > VSW);
    level_ok = (vout >= VIH_MIN) || (vout <= VIL_MAX);
  end

  // Output delay: transport delay D0_NS for a falling and D1_NS for a
  // rising output.
  initial lt_k = lt_now;
  always @(lt_now) lt_k <= #(lt_now ? D1_NS : D0_NS) lt_now;

  initial begin
    if (real'(K) > K_MAX)
      $warning("kcmp_ratioed_d_model: K = %0d exceeds the largest feasible order %f", K, K_MAX);
    if (WL < WL_MIN || WL > WL_MAX)
      $warning("kcmp_ratioed_d_model: W/L = %f outside [%f, %f] for K = %0d", WL, WL_MIN, WL_MAX, K);
  end

endmodule
