// tb_kcmp_ratioed_d_model: self-checking test of the DC model of module D.
// Instances use the transistor sizes of the characterised 16-input designs:
// 2nd order, area optimised (Wn = Ln = 1 um, W/L 3.5, 4, 4.5, 5) and delay
// optimised (Wn = 4 um, Wp = 13..20 um); 3rd order, area optimised (W/L 6.5,
// 7, 7.5) and delay optimised (Wp = 25..31 um). For every number lambda of
// conducting inputs, 0..16, each must output 1 exactly while lambda < K, with
// V_out >= 2.5 V at lambda = K-1 and <= 1.9 V at lambda = K. The V_out of the
// K = 2, W/L = 4 instance at lambda = 2 is compared with a hand-worked value
// (1.382 V). An instance sized below the lower W/L bound (W/L = 2.5 for K = 2)
// must fail the high-level condition at lambda = 1. Orders 1, 4, 5 and 6
// (the largest order these noise margins allow) are sized at the middle of
// their W/L window and must work; order 7 has no window and must miss one of
// the two levels. The static supply current of the W/L = 4 instance must be
// zero for identical inputs and about 1.19 mA once bits differ. Every sized
// 2nd- and 3rd-order instance carries its circuit-simulated output delays
// (fall D0, rise D1); the output must change exactly that long after a step
// from weight 0 to K and from K to K-1. The delay-optimised
// 3rd-order point Wp = 31 um (W/L = 7.75) lies just above the analytic upper
// bound (7.641): its low level at lambda = 3 is expected between 1.9 V and the
// 2.2 V switch point, i.e. logically right but without the full noise margin.
`timescale 1ns / 1ps

module tb_kcmp_ratioed_d_model;
  localparam int unsigned N = 16;
  localparam int NI = 21;   // sized instances under test

  logic [N-1:0] x;
  logic [NI-1:0] lt, ok;
  real v [NI];
  real d0 [NI], d1 [NI], tchg [NI];
  real i1;
  int  kk [NI];
  logic lt_bad, ok_bad;
  real  v_bad;
  int checks = 0, failures = 0;

`define KCMP_D(IDX, KV, WN, WP, LP, DF, DR) \
  kcmp_ratioed_d_model #(.N(N), .K(KV), .WN_UM(WN), .WP_UM(WP), .LP_UM(LP), \
                         .D0_NS(DF), .D1_NS(DR)) u``IDX ( \
    .x(x), .lt_k(lt[IDX]), .vout(v[IDX]), .level_ok(ok[IDX]), .idd()); \
  initial begin kk[IDX] = KV; d0[IDX] = DF; d1[IDX] = DR; end

  // 2nd order, area optimised
  `KCMP_D(0,  2, 1.0,  7.0, 2.0, 3.35, 2.68)
  kcmp_ratioed_d_model #(.N(N), .K(2), .WP_UM(4.0)) u1 (
    .x(x), .lt_k(lt[1]), .vout(v[1]), .level_ok(ok[1]), .idd(i1));
  initial begin kk[1] = 2; d0[1] = 3.67; d1[1] = 2.42; end

  // time of the first output change of each instance after t0, found by
  // polling every 10 ps for 20 ns
  task automatic watch(real t0);
    logic [NI-1:0] prev, seen;
    prev = lt;
    seen = '0;
    for (int i = 0; i < NI; i++) tchg[i] = t0 - 1.0;
    for (int s = 0; s < 2000; s++) begin
      #0.01;
      for (int i = 0; i < NI; i++)
        if (!seen[i] && lt[i] !== prev[i]) begin
          seen[i] = 1'b1;
          tchg[i] = $realtime;
        end
    end
  endtask
  `KCMP_D(2,  2, 1.0,  9.0, 2.0, 4.14, 2.37)
  `KCMP_D(3,  2, 1.0,  5.0, 1.0, 5.13, 2.24)
  // 2nd order, delay optimised
  `KCMP_D(4,  2, 4.0, 13.0, 1.0, 2.09, 1.78)
  `KCMP_D(5,  2, 4.0, 14.0, 1.0, 2.16, 1.73)
  `KCMP_D(6,  2, 4.0, 16.0, 1.0, 2.35, 1.67)
  `KCMP_D(7,  2, 4.0, 18.0, 1.0, 2.60, 1.61)
  `KCMP_D(8,  2, 4.0, 20.0, 1.0, 3.12, 1.57)
  // 3rd order, area optimised
  `KCMP_D(9,  3, 1.0, 13.0, 2.0, 3.23, 2.03)
  `KCMP_D(10, 3, 1.0,  7.0, 1.0, 3.59, 1.90)
  `KCMP_D(11, 3, 1.0, 15.0, 2.0, 3.94, 1.91)
  // 3rd order, delay optimised
  `KCMP_D(12, 3, 4.0, 25.0, 1.0, 2.16, 1.51)
  `KCMP_D(13, 3, 4.0, 27.0, 1.0, 2.38, 1.48)
  `KCMP_D(14, 3, 4.0, 28.0, 1.0, 2.44, 1.47)
  `KCMP_D(15, 3, 4.0, 30.0, 1.0, 2.83, 1.46)
  `KCMP_D(16, 3, 4.0, 31.0, 1.0, 2.95, 1.44)
  // orders 1, 4, 5, 6: W/L at the middle of the analytic window, no delays
  `KCMP_D(17, 1, 1.0,  1.275, 1.0, 0.0, 0.0)
  `KCMP_D(18, 4, 1.0,  9.672, 1.0, 0.0, 0.0)
  `KCMP_D(19, 5, 1.0, 12.472, 1.0, 0.0, 0.0)
  `KCMP_D(20, 6, 1.0, 15.271, 1.0, 0.0, 0.0)

`undef KCMP_D

  // order 7 has an empty window (lower bound 18.295 > upper bound 17.845):
  // no W/L can meet both levels
  logic lt7, ok7;
  real  v7;
  kcmp_ratioed_d_model #(.N(N), .K(7), .WP_UM(18.07)) u_k7 (
    .x(x), .lt_k(lt7), .vout(v7), .level_ok(ok7), .idd());
  bit k7_violation = 0;

  // deliberately undersized pmos load: W/L = 2.5 < 3.046 for K = 2
  kcmp_ratioed_d_model #(.N(N), .K(2), .WP_UM(2.5)) u_bad (
    .x(x), .lt_k(lt_bad), .vout(v_bad), .level_ok(ok_bad), .idd());

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lam = 0; lam <= int'(N); lam++) begin
      for (int rep = 0; rep < 4; rep++) begin
        // lam ones at random positions
        x = '0;
        while ($countones(x) < lam) x[$urandom_range(N - 1, 0)] = 1'b1;
        #10;
        for (int i = 0; i < NI; i++) begin
          checks += 2;
          if (lt[i] !== (lam < kk[i])) begin
            failures++; $display("FAIL inst %0d lambda=%0d lt=%b v=%f", i, lam, lt[i], v[i]);
          end
          if (!ok[i] && !(i == 16 && lam == kk[i])) begin
            failures++; $display("FAIL inst %0d lambda=%0d vout %f in forbidden band", i, lam, v[i]);
          end
          if (lam == kk[i] - 1) begin
            checks++;
            if (v[i] < 2.5) begin failures++; $display("FAIL inst %0d V_out=%f < 2.5 at K-1", i, v[i]); end
          end
          if (lam == kk[i] && i == 16) begin
            // W/L = 7.75 lies above the analytic upper bound 7.641 for K = 3:
            // the low level misses VIL_MAX but still falls below the switch point
            checks++;
            if (!(v[i] > 1.9 && v[i] < 2.2)) begin failures++; $display("FAIL inst 16 V_out=%f", v[i]); end
          end else if (lam == kk[i]) begin
            checks++;
            if (v[i] > 1.9) begin failures++; $display("FAIL inst %0d V_out=%f > 1.9 at K", i, v[i]); end
          end
        end
        // static current: none for identical operands, the pmos load
        // current (about 1.19 mA for W/L = 4) as soon as one bit differs
        checks++;
        if (lam == 0) begin
          checks++;
          if (v[1] != 5.0) failures++;
          if (i1 != 0.0) begin failures++; $display("FAIL idd=%e with no bit differing", i1); end
        end else if (lam >= 2 && (i1 < 1.18e-3 || i1 > 1.20e-3)) begin
          failures++; $display("FAIL idd=%e at lambda=%0d", i1, lam);
        end else if (lam == 1 && !(i1 > 0.0)) begin
          failures++; $display("FAIL idd=%e at lambda=1", i1);
        end
        if (lam == 2) begin
          checks++;
          if (v[1] < 1.372 || v[1] > 1.392) begin
            failures++; $display("FAIL V_out(K=2, W/L=4, lambda=2) = %f, expected 1.382", v[1]);
          end
        end
        if ((lam == 6 && v7 < 2.5) || (lam == 7 && v7 > 1.9)) k7_violation = 1;
        if (lam == 1) begin
          checks++;
          if (v_bad >= 2.5) begin
            failures++; $display("FAIL undersized load should not hold 2.5 V, V_out=%f", v_bad);
          end
        end
      end
    end
    // output delays: weight 0 -> K must fall after D0, K -> K-1 rise after D1
    for (int kv = 2; kv <= 3; kv++) begin
      real t0;
      x = '0;
      #20;
      for (int i = 0; i < kv; i++) x[i] = 1'b1;
      t0 = $realtime;
      watch(t0);
      for (int i = 0; i < NI; i++)
        if (kk[i] == kv) begin
          checks++;
          if (lt[i] !== 1'b0 || tchg[i] - t0 < d0[i] - 0.002 || tchg[i] - t0 > d0[i] + 0.012) begin
            failures++; $display("FAIL inst %0d fall after %f ns, expected %f", i, tchg[i] - t0, d0[i]);
          end
        end
      x[0] = 1'b0;
      t0 = $realtime;
      watch(t0);
      for (int i = 0; i < NI; i++)
        if (kk[i] == kv) begin
          checks++;
          if (lt[i] !== 1'b1 || tchg[i] - t0 < d1[i] - 0.002 || tchg[i] - t0 > d1[i] + 0.012) begin
            failures++; $display("FAIL inst %0d rise after %f ns, expected %f", i, tchg[i] - t0, d1[i]);
          end
        end
    end
    checks++;
    if (!k7_violation) begin failures++; $display("FAIL K=7 sizing met both levels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
