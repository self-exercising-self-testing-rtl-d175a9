// tb_kcmp_tvg: self-checking test of the test vector generator (N=16, K=2,
// plus an N=8, K=3 instance).
// After m enabled cycles, B must have shifted ceil(m/2) times and A floor(m/2)
// times, so a = J(K + floor(m/2)) and b = J(ceil(m/2)), J(t) being the closed
// form of a twisted-ring register after t shifts from zero. The weight of a^b
// must alternate K, K-1, K, ...; both generators must be back at their reset
// state after exactly 4N vectors and not earlier; en low must hold the state.
// Coverage claims of the test set are checked too: every XOR input pair
// (a_i, b_i) takes all four values, and every line X_i is 1 in some weight-K
// vector and 0 in some weight-(K-1) vector.
`timescale 1ns / 1ps

module tb_kcmp_tvg;
  localparam int unsigned N = 16;
  localparam int unsigned K = 2;
  localparam int unsigned N2 = 8;
  localparam int unsigned K2 = 3;

  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] a, b;
  logic [N2-1:0] a2, b2;
  logic sa, sb, sa2, sb2;
  int checks = 0, failures = 0;

  kcmp_tvg                     dut  (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .shift_a(sa), .shift_b(sb));
  kcmp_tvg #(.N(N2), .K(K2))   dut2 (.clk(clk), .rst_n(rst_n), .en(en), .a(a2), .b(b2), .shift_a(sa2), .shift_b(sb2));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] jstate(int t, int n);
    logic [N-1:0] v = '0;
    t = t % (2 * n);
    for (int i = 0; i < n; i++)
      v[i] = (t <= n) ? (i < t) : (i >= t - n);
    return v;
  endfunction

  logic [N-1:0] seen_k_one, seen_km1_zero;
  logic [3:0]   seen_pair [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m = 0;
    logic [N-1:0] a0, b0;
    logic [N2-1:0] a20, b20;
    seen_k_one = '0; seen_km1_zero = '0;
    for (int i = 0; i < int'(N); i++) seen_pair[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    a0 = a; b0 = b; a20 = a2; b20 = b2;
    while (m < 3 * 4 * int'(N)) begin
      int w, w2;
      // state after m vectors
      checks += 4;
      if (a !== jstate(int'(K) + m / 2, N)) begin failures++; $display("FAIL a m=%0d a=%b", m, a); end
      if (b !== jstate((m + 1) / 2, N))     begin failures++; $display("FAIL b m=%0d b=%b", m, b); end
      if (a2 !== N2'(jstate(int'(K2) + m / 2, N2))) begin failures++; $display("FAIL a2 m=%0d", m); end
      if (b2 !== N2'(jstate((m + 1) / 2, N2)))      failures++;
      w = $countones(a ^ b);
      w2 = $countones(a2 ^ b2);
      checks += 2;
      if (w != ((m % 2 == 0) ? int'(K) : int'(K) - 1)) begin failures++; $display("FAIL weight m=%0d w=%0d", m, w); end
      if (w2 != ((m % 2 == 0) ? int'(K2) : int'(K2) - 1)) begin failures++; $display("FAIL w2 m=%0d", m); end
      // return to the start exactly every 4N vectors (first generator)
      if (m > 0) begin
        checks++;
        if (((a == a0) && (b == b0)) != (m % (4 * int'(N)) == 0)) begin
          failures++; $display("FAIL period m=%0d", m);
        end
      end
      for (int i = 0; i < int'(N); i++) begin
        seen_pair[i][{a[i], b[i]}] = 1'b1;
        if (w == int'(K) && (a[i] ^ b[i]))        seen_k_one[i] = 1'b1;
        if (w == int'(K) - 1 && !(a[i] ^ b[i]))   seen_km1_zero[i] = 1'b1;
      end
      // advance, sometimes with idle cycles in between
      en = ($urandom_range(4, 0) != 0);
      #1;
      checks++;
      if (sb !== (en && (m % 2 == 0)) || sa !== (en && (m % 2 == 1))) failures++;
      @(posedge clk);
      if (en) m++;
      @(negedge clk);
    end
    en = 0;
    for (int i = 0; i < int'(N); i++) begin
      checks += 3;
      if (seen_pair[i] != 4'hF) begin failures++; $display("FAIL xor %0d not exhaustive", i); end
      if (!seen_k_one[i])       begin failures++; $display("FAIL X%0d never 1 at weight K", i); end
      if (!seen_km1_zero[i])    begin failures++; $display("FAIL X%0d never 0 at weight K-1", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
