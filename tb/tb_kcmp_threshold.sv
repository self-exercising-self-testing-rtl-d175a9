// tb_kcmp_threshold: self-checking test of the threshold function of module D.
// Three instances (K = 1, 2, 3, N = 16) receive vectors of every Hamming
// weight 0..N with the ones at random positions; the expected output is
// 1 for weight < K, computed by counting the ones in the testbench.
`timescale 1ns / 1ps

module tb_kcmp_threshold;
  localparam int unsigned N = 16;
  logic [N-1:0] x;
  logic lt1, lt2, lt3;
  int checks = 0, failures = 0;

  kcmp_threshold #(.N(N), .K(1)) dut1 (.x(x), .lt_k(lt1));
  kcmp_threshold                 dut2 (.x(x), .lt_k(lt2));
  kcmp_threshold #(.N(N), .K(3)) dut3 (.x(x), .lt_k(lt3));

  function automatic logic [N-1:0] rand_weight(int w);
    logic [N-1:0] v = '0;
    int placed = 0;
    while (placed < w) begin
      int p = int'($urandom_range(N - 1, 0));
      if (!v[p]) begin v[p] = 1'b1; placed++; end
    end
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++)
      for (int w = 0; w <= int'(N); w++) begin
        int cnt;
        x = rand_weight(w);
        #1;
        cnt = 0;
        for (int i = 0; i < int'(N); i++) cnt += int'(x[i]);
        checks += 3;
        if (lt1 !== (cnt < 1)) begin failures++; $display("FAIL K=1 x=%h lt=%b", x, lt1); end
        if (lt2 !== (cnt < 2)) begin failures++; $display("FAIL K=2 x=%h lt=%b", x, lt2); end
        if (lt3 !== (cnt < 3)) begin failures++; $display("FAIL K=3 x=%h lt=%b", x, lt3); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
