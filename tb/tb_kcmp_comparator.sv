// tb_kcmp_comparator: self-checking test of the k-order comparator.
// Four instances: K = 2 and K = 3, each with the logic realisation of module D
// and with the transistor-level model (W/L = 4 for K = 2, 7 for K = 3). Random
// operand pairs with every Hamming distance 0..16 are applied, 5 ns apart so
// the model's output delays (below 4 ns) have passed; lt_k must be 1
// exactly when the distance is below K and x must be the per-bit difference.
`timescale 1ns / 1ps

module tb_kcmp_comparator;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, x2, x3, x2m, x3m;
  logic lt2, lt3, lt2m, lt3m;
  int checks = 0, failures = 0;

  kcmp_comparator                                                   d2  (.a(a), .b(b), .x(x2),  .lt_k(lt2));
  kcmp_comparator #(.N(N), .K(3))                                   d3  (.a(a), .b(b), .x(x3),  .lt_k(lt3));
  kcmp_comparator #(.N(N), .K(2), .ANALOG_D(1'b1))                  d2m (.a(a), .b(b), .x(x2m), .lt_k(lt2m));
  kcmp_comparator #(.N(N), .K(3), .ANALOG_D(1'b1), .WP_UM(7.0), .D0_NS(3.59), .D1_NS(1.9)) d3m (.a(a), .b(b), .x(x3m), .lt_k(lt3m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 30; rep++)
      for (int d = 0; d <= int'(N); d++) begin
        logic [N-1:0] flip;
        flip = '0;
        while ($countones(flip) < d) flip[$urandom_range(N - 1, 0)] = 1'b1;
        a = N'($urandom);
        b = a;
        for (int i = 0; i < int'(N); i++) if (flip[i]) b[i] = ~a[i];
        #5;
        checks += 5;
        if (lt2  !== (d < 2)) begin failures++; $display("FAIL K=2 d=%0d", d); end
        if (lt3  !== (d < 3)) begin failures++; $display("FAIL K=3 d=%0d", d); end
        if (lt2m !== (d < 2)) begin failures++; $display("FAIL K=2 model d=%0d", d); end
        if (lt3m !== (d < 3)) begin failures++; $display("FAIL K=3 model d=%0d", d); end
        if (x2 !== flip || x3 !== flip || x2m !== flip || x3m !== flip) begin
          failures++; $display("FAIL x d=%0d", d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
