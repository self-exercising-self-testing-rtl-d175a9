// tb_kcmp_xor_row: self-checking test of the XOR row.
// Drives random and corner operand pairs into a 16-bit row and checks every
// output bit against a per-bit reference (1 exactly where the operands
// differ), plus the number of differing positions against a separately
// counted Hamming distance.
`timescale 1ns / 1ps

module tb_kcmp_xor_row;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, x;
  int checks = 0, failures = 0;

  kcmp_xor_row #(.N(N)) dut (.a(a), .b(b), .x(x));

  task automatic check_vec();
    int hd;
    #1;
    hd = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (x[i] !== (a[i] != b[i])) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h x=%h", i, a, b, x);
      end
      if (a[i] != b[i]) hd++;
    end
    checks++;
    if ($countones(x) != hd) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; check_vec();
    a = '1; b = '0; check_vec();
    a = '0; b = '1; check_vec();
    a = '1; b = '1; check_vec();
    for (int t = 0; t < 500; t++) begin
      a = N'($urandom);
      b = N'($urandom);
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
