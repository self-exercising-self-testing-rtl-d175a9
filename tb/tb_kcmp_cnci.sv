// tb_kcmp_cnci: self-checking test of the code / non-code indicator.
// After reset q must be 0; with en high it must run 1, 0, 1, ... (one change
// per clock); with en low it must hold; q_n must always be its complement.
`timescale 1ns / 1ps

module tb_kcmp_cnci;
  logic clk = 0, rst_n = 0, en = 0;
  logic q, q_n;
  logic exp_q;
  int checks = 0, failures = 0;

  kcmp_cnci dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    exp_q = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      checks += 2;
      if (q !== exp_q) begin failures++; $display("FAIL t=%0d q=%b exp=%b", t, q, exp_q); end
      if (q_n !== ~q) failures++;
      en = (t < 40) ? 1'b1 : ($urandom_range(1, 0) == 1);
      @(posedge clk);
      if (en) exp_q = ~exp_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
