// tb_kcmp_selftest: fault-coverage workload of the self-exercising comparator.
// Runs the fault campaign of kcmp_selftest_harness for the characterised sizes
// N = 16 with K = 2 and K = 3, and for a small equality comparator (N = 8,
// K = 1). Each fault gets one full test period (4N vectors); every listed
// stuck-at fault must break the double-rail output pair at least once, and the
// fault-free circuit never.
`timescale 1ns / 1ps

module tb_kcmp_selftest;
  logic clk = 0, start = 0;
  logic done2, done3, done1;
  int c2, f2, d2, n2, c3, f3, d3, n3, c1, f1, d1, n1;
  int checks, failures;

  kcmp_selftest_harness #(.N(16), .K(2)) h2 (.clk(clk), .start(start), .done(done2),
    .checks(c2), .failures(f2), .detected(d2), .faults(n2));
  kcmp_selftest_harness #(.N(16), .K(3)) h3 (.clk(clk), .start(start), .done(done3),
    .checks(c3), .failures(f3), .detected(d3), .faults(n3));
  kcmp_selftest_harness #(.N(8),  .K(1)) h1 (.clk(clk), .start(start), .done(done1),
    .checks(c1), .failures(f1), .detected(d1), .faults(n1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    #22 start = 1;
    wait (done1 && done2 && done3);
    $display("N=16 K=2: %0d of %0d faults detected", d2, n2);
    $display("N=16 K=3: %0d of %0d faults detected", d3, n3);
    $display("N=8  K=1: %0d of %0d faults detected", d1, n1);
    checks = c1 + c2 + c3;
    failures = f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
