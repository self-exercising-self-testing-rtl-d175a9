// tb_kcmp_johnson_sr: self-checking test of the twisted-ring shift register.
// A 16-bit register reset to zero is shifted through three full periods with
// random gaps in the shift enable; after t shifts its state must equal the
// closed form J(t): cells [0, t) set for t <= N, cells [t-N, N) set for
// N < t < 2N. A second register with a non-zero reset value checks INIT and
// the period of 2N shifts.
`timescale 1ns / 1ps

module tb_kcmp_johnson_sr;
  localparam int unsigned N = 16;
  localparam logic [N-1:0] INIT2 = 16'h0007;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [N-1:0] q, q2;
  int checks = 0, failures = 0;

  kcmp_johnson_sr                          dut  (.clk(clk), .rst_n(rst_n), .shift(shift), .q(q));
  kcmp_johnson_sr #(.N(N), .INIT(INIT2))   dut2 (.clk(clk), .rst_n(rst_n), .shift(shift), .q(q2));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] jstate(int t);
    logic [N-1:0] v;
    t = t % (2 * N);
    for (int i = 0; i < int'(N); i++)
      v[i] = (t <= int'(N)) ? (i < t) : (i >= t - int'(N));
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int shifts = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks += 2;
    if (q !== '0) failures++;
    if (q2 !== INIT2) failures++;
    while (shifts < 6 * int'(N)) begin
      shift = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (shift) shifts++;
      @(negedge clk);
      checks++;
      if (q !== jstate(shifts)) begin
        failures++;
        $display("FAIL after %0d shifts q=%b exp=%b", shifts, q, jstate(shifts));
      end
      if (shifts % (2 * N) == 0) begin
        checks++;
        if (q2 !== INIT2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
