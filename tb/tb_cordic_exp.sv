// tb_cordic_exp: drives the CORDIC exponential with random exponents in the
// range the Hodgkin-Huxley rate functions use (-12..+6) and corner cases,
// compares with exp() within the K = 10 iteration bound (relative 2^-10)
// plus rounding, and checks the latency of 2K + |floor(x)| + 2 clocks.
module tb_cordic_exp;
  localparam int W = 22, F = 12, K = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] x, z;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_exp #(.W(W), .F(F), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real xr);
    int cyc, xi;
    real xq, expct, tol;
    x  = W'($rtoi(xr * 4096.0));
    xq = real'(x) / 4096.0;
    xi = $rtoi($floor(xq));
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expct = $exp(xq) * 4096.0;
    tol   = 2.0 + expct * 0.0015;
    checks++;
    if ((real'(z) - expct) > tol || (expct - real'(z)) > tol) begin
      failures++;
      $display("FAIL exp(%f): got %0d expected %f", xq, z, expct);
    end
    checks++;
    if (cyc != 2 * K + (xi < 0 ? -xi : xi) + 2) begin
      failures++;
      $display("FAIL exp latency %0d for x=%f", cyc, xq);
    end
  endtask

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0.0); run(1.0); run(-1.0); run(0.5); run(-0.999); run(2.3); run(-5.7); run(6.0);
    for (int i = 0; i < 200; i++)
      run((real'($urandom_range(0, 18000)) - 12000.0) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
