// tb_cordic_mul: drives the CORDIC multiplier with random operand pairs and
// fixed corner cases, compares each product with the real-valued product
// within the iteration error bound (2^-K |y| plus rounding), and checks the
// latency of 2(2K+1)+1 clocks from the edge that samples start.
module tb_cordic_mul;
  localparam int W = 22, F = 12, K = 14;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] x, y, z;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_mul #(.W(W), .F(F), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real xr, input real yr);
    int cyc;
    real expct, tol;
    x = W'($rtoi(xr * 4096.0));
    y = W'($rtoi(yr * 4096.0));
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expct = real'(x) * real'(y) / 4096.0;
    tol   = 3.0 + ((yr < 0 ? -yr : yr) * 4096.0) / 16384.0;
    checks++;
    if ((real'(z) - expct) > tol || (expct - real'(z)) > tol) begin
      failures++;
      $display("FAIL mul %f * %f: got %0d expected %f", xr, yr, z, expct);
    end
    checks++;
    if (cyc != 2 * (2 * K + 1) + 1) begin
      failures++;
      $display("FAIL mul latency %0d", cyc);
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0.0, 5.0); run(1.0, 1.0); run(-1.0, 1.0); run(0.317, 0.317);
    run(-120.5, 0.12); run(200.0, -2.5); run(0.5, -0.25);
    for (int i = 0; i < 200; i++) begin
      real a, b;
      a = (real'($urandom_range(0, 400000)) - 200000.0) / 1000.0;   // +-200
      b = (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0;       // +-2
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
