// tb_cordic_div: drives the CORDIC divider with random operands of all sign
// combinations, compares the quotient with the real-valued quotient within
// the 2^-K error bound of K = 8 iterations, and checks the latency of
// 2(2K+1)+1 clocks from the edge that samples start.
module tb_cordic_div;
  localparam int W = 22, F = 12, K = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] x, y, z;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_div #(.W(W), .F(F), .K(K)) dut (.*);
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
    expct = real'(x) / real'(y) * 4096.0;
    tol   = 4096.0 / 256.0 + 2.0;
    checks++;
    if ((real'(z) - expct) > tol || (expct - real'(z)) > tol) begin
      failures++;
      $display("FAIL div %f / %f: got %0d expected %f", xr, yr, z, expct);
    end
    checks++;
    if (cyc != 2 * (2 * K + 1) + 1) begin
      failures++;
      $display("FAIL div latency %0d", cyc);
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1.0, 2.0); run(-0.1, -1.718); run(3.0, -1.5); run(-7.0, 0.25); run(0.0, 3.0);
    for (int i = 0; i < 200; i++) begin
      real a, b;
      a = (real'($urandom_range(0, 20000)) - 10000.0) / 1000.0;    // +-10
      b = real'($urandom_range(100, 10000)) / 1000.0;              // 0.1..10
      if ($urandom_range(0, 1) == 1) b = -b;
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
