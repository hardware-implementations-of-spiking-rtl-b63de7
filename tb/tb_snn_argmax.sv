// tb_snn_argmax: random sets of ten 5-bit counts (many with ties) against a
// linear search for the first largest value.
module tb_snn_argmax;
  logic [4:0] counts [10];
  logic [3:0] idx;
  logic [4:0] max_count;
  int checks = 0, failures = 0;

  snn_argmax #(.N(10), .CW(5)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best, bi;
      for (int i = 0; i < 10; i++)
        counts[i] = 5'((t % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 31));
      #1;
      best = -1; bi = 0;
      for (int i = 0; i < 10; i++)
        if (int'(counts[i]) > best) begin best = counts[i]; bi = i; end
      checks++;
      if (int'(idx) != bi || int'(max_count) != best) begin
        failures++;
        if (failures < 5) $display("FAIL: idx %0d expected %0d", idx, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
