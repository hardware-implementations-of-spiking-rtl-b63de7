// tb_snn_weight_rom: reads rows of the weight ROM at random and checks that
// the row arrives one clock after the read request, together with a
// one-cycle weight_en, and that weight_en stays low without a request.
// The expected contents are recomputed from the stand-in weight formula.
module tb_snn_weight_rom;
  logic clk = 1'b0, rst_n = 1'b0, re = 1'b0;
  logic [9:0] addr;
  logic signed [7:0] w [10];
  logic weight_en;
  int checks = 0, failures = 0;

  snn_weight_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      re = ($urandom_range(0, 1) == 1);
      k = $urandom_range(0, 186);
      addr = 10'(k);
      @(negedge clk);
      checks++;
      if (weight_en != re) begin failures++; $display("FAIL weight_en"); end
      if (re) begin
        for (int o = 0; o < 10; o++) begin
          checks++;
          if (w[o] != snn_pkg::snn_weight(k, o)) begin
            failures++;
            if (failures < 5) $display("FAIL row %0d col %0d: %0d", k, o, w[o]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
