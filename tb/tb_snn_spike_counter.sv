// tb_snn_spike_counter: random increments and occasional synchronous clears
// against a reference count modulo 32; runs long enough to wrap.
module tb_snn_spike_counter;
  logic clk = 1'b0, rst_n = 1'b0, srst = 1'b0, inc = 1'b0;
  logic [4:0] count;
  int checks = 0, failures = 0;

  snn_spike_counter #(.CW(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_c;
    ref_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      inc  = ($urandom_range(0, 2) != 0);
      srst = ($urandom_range(0, 199) == 0);
      @(negedge clk);
      if (srst) ref_c = 0;
      else if (inc) ref_c = (ref_c + 1) % 32;
      checks++;
      if (int'(count) != ref_c) begin
        failures++;
        if (failures < 5) $display("FAIL: count %0d expected %0d", count, ref_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
