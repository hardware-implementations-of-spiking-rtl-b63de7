// tb_snn_output_neuron: drives the signed output neuron with random weights
// (biased runs of positive and of negative weights, and idle cycles) and
// compares potential and spike every cycle with a reference that applies
// v += w/4 (floor), fire at v >= 32 (reset to 0), clamp at v <= -65.
// Also checks the synchronous reset and that both the firing and the
// clamping cases were exercised.
module tb_snn_output_neuron;
  logic clk = 1'b0, rst_n = 1'b0, srst = 1'b0, weight_en = 1'b0;
  logic signed [7:0] weight, v;
  logic spike;
  int checks = 0, failures = 0;

  snn_output_neuron #(.VTH(32), .DT_SHIFT(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rv, fires, clamps;
    logic rs;
    weight = '0; rv = 0; fires = 0; clamps = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      bias = ((i / 200) % 2 == 0) ? 40 : -40;
      weight    = 8'($signed($urandom_range(0, 255) - 128 + bias) > 127 ? 127 :
                     ($signed($urandom_range(0, 255) - 128 + bias)));
      weight_en = ($urandom_range(0, 3) != 0);
      srst      = ($urandom_range(0, 499) == 0);
      @(negedge clk);
      // reference
      rs = 1'b0;
      if (srst) rv = 0;
      else if (weight_en) begin
        int s;
        s = rv + (int'(weight) >>> 2);
        if (s >= 32)       begin rv = 0; rs = 1'b1; fires++; end
        else if (s <= -65) begin rv = -65; clamps++; end
        else rv = s;
      end
      checks++;
      if (int'(v) != rv || spike != rs) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: v %0d/%0d spike %0d/%0d", i, v, rv, spike, rs);
      end
    end
    checks++;
    if (fires == 0 || clamps == 0) begin
      failures++; $display("FAIL: fires %0d clamps %0d", fires, clamps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
