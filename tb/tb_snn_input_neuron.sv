// tb_snn_input_neuron: exhaustive check of the input integrate-and-fire
// neuron over every reachable membrane potential (0..127) and every pixel
// value (0..255) against v + pixel/4 with reset to 0 at 128.
module tb_snn_input_neuron;
  logic [7:0] v_in, pixel, v_out;
  logic spike;
  int checks = 0, failures = 0;

  snn_input_neuron #(.VTH(128), .DT_SHIFT(2)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++)
      for (int p = 0; p < 256; p++) begin
        int s;
        v_in = 8'(v); pixel = 8'(p);
        #1;
        s = v + p / 4;
        checks++;
        if (spike != (s >= 128) || v_out != ((s >= 128) ? 8'd0 : 8'(s))) begin
          failures++;
          if (failures < 5) $display("FAIL v=%0d p=%0d: spike %0d v_out %0d", v, p, spike, v_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
