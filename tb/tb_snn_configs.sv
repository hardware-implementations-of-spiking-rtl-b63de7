// tb_snn_configs: runs the three other network configurations of the SIS
// study side by side on the same images, each against a reference model:
//  * SIS Fashion-MNIST: 295 retained pixels, output threshold 16;
//  * fully connected digits baseline: all 784 pixels, output threshold 64;
//  * fully connected Fashion-MNIST baseline: all 784 pixels, threshold 16.
// Only parameters differ from the default network.  For each image all three
// networks get the handshake in the same clock and the same pixel stream;
// checked per network: class, the ten spike counts, and the inference time
// (NSTEP*NKEEP + 6 clocks after the last retained pixel is taken).
module tb_snn_configs;
  import snn_pkg::*;
  localparam int NCFG = 3;
  localparam int KEEP [NCFG] = '{295, 784, 784};
  localparam int VTHO [NCFG] = '{16, 64, 16};
  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic [7:0] pix_in = '0;
  logic [AW-1:0] pix_addr = '0;
  logic [NCFG-1:0] new_data, class_valid, in_spike;
  logic [3:0] class_out [NCFG];
  logic [CNT_W-1:0] spike_count [NCFG][NOUT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_net
    snn_network #(.NKEEP(KEEP[g]), .VTH_OUT(VTHO[g])) dut (
      .clk, .rst_n, .valid_in, .pix_in, .pix_addr,
      .new_data(new_data[g]), .class_valid(class_valid[g]), .class_out(class_out[g]),
      .spike_count(spike_count[g]), .in_spike(in_spike[g]), .out_spike());
  end

  localparam int NIMG = 3;
  initial begin
    repeat (NIMG * 14500 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [NPIX];
  int r_cnt [NOUT];
  int r_class;

  task automatic reference(input int nkeep, input int vth);
    int vin [NPIX];
    int vo [NOUT];
    for (int k = 0; k < nkeep; k++) vin[k] = 0;
    for (int o = 0; o < NOUT; o++) begin vo[o] = 0; r_cnt[o] = 0; end
    for (int t = 0; t < NSTEP; t++)
      for (int k = 0; k < nkeep; k++) begin
        vin[k] += int'(img[sis_index(k, NPIX, nkeep)]) / 4;
        if (vin[k] >= VTH_IN) begin
          vin[k] = 0;
          for (int o = 0; o < NOUT; o++) begin
            int s;
            s = vo[o] + (int'(snn_weight(k, o)) >>> 2);
            if (s >= vth)      begin vo[o] = 0; r_cnt[o] = (r_cnt[o] + 1) % 32; end
            else if (s <= -65) vo[o] = -65;
            else vo[o] = s;
          end
        end
      end
    r_class = 0;
    for (int o = 1; o < NOUT; o++) if (r_cnt[o] > r_cnt[r_class]) r_class = o;
  endtask

  int last_cyc [NCFG], done_cyc [NCFG];
  int cyc;
  bit counting = 1'b0;
  always @(posedge clk) if (counting) begin
    cyc++;
    for (int g = 0; g < NCFG; g++) if (class_valid[g]) done_cyc[g] = cyc;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int im = 0; im < NIMG; im++) begin
      for (int p = 0; p < NPIX; p++)
        img[p] = 8'(($urandom_range(0, 255) * (50 + 50 * im)) / 256);
      while (new_data != '1) @(negedge clk);
      valid_in = 1'b1;                          // handshake for all three
      cyc = 0; done_cyc = '{0, 0, 0}; counting = 1'b1;
      @(negedge clk);
      for (int p = 0; p < NPIX; p++) begin
        pix_addr = AW'(p); pix_in = img[p];
        for (int g = 0; g < NCFG; g++)
          if (p == sis_index(KEEP[g] - 1, NPIX, KEEP[g])) last_cyc[g] = cyc + 1;
        @(negedge clk);
      end
      valid_in = 1'b0;
      while (done_cyc[0] == 0 || done_cyc[1] == 0 || done_cyc[2] == 0) @(negedge clk);
      counting = 1'b0;
      for (int g = 0; g < NCFG; g++) begin
        reference(KEEP[g], VTHO[g]);
        checks++;
        if (done_cyc[g] != last_cyc[g] + NSTEP * KEEP[g] + 6) begin
          failures++; $display("FAIL config %0d image %0d: %0d cycles, expected %0d", g, im, done_cyc[g], last_cyc[g] + NSTEP * KEEP[g] + 6);
        end
        for (int o = 0; o < NOUT; o++) begin
          checks++;
          if (int'(spike_count[g][o]) != r_cnt[o]) begin
            failures++; $display("FAIL config %0d image %0d output %0d: %0d expected %0d", g, im, o, spike_count[g][o], r_cnt[o]);
          end
        end
        checks++;
        if (int'(class_out[g]) != r_class) begin
          failures++; $display("FAIL config %0d image %0d: class %0d expected %0d", g, im, class_out[g], r_class);
        end
        $display("config %0d (%0d pixels, threshold %0d) image %0d: class %0d after %0d clocks", g, KEEP[g], VTHO[g], im, class_out[g], done_cyc[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
