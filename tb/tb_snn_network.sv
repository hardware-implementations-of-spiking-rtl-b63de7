// tb_snn_network: end-to-end test of the SIS spiking classifier at its
// full size (784 pixels, 187 retained, 10 outputs, 16 exposure steps).
// Several random images are presented over the valid_in/new_data
// handshake, some with stall cycles.  A reference model, written here from
// the network's description, keeps only the retained pixels, integrates
// them in the 8-bit input neurons for 16 passes, applies each input spike's
// weight row to the 10 output neurons (dt = 1/4, threshold 32, clamp -65),
// counts output spikes and picks the first largest count.  Checked: every
// spike count, the class, and the inference time (16*187 + 6 clocks
// after the clock edge that takes the last retained pixel).  Also counted, and required to occur:
// skipped (non-retained) pixels, stalls, input spikes, output spikes,
// clamped output potentials and a class other than 0.
module tb_snn_network;
  import snn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic [7:0] pix_in;
  logic [AW-1:0] pix_addr;
  logic new_data, class_valid, in_spike;
  logic [3:0] class_out;
  logic [CNT_W-1:0] spike_count [NOUT];
  logic [NOUT-1:0] out_spike;
  int checks = 0, failures = 0;

  snn_network dut (.*);
  always #5 clk = ~clk;

  localparam int NIMG = 6;

  initial begin
    repeat (NIMG * 6000 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [NPIX];
  int r_cnt [NOUT];
  int r_class, n_in_spk, n_out_spk, n_clamp, n_skip, n_stall, n_nonzero_class;

  task automatic reference();
    int vin [NKEEP];
    int vo [NOUT];
    for (int k = 0; k < NKEEP; k++) vin[k] = 0;
    for (int o = 0; o < NOUT; o++) begin vo[o] = 0; r_cnt[o] = 0; end
    for (int t = 0; t < NSTEP; t++)
      for (int k = 0; k < NKEEP; k++) begin
        vin[k] += int'(img[sis_index(k, NPIX, NKEEP)]) / 4;
        if (vin[k] >= VTH_IN) begin
          vin[k] = 0;
          n_in_spk++;
          for (int o = 0; o < NOUT; o++) begin
            int s;
            s = vo[o] + (int'(snn_weight(k, o)) >>> 2);
            if (s >= VTH_OUT)  begin vo[o] = 0; r_cnt[o] = (r_cnt[o] + 1) % 32; n_out_spk++; end
            else if (s <= -65) begin vo[o] = -65; n_clamp++; end
            else vo[o] = s;
          end
        end
      end
    r_class = 0;
    for (int o = 1; o < NOUT; o++) if (r_cnt[o] > r_cnt[r_class]) r_class = o;
  endtask

  initial begin
    int cyc, last_cyc, hw_in_spk;
    pix_in = '0; pix_addr = '0;
    n_in_spk = 0; n_out_spk = 0; n_clamp = 0; n_skip = 0; n_stall = 0; n_nonzero_class = 0;
    hw_in_spk = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int im = 0; im < NIMG; im++) begin
      int bright;
      bright = 40 + 40 * im;                      // vary the input activity
      for (int p = 0; p < NPIX; p++)
        img[p] = 8'(($urandom_range(0, 255) * bright) / 256 + ((p % 28) * (im + 1)) % 64);
      reference();
      while (!new_data) @(negedge clk);
      valid_in = 1'b1;                            // handshake
      @(negedge clk);
      cyc = 1;
      for (int p = 0; p < NPIX; p++) begin
        if (im % 2 == 1)
          while ($urandom_range(0, 15) == 0) begin valid_in = 1'b0; n_stall++; @(negedge clk); cyc++; end
        valid_in = 1'b1; pix_addr = AW'(p); pix_in = img[p];
        if (p == sis_index(NKEEP - 1, NPIX, NKEEP)) last_cyc = cyc;
        if (!dut.u_loader.match) n_skip++;
        @(negedge clk); cyc++;
        if (in_spike) hw_in_spk++;
      end
      valid_in = 1'b0;
      while (!class_valid) begin
        @(negedge clk); cyc++;
        if (in_spike) hw_in_spk++;
      end
      checks++;
      if (cyc != last_cyc + NSTEP * NKEEP + 6) begin
        failures++; $display("FAIL image %0d: %0d cycles, expected %0d", im, cyc, last_cyc + NSTEP*NKEEP + 6);
      end
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (int'(spike_count[o]) != r_cnt[o]) begin
          failures++; $display("FAIL image %0d output %0d: %0d spikes, expected %0d", im, o, spike_count[o], r_cnt[o]);
        end
      end
      checks++;
      if (int'(class_out) != r_class) begin
        failures++; $display("FAIL image %0d: class %0d expected %0d", im, class_out, r_class);
      end
      if (r_class != 0) n_nonzero_class++;
      $display("image %0d: class %0d, %0d cycles", im, class_out, cyc);
    end
    $display("events: skipped pixels %0d, stalls %0d, input spikes %0d (hw %0d), output spikes %0d, clamps %0d, non-zero classes %0d",
             n_skip, n_stall, n_in_spk, hw_in_spk, n_out_spk, n_clamp, n_nonzero_class);
    checks++;
    if (n_in_spk != hw_in_spk) begin failures++; $display("FAIL input spike count"); end
    checks++;
    if (n_skip == 0 || n_stall == 0 || n_in_spk == 0 || n_out_spk == 0 || n_clamp == 0 || n_nonzero_class == 0) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
