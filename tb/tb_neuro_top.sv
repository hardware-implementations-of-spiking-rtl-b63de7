// tb_neuro_top: end-to-end test of the complete design at its default
// (full) size, all parts running at the same time for 700 000 clocks.
//  * Spiking network: images (random, one with stall cycles) over the
//    handshake; the class and all spike counts are checked against a
//    reference model of the network written here.
//  * Hodgkin-Huxley neuron: a spiking parameter set and a constant current;
//    the step period (7 * 60 + 1 clocks) is checked and spikes are counted.
//  * I-DEVS Izhikevich and AdEx neurons: triangular input currents that
//    sweep all three ranges; evaluations per range, gated (idle) clocks and
//    spikes are counted, and higher ranges must be sampled more often.
//  * HOMIN neuron at d = 64, I = 30: spikes, and spikes that follow another
//    within 100 clocks (inside a burst), are counted.
// Every mechanism counter must be non-zero at the end, otherwise the test
// fails.
module tb_neuro_top;
  import snn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic snn_valid_in = 1'b0;
  logic [7:0] snn_pix_in = '0;
  logic [AW-1:0] snn_pix_addr = '0;
  logic snn_new_data, snn_class_valid, snn_in_spike;
  logic [3:0] snn_class_out;
  logic [NOUT*CNT_W-1:0] snn_spike_counts;
  logic [NOUT-1:0] snn_out_spike;
  logic hh_en = 1'b0;
  logic signed [21:0] hh_i_in = 22'sd410, hh_v, hh_n, hh_m, hh_h;
  logic signed [15:0] hh_cm_inv = 16'sd25600, hh_v_na = 16'sd14111, hh_v_k = -16'sd18468,
                      hh_v_l = -16'sd12652, hh_g_na = 16'sd9830, hh_g_k = 16'sd11796, hh_g_l = 16'sd98;
  logic hh_step_done;
  logic signed [32:0] izh_i_in = '0, izh_v;
  logic signed [32:0] izh_a = 33'sd328, izh_b = 33'sd3277, izh_c = -(33'sd65 <<< 14), izh_d = 33'sd8 <<< 14;
  logic izh_spike, izh_active;
  logic [1:0] izh_range;
  logic [31:0] izh_evals;
  logic signed [36:0] adex_i_in = '0, adex_v;
  logic adex_spike, adex_active;
  logic [1:0] adex_range;
  logic [31:0] adex_evals;
  logic homin_en = 1'b0;
  logic signed [15:0] homin_i_in = 16'sd15360, homin_v;
  logic [7:0] homin_d = 8'd64;
  logic homin_spike;
  int checks = 0, failures = 0;

  neuro_top dut (.*);
  always #5 clk = ~clk;

  localparam int NCYC = 700000;
  initial begin
    repeat (NCYC + 50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int c_skip, c_stall, c_in_spk, c_out_spk, c_clamp, c_class;
  int c_hh_step, c_hh_spk;
  int c_izh_rng [3], c_izh_gated, c_izh_spk;
  int c_adex_rng [3], c_adex_gated, c_adex_spk;
  int c_homin_spk, c_homin_burst;
  bit running = 1'b0;

  // output neurons clamped at -65 (observed inside the network)
  logic [NOUT-1:0] clamp_now;
  for (genvar o = 0; o < NOUT; o++)
    assign clamp_now[o] = dut.u_snn.wen && dut.u_snn.g_out[o].u_on.clamp;

  bit izh_act_d, adex_act_d, hh_above, adex_above;
  int homin_last, hh_last_step;
  always @(posedge clk) if (running) begin
    if (snn_in_spike) c_in_spk++;
    c_out_spk += $countones(snn_out_spike);
    c_clamp += $countones(clamp_now);
    if (hh_step_done) begin
      c_hh_step++;
      if (hh_last_step > 0) begin
        checks++;
        if (c_cycle - hh_last_step != 7 * 60 + 1) begin
          failures++; $display("FAIL HH step period %0d", c_cycle - hh_last_step);
        end
      end
      hh_last_step = c_cycle;
      if (!hh_above && hh_v > 0) c_hh_spk++;
      hh_above = hh_v > 0;
    end
    if (izh_active && !izh_act_d) c_izh_rng[izh_range]++;
    if (!izh_active) c_izh_gated++;
    if (izh_spike) c_izh_spk++;
    izh_act_d = izh_active;
    if (adex_active && !adex_act_d) c_adex_rng[adex_range]++;
    if (!adex_active) c_adex_gated++;
    if (adex_spike) c_adex_spk++;
    adex_act_d = adex_active;
    if (homin_spike) begin
      c_homin_spk++;
      if (homin_last >= 0 && c_cycle - homin_last < 100) c_homin_burst++;  // spike within a burst
      homin_last = c_cycle;
    end
  end

  int c_cycle = 0;
  always @(posedge clk) c_cycle++;

  // ---------------- network reference ----------------
  logic [7:0] img [NPIX];
  int r_cnt [NOUT];
  int r_class;
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
          for (int o = 0; o < NOUT; o++) begin
            int s;
            s = vo[o] + (int'(snn_weight(k, o)) >>> 2);
            if (s >= VTH_OUT)  begin vo[o] = 0; r_cnt[o] = (r_cnt[o] + 1) % 32; end
            else if (s <= -65) vo[o] = -65;
            else vo[o] = s;
          end
        end
      end
    r_class = 0;
    for (int o = 1; o < NOUT; o++) if (r_cnt[o] > r_cnt[r_class]) r_class = o;
  endtask

  // network driver
  initial begin
    wait (running);
    for (int im = 0; im < 8; im++) begin
      for (int p = 0; p < NPIX; p++)
        img[p] = 8'(($urandom_range(0, 255) * (60 + 25 * im)) / 256);
      reference();
      @(negedge clk);
      while (!snn_new_data) @(negedge clk);
      snn_valid_in = 1'b1;
      @(negedge clk);
      for (int p = 0; p < NPIX; p++) begin
        if (im == 1)
          while ($urandom_range(0, 7) == 0) begin snn_valid_in = 1'b0; c_stall++; @(negedge clk); end
        snn_valid_in = 1'b1; snn_pix_addr = AW'(p); snn_pix_in = img[p];
        if (!dut.u_snn.u_loader.match) c_skip++;
        @(negedge clk);
      end
      snn_valid_in = 1'b0;
      while (!snn_class_valid) @(negedge clk);
      c_class++;
      checks++;
      if (int'(snn_class_out) != r_class) begin
        failures++; $display("FAIL image %0d: class %0d expected %0d", im, snn_class_out, r_class);
      end
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (int'(snn_spike_counts[o*CNT_W +: CNT_W]) != r_cnt[o]) begin
          failures++; $display("FAIL image %0d output %0d count", im, o);
        end
      end
    end
  end

  // currents and end of test
  initial begin
    int tri_v, dir;
    c_skip = 0; c_stall = 0; c_in_spk = 0; c_out_spk = 0; c_clamp = 0; c_class = 0;
    c_hh_step = 0; c_hh_spk = 0; hh_last_step = 0; homin_last = -1;
    c_izh_rng = '{0, 0, 0}; c_adex_rng = '{0, 0, 0};
    c_izh_gated = 0; c_izh_spk = 0; c_adex_gated = 0; c_adex_spk = 0;
    c_homin_spk = 0; c_homin_burst = 0;
    tri_v = 0; dir = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; hh_en = 1'b1; homin_en = 1'b1; running = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      // triangular wave 0..30 (Izhikevich units) and 0..1200 pA, period 200 000 clocks
      tri_v += dir;
      if (tri_v >= 100000) dir = -1;
      if (tri_v <= 0) dir = 1;
      izh_i_in  = 33'((longint'(tri_v) * 30 * 16384) / 100000);
      adex_i_in = 37'((longint'(tri_v) * 1200 * 8388608) / 100000);
      @(negedge clk);
    end
    running = 1'b0;
    $display("network : %0d classes, %0d skipped pixels, %0d stalls, %0d input spikes, %0d output spikes, %0d clamps",
             c_class, c_skip, c_stall, c_in_spk, c_out_spk, c_clamp);
    $display("HH      : %0d steps, %0d spikes", c_hh_step, c_hh_spk);
    $display("Izh     : evaluations %0d/%0d/%0d, gated clocks %0d, spikes %0d (evals %0d)",
             c_izh_rng[0], c_izh_rng[1], c_izh_rng[2], c_izh_gated, c_izh_spk, izh_evals);
    $display("AdEx    : evaluations %0d/%0d/%0d, gated clocks %0d, spikes %0d (evals %0d)",
             c_adex_rng[0], c_adex_rng[1], c_adex_rng[2], c_adex_gated, c_adex_spk, adex_evals);
    $display("HOMIN   : %0d spikes, %0d of them inside a burst", c_homin_spk, c_homin_burst);
    begin
      int m [23];
      m = '{c_class, c_skip, c_stall, c_in_spk, c_out_spk, c_clamp, c_hh_step, c_hh_spk,
            c_izh_rng[0], c_izh_rng[1], c_izh_rng[2], c_izh_gated, c_izh_spk,
            c_adex_rng[0], c_adex_rng[1], c_adex_rng[2], c_adex_gated, c_adex_spk,
            c_homin_spk, c_homin_burst,
            int'(c_izh_rng[2] > c_izh_rng[0]), int'(c_adex_rng[2] > c_adex_rng[0]),
            int'(int'(izh_evals) == c_izh_rng[0] + c_izh_rng[1] + c_izh_rng[2])};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
