// tb_homin_neuron: checks the HOMIN neuron every clock against a reference
// model written here from the discretised HOMIN equations in Q6.9 (v^2 from
// 12 truncated partial products plus the rounding constant 3, arithmetic
// shifts, clamp at -8 + 2^-9, reset to c = -6.5 and u + d).  en is random, so held
// clocks are checked too (one update per enabled clock, spike pulse in the
// clock after v reaches 3).  The truncated square is also compared with the
// exact v^2 (error at most 12 LSB).  Behaviour checks from reset, with d
// the only change: at I = 15, d = 3 keeps spiking, a larger d never gives
// more spikes; at I = 15 and I = 30, d = 64 fires bursts (shortest interval under a third of the longest).
module tb_homin_neuron;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] i_in, v, u;
  logic [7:0] d;
  logic spike;
  int checks = 0, failures = 0;

  homin_neuron dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rv, ru, rs;
  int sq_err_max = 0;

  function automatic int tsq(int x);
    int a, s;
    a = (x < 0) ? -x : x;
    s = 3;
    for (int i = 0; i < 12; i++) if (a[i]) s += (a << i) >>> 9;
    return s;
  endfunction

  // one clock of the reference model
  task automatic step(bit e, int I, int dd);
    int dv, du, vn, s;
    if (!e) begin rs = 0; return; end
    if (rv >= 3 * 512) begin
      rv = -3328; ru = ru + dd * 64; rs = 1;
    end else begin
      s  = tsq(rv);
      if ((s - rv * rv / 512 > 12) || (rv * rv / 512 - s > 12)) sq_err_max = 99;
      dv = (s >>> 2) + 5 * rv + 14 * 512 - ru + I;
      du = (rv >>> 2) - ru;
      vn = rv + (dv >>> 5);
      rv = (vn < -4095) ? -4095 : vn;
      ru = ru + (du >>> 11);
      rs = 0;
    end
  endtask

  task automatic run(int cycles, int I, int dd, bit rnd_en, output int nspk, output int isi_min, output int isi_max, output int isi_last, output int isi_first);
    int last, isi;
    nspk = 0; isi_min = 1 << 30; isi_max = 0; last = -1; isi_last = 0; isi_first = 0;
    i_in = 16'(I); d = 8'(dd);
    for (int c = 0; c < cycles; c++) begin
      en = rnd_en ? ($urandom_range(0, 3) != 0) : 1'b1;
      step(en, I, dd);
      @(negedge clk);
      checks++;
      if (int'(v) != rv || int'(u) != ru || int'(spike) != rs) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d u=%0d spike=%b expected %0d %0d %0d", v, u, spike, rv, ru, rs);
        rv = int'(v); ru = int'(u);
      end
      if (rs) begin
        nspk++;
        if (last >= 0) begin
          isi = c - last;
          if (isi < isi_min) isi_min = isi;
          if (isi > isi_max) isi_max = isi;
          isi_last = isi;
          if (isi_first == 0) isi_first = isi;
        end
        last = c;
      end
    end
  endtask

  initial begin
    int n, mn, mx, ls, fi;
    i_in = '0; d = '0;
    rv = -3328; ru = -3328 >>> 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random currents, d values and enables
    for (int k = 0; k < 40; k++) begin
      run(3000, $urandom_range(0, 2048) - 256, $urandom_range(0, 255), 1'b1, n, mn, mx, ls, fi);
    end
    checks++;
    if (sq_err_max != 0) begin failures++; $display("FAIL truncated square error above 12 LSB"); end
    // behaviours of the hardware traces, each from the reset state, at
    // I = 30 (15360 in Q6.9) with d codes 64, 48, 9 and 3
    begin
      int dd [4] = '{64, 48, 9, 3};
      int prev, first;
      prev = 0;
      for (int k = 0; k < 4; k++) begin
        rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
        rv = -3328; ru = -3328 >>> 2;
        run(40000, 15360, dd[k], 1'b0, n, mn, mx, ls, first);
        $display("d=%0d: %0d spikes, intervals %0d..%0d, first %0d, last %0d clocks", dd[k], n, mn, mx, first, ls);
        checks++;
        if (n < 10 || n < prev) begin failures++; $display("FAIL: d=%0d spike count", dd[k]); end
        prev = n;
        if (dd[k] == 64) begin      // regular slow spiking after the onset
          checks++;
          if (ls < 300) begin failures++; $display("FAIL: d=64 not regular slow spiking"); end
        end
        if (dd[k] == 48) begin      // initial burst, then slow spiking
          checks++;
          if (first * 10 > ls) begin failures++; $display("FAIL: d=48 has no initial burst"); end
        end
        if (dd[k] == 3) begin       // fast tonic spiking
          checks++;
          if (mx > 40) begin failures++; $display("FAIL: d=3 not fast tonic spiking"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
