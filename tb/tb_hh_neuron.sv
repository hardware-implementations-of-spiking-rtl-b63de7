// tb_hh_neuron: runs the CORDIC Hodgkin-Huxley neuron for 3000 Euler steps
// for each of two parameter sets, from reset, with a constant input current,
// and checks:
//  * every step against a real-valued model of the same equations, started
//    from the neuron's own previous state (V, n, m, h), so that rounding
//    does not accumulate; tolerances cover the CORDIC iteration errors;
//  * that the neuron fires repeatedly (V crosses 0 mV) and as often as a
//    free-running real-valued model, within one spike;
//  * the step time: 7 stages of 2(2*14+1)+2 clocks plus the update.
// Parameters (conductances divided by 100 so that they fit their formats,
// with 1/Cm = 100, which gives the usual millisecond dynamics):
//  set 1: gNa = 1.2, gK = 0.36, gl = 0.003, VNa = 55.12, VK = -72.14,
//         Vl = -49.42, I = 0.1;
//  set 2: gNa = 0.5, gK = 0.05, gl = 0.001, VNa = 50, VK = -100, Vl = -85,
//         I = 0.1.
module tb_hh_neuron;
  localparam int W = 22;
  localparam int NSTEPS = 3000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] i_in, v, n, m, h;
  logic signed [15:0] cm_inv, v_na, v_k, v_l, g_na, g_k, g_l;
  logic step_done;
  int checks = 0, failures = 0;

  hh_neuron dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // real-valued parameters as the hardware sees them
  real gna, gk, gl, vna, vk, vl, cinv, ii;
  function automatic real fx(input logic signed [W-1:0] a);
    return real'(a) / 4096.0;
  endfunction

  // one Euler step of the model (same shift-sum constants as the design)
  task automatic model_step(inout real V, inout real N, inout real M, inout real H);
    real p1, t1, t2, t3, ta, tbn, tbm, an, am, bh, ah, bn, bm, isum;
    p1  = V * (1.0/16 + 1.0/32 + 1.0/128);
    t1  = p1 + 5.0; t2 = p1 + 3.5; t3 = p1 + 3.0;
    ta  = V * (1.0/32 + 1.0/64 + 1.0/512 + 1.0/1024) + 3.0;
    tbn = V * (1.0/128 + 1.0/256 + 1.0/1024) + 0.75;
    tbm = V * (1.0/32 + 1.0/64 + 1.0/128) + 3.33;
    an  = t1 * (1.0/16 + 1.0/32 + 1.0/128) / (1.0 - $exp(-t1));
    am  = t2 / (1.0 - $exp(-t2));
    bh  = 1.0 / ($exp(-t3) + 1.0);
    ah  = $exp(-ta) * (1.0/16 + 1.0/128);
    bn  = $exp(-tbn) / 8.0;
    bm  = 4.0 * $exp(-tbm);
    isum = ii - gk*N*N*N*N*(V - vk) - gna*M*M*M*H*(V - vna) - gl*(V - vl);
    V = V + cinv * isum / 32.0;
    N = N + (an*(1.0 - N) - bn*N) / 32.0;
    M = M + (am*(1.0 - M) - bm*M) / 32.0;
    H = H + (ah*(1.0 - H) - bh*H) / 32.0;
  endtask

  function automatic real absr(input real a);
    return a < 0.0 ? -a : a;
  endfunction

  task automatic run_set(input string name, input int nsteps);
    real V, N, M, H, fV, fN, fM, fH, ev, en_, em, eh, maxv, maxg;
    int spikes, fspikes, cyc, bad;
    logic above, fabove;
    gna = real'(g_na >>> 1) / 4096.0; gk = real'(g_k >>> 3) / 4096.0;
    gl  = real'(g_l >>> 3) / 4096.0;
    vna = real'(v_na) / 256.0; vk = real'(v_k) / 256.0; vl = real'(v_l) / 256.0;
    cinv = real'(cm_inv) / 256.0; ii = real'(i_in) / 4096.0;
    en = 1'b0; rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fV = fx(v); fN = fx(n); fM = fx(m); fH = fx(h);
    spikes = 0; fspikes = 0; above = 1'b0; fabove = 1'b0; maxv = 0.0; maxg = 0.0; bad = 0;
    @(negedge clk) en = 1'b1;
    for (int s = 0; s < nsteps; s++) begin
      V = fx(v); N = fx(n); M = fx(m); H = fx(h);
      model_step(V, N, M, H);
      model_step(fV, fN, fM, fH);
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!step_done);
      ev = absr(fx(v) - V); en_ = absr(fx(n) - N); em = absr(fx(m) - M); eh = absr(fx(h) - H);
      if (ev > maxv) maxv = ev;
      if (en_ > maxg) maxg = en_;
      if (em > maxg) maxg = em;
      if (eh > maxg) maxg = eh;
      checks++;
      if (ev > 0.2 || en_ > 0.004 || em > 0.004 || eh > 0.004) begin
        failures++;
        if (bad++ < 5)
          $display("FAIL %s step %0d: V %f/%f n %f/%f m %f/%f h %f/%f", name, s, fx(v), V, fx(n), N,
                   fx(m), M, fx(h), H);
      end
      if (s > 0) begin
        checks++;
        if (cyc != 7 * (2 * 29 + 2) + 1) begin
          failures++;
          if (bad++ < 5) $display("FAIL %s step %0d took %0d cycles", name, s, cyc);
        end
      end
      if (fx(v) > 0.0 && !above) spikes++;
      above = fx(v) > 0.0;
      if (fV > 0.0 && !fabove) fspikes++;
      fabove = fV > 0.0;
    end
    $display("%s: max step error V %f mV, gates %f; spikes %0d (model %0d)", name, maxv, maxg, spikes, fspikes);
    checks++;
    if (spikes < 3) begin failures++; $display("FAIL %s: neuron did not fire", name); end
    checks++;
    if (spikes > fspikes + 1 || spikes < fspikes - 1) begin
      failures++; $display("FAIL %s: spike count %0d vs model %0d", name, spikes, fspikes);
    end
  endtask

  initial begin
    // parameter set 1
    cm_inv = 16'sd25600;   // 100.0 (Q8.8)
    v_na   = 16'sd14111;   // 55.12
    v_k    = -16'sd18468;  // -72.14
    v_l    = -16'sd12652;  // -49.42
    g_na   = 16'sd9830;    // 1.2 (Q3.13)
    g_k    = 16'sd11796;   // 0.36 (Q1.15)
    g_l    = 16'sd98;      // 0.003 (Q1.15)
    i_in   = 22'sd410;     // 0.1 (Q10.12)
    run_set("set 1", NSTEPS);
    // parameter set 2
    v_na   = 16'sd12800;   // 50
    v_k    = -16'sd25600;  // -100
    v_l    = -16'sd21760;  // -85
    g_na   = 16'sd4096;    // 0.5
    g_k    = 16'sd1638;    // 0.05
    g_l    = 16'sd33;      // 0.001
    i_in   = 22'sd410;     // 0.1
    run_set("set 2", NSTEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
