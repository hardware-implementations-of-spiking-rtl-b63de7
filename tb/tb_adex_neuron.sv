// tb_adex_neuron: checks the AdEx neuron (default parameter set) against a
// real-valued model written here from the AdEx equations.  Each evaluation
// is checked one step at a time: from the neuron's state before the step
// the model computes the expected V and w after it, with exp() in double
// precision; V must agree within 1e-3 mV plus the CORDIC bound (relative
// 2^-9 of the exponential term), w within 1e-3 pA.  The model includes the
// saturation of e^x and of the current sum at the word range (4096), which
// limits the upstroke of a spike.  Currents are random
// (200..1500 pA, held for random lengths), time steps random in 2^-5..2^-7 ms.
// Also checked: the latency (done high 2K + |floor((V-VT)/DT)| + 4 clocks
// after en rises), the spike flag, the evaluation counter, that the neuron
// spikes, and that at a constant 800 pA over 300 ms its spike count is
// within 10 % of a free-running real-valued Euler model.
module tb_adex_neuron;
  localparam int W = 37, F = 23, K = 10;
  localparam real C = 281.0, GL = 30.0, EL = -70.6, VT = -50.4, DT = 2.0,
                  TW = 144.0, A = 4.0, B = 80.5, VR = -70.6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] i_in, v, w;
  logic [3:0] dt_shift;
  logic spike, done;
  logic [31:0] evals;
  int checks = 0, failures = 0;

  adex_neuron dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(logic signed [W-1:0] x);
    return real'(longint'(x)) / (2.0 ** F);
  endfunction
  function automatic logic signed [W-1:0] q(real x);
    return W'(longint'(x * (2.0 ** F)));
  endfunction

  int nspk, nev;

  task automatic eval_one(real I, int dts);
    real v0, w0, h, ex, ev, ew, tol;
    bit  es;
    int  lat, xi;
    v0 = r(v); w0 = r(w); h = 1.0 / (2.0 ** dts);
    xi = $rtoi($floor((v0 - VT) / DT));
    i_in = q(I); dt_shift = 4'(dts); en = 1'b1;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!done && lat < 400);
    nev++;
    if (xi < 20) begin
      checks++;
      if (lat != 2 * K + (xi < 0 ? -xi : xi) + 4) begin
        failures++; $display("FAIL latency %0d (x_int %0d)", lat, xi);
      end
    end
    es = v0 >= 20.0;
    ex = GL * DT * $exp((v0 - VT) / DT);
    if (es) begin ev = VR; ew = w0 + B; tol = 1e-3; end
    else begin
      real isum, smax;
      smax = 2.0 ** (W - 1 - F);                    // word range, 4096
      if (ex > GL * DT * smax) ex = GL * DT * smax;  // e^x saturates in the CORDIC unit
      isum = -GL * (v0 - EL) + ex - w0 + I;
      if (isum > smax) isum = smax;                  // the current sum saturates
      if (isum < -smax) isum = -smax;
      ev  = v0 + h / C * isum;
      ew  = w0 + h / TW * (A * (v0 - EL) - w0);
      tol = 1e-3 + h / C * ex / 512.0;
    end
    checks++;
    if (spike !== es) begin failures++; $display("FAIL spike flag at V=%f", v0); end
    if (ex < 1.0e5 || es) begin
      checks++;
      if ((r(v) - ev > tol) || (ev - r(v) > tol) || (r(w) - ew > 1e-3) || (ew - r(w) > 1e-3)) begin
        failures++;
        if (failures < 10) $display("FAIL V=%f w=%f expected %f %f (from V=%f)", r(v), r(w), ev, ew, v0);
      end
    end
    if (es) nspk++;
    en = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    real I, fv, fw, h;
    int  hold, fsp;
    i_in = '0; dt_shift = 4'd7; nspk = 0; nev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    I = 0.0; hold = 0;
    for (int k = 0; k < 20000; k++) begin
      if (hold == 0) begin I = real'($urandom_range(200, 1500)); hold = $urandom_range(500, 4000); end
      hold--;
      eval_one(I, $urandom_range(5, 7));
    end
    $display("random run: %0d spikes in %0d evaluations", nspk, nev);
    checks++;
    if (nspk == 0) begin failures++; $display("FAIL: no spikes"); end
    checks++;
    if (int'(evals) != nev) begin failures++; $display("FAIL evals %0d expected %0d", evals, nev); end
    // free-running comparison at 800 pA, dt = 1/32 ms, 300 ms
    fv = r(v); fw = r(w); h = 1.0 / 32.0; fsp = 0; nspk = 0;
    for (int k = 0; k < 300 * 32; k++) begin
      eval_one(800.0, 5);
      if (fv >= 20.0) begin fv = VR; fw += B; fsp++; end
      else begin
        real nv, e;
        e = GL * DT * $exp((fv - VT) / DT);
        if (e > 1.0e9) e = 1.0e9;
        nv = fv + h / C * (-GL * (fv - EL) + e - fw + 800.0);
        fw = fw + h / TW * (A * (fv - EL) - fw);
        fv = nv;
      end
    end
    $display("800 pA, 300 ms: %0d spikes, real-valued model %0d", nspk, fsp);
    checks++;
    if (fsp == 0 || (nspk - fsp) * 10 > fsp || (fsp - nspk) * 10 > fsp) begin
      failures++; $display("FAIL spike count against the real-valued model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
