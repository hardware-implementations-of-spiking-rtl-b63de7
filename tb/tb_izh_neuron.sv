// tb_izh_neuron: checks the Izhikevich neuron bit-exactly against a
// fixed-point reference model written here from the equations (Q18.14,
// products truncated by an arithmetic shift of 14), for four parameter
// sets (regular spiking, fast spiking, chattering, intrinsically bursting),
// random currents and random time steps 2^-5..2^-7 per evaluation, with
// random idle gaps between requests.  Checked per evaluation: v, u, spike
// (a pulse in the same clock as done),
// the evaluation counter, and the latency (done is high on the third clock
// after en is raised).  Also checked: every parameter set spikes, and the
// regular-spiking neuron at I = 10 with dt = 2^-7 fires within 5 % of the
// spike count of a real-valued Euler model.
module tb_izh_neuron;
  localparam int W = 33, F = 14;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] i_in, a, b, c, d, v, u;
  logic [3:0] dt_shift;
  logic spike, done;
  logic [31:0] evals;
  int checks = 0, failures = 0;

  izh_neuron dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q(real x);
    return longint'(x * 16384.0);
  endfunction
  function automatic longint fm(longint x, longint y);
    return (x * y) >>> F;
  endfunction

  longint rv, ru;
  int nspk;

  task automatic eval_one(longint I, int dts, int gap);
    longint vsq, dv, du;
    bit rspk;
    int lat;
    repeat (gap) @(negedge clk);
    i_in = W'(I); dt_shift = 4'(dts); en = 1'b1;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!done && lat < 10);
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    // reference
    rspk = rv >= q(30.0);
    if (rspk) begin rv = longint'(c); ru = ru + longint'(d); end
    else begin
      vsq = fm(rv, rv);
      dv  = fm(655, vsq) + 5 * rv + q(140.0) - ru + I;
      du  = fm(longint'(a), fm(longint'(b), rv) - ru);
      rv  = rv + (dv >>> dts);
      ru  = ru + (du >>> dts);
    end
    checks++;
    if (longint'(v) != rv || longint'(u) != ru) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d u=%0d expected %0d %0d", v, u, rv, ru);
      rv = longint'(v); ru = longint'(u);
    end
    checks++;
    if (spike !== rspk) begin failures++; $display("FAIL spike flag"); end
    if (rspk) nspk++;
    en = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    real pa [4] = '{0.02, 0.1, 0.02, 0.02};
    real pb [4] = '{0.2, 0.2, 0.2, 0.2};
    real pc [4] = '{-65.0, -65.0, -50.0, -55.0};
    real pd [4] = '{8.0, 2.0, 2.0, 4.0};
    int  nev;
    i_in = '0; dt_shift = 4'd7;
    a = W'(q(pa[0])); b = W'(q(pb[0])); c = W'(q(pc[0])); d = W'(q(pd[0]));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rv = q(-65.0); ru = q(-13.0); nev = 0;
    for (int s = 0; s < 4; s++) begin
      a = W'(q(pa[s])); b = W'(q(pb[s])); c = W'(q(pc[s])); d = W'(q(pd[s]));
      nspk = 0;
      for (int k = 0; k < 6000; k++) begin
        eval_one(q(real'($urandom_range(0, 20))) + q(4.0), $urandom_range(5, 7), $urandom_range(0, 3));
        nev++;
      end
      $display("set %0d: %0d spikes", s, nspk);
      checks++;
      if (nspk == 0) begin failures++; $display("FAIL: set %0d never spiked", s); end
    end
    checks++;
    if (int'(evals) != nev) begin failures++; $display("FAIL evals %0d expected %0d", evals, nev); end
    // regular spiking, I = 10, dt = 1/128, 300 ms against a real-valued model
    begin
      real fv, fu, h;
      int fsp;
      a = W'(q(0.02)); b = W'(q(0.2)); c = W'(q(-65.0)); d = W'(q(8.0));
      fv = real'(rv) / 16384.0; fu = real'(ru) / 16384.0; h = 1.0 / 128.0; fsp = 0;
      nspk = 0;
      for (int k = 0; k < 300 * 128; k++) begin
        eval_one(q(10.0), 7, 0);
        if (fv >= 30.0) begin fv = -65.0; fu += 8.0; fsp++; end
        else begin
          real nv;
          nv = fv + h * (0.04 * fv * fv + 5.0 * fv + 140.0 - fu + 10.0);
          fu = fu + h * 0.02 * (0.2 * fv - fu);
          fv = nv;
        end
      end
      $display("regular spiking 300 ms: %0d spikes, real-valued model %0d", nspk, fsp);
      checks++;
      if (fsp == 0 || (nspk - fsp) * 20 > fsp || (fsp - nspk) * 20 > fsp) begin
        failures++; $display("FAIL spike count against the real-valued model");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
