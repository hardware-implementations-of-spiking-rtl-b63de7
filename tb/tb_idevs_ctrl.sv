// tb_idevs_ctrl: checks the I-DEVS controller against a cycle-level
// reference model.  A stand-in neuron answers each evaluation request with
// done after a random 1..4 clocks and keeps done until the enable drops.
// The input current is a slow triangular wave crossing both thresholds plus
// random jumps.  Checked every clock: neuron_en, i_gated (zero while gated),
// dt_shift, range_sel and sample.  Also checked: the wait between the end
// of one evaluation and the next request is T1, T2 or T3 + 1 clocks for the
// range in use, and every range is used.
module tb_idevs_ctrl;
  localparam int W = 33;
  localparam logic signed [W-1:0] ITH1 = W'(10) <<< 14, ITH2 = W'(20) <<< 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] i_in, i_gated;
  logic neuron_done, neuron_en, sample;
  logic [3:0] dt_shift;
  logic [1:0] range_sel;
  int checks = 0, failures = 0;

  idevs_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in neuron
  int ndelay, ncnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin neuron_done <= 1'b0; ncnt <= 0; ndelay <= 1; end
    else if (!neuron_en) begin neuron_done <= 1'b0; ncnt <= 0; ndelay <= $urandom_range(1, 4); end
    else if (ncnt + 1 >= ndelay) neuron_done <= 1'b1;
    else ncnt <= ncnt + 1;

  // reference model state
  int m_state, m_timer, m_range, m_gap, m_evals [3];
  int TV [3] = '{128, 64, 32};
  int DV [3] = '{5, 6, 7};

  function automatic int range_of(logic signed [W-1:0] x);
    return (x < ITH1) ? 0 : (x < ITH2) ? 1 : 2;
  endfunction

  initial begin
    int tri_v, dir, gap_check_range;
    logic exp_sample;
    i_in = '0; tri_v = 0; dir = 1;
    m_state = 0; m_timer = 128; m_range = 0; m_gap = 0; gap_check_range = -1;
    m_evals = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 120000; c++) begin
      // input: triangular wave 0..30 (model units) with occasional jumps
      tri_v += dir;
      if (tri_v >= 30 * 2000) dir = -1;
      if (tri_v <= 0) dir = 1;
      if ($urandom_range(0, 999) == 0) i_in = W'($urandom_range(0, 30)) <<< 14;
      else i_in = W'((tri_v <<< 14) / 2000);
      #1;
      // compare outputs with the model (state before this clock edge)
      exp_sample = (m_state == 0) && (m_timer == 0);
      checks++;
      if (neuron_en !== (m_state == 1) || sample !== exp_sample || int'(range_sel) != m_range ||
          int'(dt_shift) != DV[m_range] || i_gated !== ((m_state == 1) ? i_in : '0)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: en=%b sample=%b range=%0d dt=%0d (model state %0d timer %0d range %0d)",
                                    c, neuron_en, sample, range_sel, dt_shift, m_state, m_timer, m_range);
      end
      // advance the model by one clock
      if (m_state == 0) begin
        m_gap++;
        if (m_timer == 0) begin
          if (gap_check_range >= 0) begin
            checks++;
            if (m_gap != TV[gap_check_range] + 1) begin
              failures++; $display("FAIL wait %0d for range %0d", m_gap, gap_check_range);
            end
          end
          m_range = range_of(i_in); m_state = 1; m_evals[m_range]++;
        end else m_timer--;
      end else if (neuron_done) begin
        m_timer = TV[m_range]; gap_check_range = m_range; m_state = 0; m_gap = 0;
      end
      @(negedge clk);
    end
    $display("evaluations per range: %0d %0d %0d", m_evals[0], m_evals[1], m_evals[2]);
    checks++;
    if (m_evals[0] == 0 || m_evals[1] == 0 || m_evals[2] == 0) begin
      failures++; $display("FAIL: a range was never used");
    end
    checks++;
    if (!(m_evals[2] > m_evals[0])) begin
      failures++; $display("FAIL: high currents should be sampled more often");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
