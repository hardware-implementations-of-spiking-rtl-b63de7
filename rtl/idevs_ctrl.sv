// idevs_ctrl: Input-DEpendent Variable Sampling (I-DEVS) controller.
// It decides how often an attached digital neuron evaluates its difference
// equations.  Two comparators place the input current in one of three
// ranges (I < ITH1, ITH1 <= I < ITH2, I >= ITH2).  An 8-bit timer then
// waits T1, T2 or T3 clocks, during which the neuron gets no clock enable
// and a zero input, so it does not switch.  When the timer expires the
// controller opens the neuron's clock enable (neuron_en, the gated clock of
// the block diagram), passes the input current (i_gated) and the time step
// for that range (dt_shift: dt = 2^-dt_shift, the "f_sample" signal) and
// holds them until the neuron raises done; then the timer restarts.
// Low currents thus get a long time step evaluated rarely; high currents a
// short time step evaluated often.  The range of an evaluation is sampled
// when it starts, and the wait after it uses the same range, so model time
// per clock stays proportional to dt.  Timer values, thresholds and time
// steps are parameters; the thesis gives the structure (two comparators,
// three timer settings, 8-bit timer, done handshake) and dt = 1/128 as the
// smallest step; the other numbers here are this design's choices.
module idevs_ctrl #(
  parameter int W = 33,                                  // current word
  parameter logic signed [W-1:0] ITH1 = W'(10) <<< 14,   // threshold 1
  parameter logic signed [W-1:0] ITH2 = W'(20) <<< 14,   // threshold 2
  parameter logic [7:0] T1 = 8'd128,                     // wait, I < ITH1
  parameter logic [7:0] T2 = 8'd64,                      // wait, ITH1 <= I < ITH2
  parameter logic [7:0] T3 = 8'd32,                      // wait, I >= ITH2
  parameter logic [3:0] DT1 = 4'd5,                      // dt = 1/32
  parameter logic [3:0] DT2 = 4'd6,                      // dt = 1/64
  parameter logic [3:0] DT3 = 4'd7                       // dt = 1/128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_in,
  input  logic                neuron_done,
  output logic                neuron_en,
  output logic signed [W-1:0] i_gated,
  output logic [3:0]          dt_shift,
  output logic [1:0]          range_sel,     // 0, 1, 2: current range in use
  output logic                sample         // pulses when an evaluation starts
);
  typedef enum logic {S_WAIT, S_EVAL} state_t;
  state_t     state;
  logic [7:0] timer;
  logic       lt1, lt2;
  logic [1:0] rng_now;

  assign lt1     = i_in < ITH1;
  assign lt2     = i_in < ITH2;
  assign rng_now = lt1 ? 2'd0 : (lt2 ? 2'd1 : 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT; timer <= T1; range_sel <= 2'd0;
    end else begin
      unique case (state)
        S_WAIT: begin
          if (timer == 8'd0) begin
            range_sel <= rng_now;
            state     <= S_EVAL;
          end else timer <= timer - 8'd1;
        end
        S_EVAL: if (neuron_done) begin
          unique case (range_sel)
            2'd0:    timer <= T1;
            2'd1:    timer <= T2;
            default: timer <= T3;
          endcase
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  assign neuron_en = (state == S_EVAL);
  assign sample    = (state == S_WAIT) && (timer == 8'd0);
  assign i_gated   = neuron_en ? i_in : '0;
  always_comb
    unique case (range_sel)
      2'd0:    dt_shift = DT1;
      2'd1:    dt_shift = DT2;
      default: dt_shift = DT3;
    endcase
endmodule
