// hh_neuron: Hodgkin-Huxley neuron in which every non-linear term is computed
// by CORDIC units: three cordic_mul, one cordic_exp and one cordic_div.
// One Euler step (dt = 2^-5) of
//   dV/dt = (1/Cm)(I - gK n^4 (V-VK) - gNa m^3 h (V-VNa) - gl (V-Vl))
//   dx/dt = alpha_x (1-x) - beta_x x,  x in {n, m, h}
// with the rate functions of the thesis' parameterisation:
//   alpha_n = 0.01(V+50)/(1-e^-(0.1V+5))   beta_n = 0.125 e^-(V+60)/80
//   alpha_m = 0.1(V+35)/(1-e^-(0.1V+3.5))  beta_m = 4 e^-(V+60)/18
//   alpha_h = 0.07 e^-(V+60)/20            beta_h = 1/(e^-(0.1V+3)+1)
// is split into seven stages.  Each stage starts up to three multiplications
// (17 in all), and alongside them at most one exponential (6 in all) and one
// division (3 in all) on the single exp and div units, then waits until every
// started unit has returned (start/done handshake) before the next stage.
// The stage contents are this design's schedule; the thesis gives the unit
// counts and the batching of multiplications in threes.  Products by fixed
// constants (0.1V, 0.05V, V/80, V/18, 0.125, 4, 0.07) are shift-and-add sums:
// 0.1V ~ V>>4+V>>5+V>>7, 0.05V ~ V>>5+V>>6+V>>9+V>>10,
// V/80 ~ V>>7+V>>8+V>>10 and V/18 ~ V>>5+V>>6+V>>7 as printed in the
// thesis' schedule figure; 0.01(V+50) is taken as 0.1*(0.1V+5) and
// 0.07 ~ 2^-4+2^-7.
// Data: 22-bit signed fixed point, 10 integer and 12 fractional bits.
// Parameters in: 1/Cm, VNa, VK, Vl in Q8.8; gNa in Q3.13; gK, gl in Q1.15
// (16-bit signed, as in the thesis).  i_in is Q10.12.
// Timing: while en is high the neuron steps continuously; step_done pulses
// after each update of v, n, m, h (about 7*60 cycles per step).
module hh_neuron #(
  parameter int W = 22,
  parameter int F = 12,
  parameter int K_MUL = 14,
  parameter int K_DIV = 8,
  parameter int K_EXP = 10,
  // reset state (resting point of parameter set 1 at zero current)
  parameter logic signed [21:0] V_INIT = -22'sd245958,   // -60.048
  parameter logic signed [21:0] N_INIT = 22'sd1298,      // 0.317
  parameter logic signed [21:0] M_INIT = 22'sd217,       // 0.053
  parameter logic signed [21:0] H_INIT = 22'sd2449       // 0.598
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] i_in,
  input  logic signed [15:0]  cm_inv,   // Q8.8
  input  logic signed [15:0]  v_na,     // Q8.8
  input  logic signed [15:0]  v_k,      // Q8.8
  input  logic signed [15:0]  v_l,      // Q8.8
  input  logic signed [15:0]  g_na,     // Q3.13
  input  logic signed [15:0]  g_k,      // Q1.15
  input  logic signed [15:0]  g_l,      // Q1.15
  output logic signed [W-1:0] v,
  output logic signed [W-1:0] n,
  output logic signed [W-1:0] m,
  output logic signed [W-1:0] h,
  output logic                step_done
);
  typedef logic signed [W-1:0] fx_t;
  localparam fx_t ONE = fx_t'(1) <<< F;
  function automatic fx_t cst(input int num, input int den);   // num/den in Q.F
    return fx_t'((longint'(num) <<< F) / longint'(den));
  endfunction

  // parameters converted to Q10.12
  fx_t cminv_q, vna_q, vk_q, vl_q, gna_q, gk_q, gl_q;
  assign cminv_q = fx_t'(cm_inv) <<< (F - 8);
  assign vna_q   = fx_t'(v_na)   <<< (F - 8);
  assign vk_q    = fx_t'(v_k)    <<< (F - 8);
  assign vl_q    = fx_t'(v_l)    <<< (F - 8);
  assign gna_q   = fx_t'(g_na) >>> 1;
  assign gk_q    = fx_t'(g_k) >>> 3;
  assign gl_q    = fx_t'(g_l) >>> 3;

  // exponent arguments, from v (constant during a step)
  fx_t p1, t1, t2, t3, ta, tbn, tbm, an_num;
  assign p1     = (v >>> 4) + (v >>> 5) + (v >>> 7);                 // ~0.1 V
  assign t1     = p1 + cst(5, 1);                                     // 0.1V + 5
  assign t2     = p1 + cst(7, 2);                                     // 0.1V + 3.5
  assign t3     = p1 + cst(3, 1);                                     // 0.1V + 3
  assign ta     = (v >>> 5) + (v >>> 6) + (v >>> 9) + (v >>> 10) + cst(3, 1);      // (V+60)/20
  assign tbn    = (v >>> 7) + (v >>> 8) + (v >>> 10) + cst(3, 4);    // (V+60)/80
  assign tbm    = (v >>> 5) + (v >>> 6) + (v >>> 7) + cst(333, 100); // (V+60)/18
  assign an_num = (t1 >>> 4) + (t1 >>> 5) + (t1 >>> 7);              // 0.01(V+50)

  // CORDIC units
  logic [2:0] mul_start, mul_done;
  fx_t        mul_x [3], mul_y [3], mul_z [3];
  logic       exp_start, exp_done, div_start, div_done;
  fx_t        exp_x, exp_z, div_x, div_y, div_z;

  for (genvar g = 0; g < 3; g++) begin : g_mul
    cordic_mul #(.W(W), .F(F), .K(K_MUL)) u_mul (
      .clk, .rst_n, .start(mul_start[g]), .x(mul_x[g]), .y(mul_y[g]),
      .busy(), .done(mul_done[g]), .z(mul_z[g]));
  end
  cordic_exp #(.W(W), .F(F), .K(K_EXP)) u_exp (
    .clk, .rst_n, .start(exp_start), .x(exp_x), .busy(), .done(exp_done), .z(exp_z));
  cordic_div #(.W(W), .F(F), .K(K_DIV)) u_div (
    .clk, .rst_n, .start(div_start), .x(div_x), .y(div_y), .busy(), .done(div_done), .z(div_z));

  // intermediate results
  fx_t n2, m2, gh, n4, m3, il, gkn4, gm3h, ik, ina;
  fx_t an_t, am_t, bn_t, bm_t, ah_t, bh_t, dv;
  fx_t e1, e2, e6, e3, e4, alpha_n, alpha_m, beta_h;
  fx_t alpha_h, beta_n, beta_m, isum;

  assign alpha_h = (e3 >>> 4) + (e3 >>> 7);     // 0.07 e^-(V+60)/20
  assign beta_n  = e4 >>> 3;                     // 0.125 e^-(V+60)/80
  assign isum    = i_in - ik - ina - il;

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT, S_UPDATE} phase_t;
  phase_t     phase;
  logic [2:0] stage;
  logic [4:0] pending;        // {div, exp, mul2, mul1, mul0} still running
  logic [4:0] used;           // units used by the current stage

  // operand selection per stage
  always_comb begin
    mul_x = '{default: '0};
    mul_y = '{default: '0};
    exp_x = '0; div_x = '0; div_y = '0;
    used  = '0;
    unique case (stage)
      3'd0: begin
        mul_x[0] = n;  mul_y[0] = n;
        mul_x[1] = m;  mul_y[1] = m;
        mul_x[2] = h;  mul_y[2] = gna_q;
        exp_x    = -t1;                                   // alpha_n denominator
        used     = 5'b01111;
      end
      3'd1: begin
        mul_x[0] = n2; mul_y[0] = n2;
        mul_x[1] = m2; mul_y[1] = m;
        mul_x[2] = v - vl_q; mul_y[2] = gl_q;
        exp_x    = -t2;                                   // alpha_m denominator
        div_x    = an_num; div_y = ONE - e1;              // alpha_n
        used     = 5'b11111;
      end
      3'd2: begin
        mul_x[0] = n4; mul_y[0] = gk_q;
        mul_x[1] = m3; mul_y[1] = gh;
        exp_x    = -t3;                                   // beta_h denominator
        div_x    = t2; div_y = ONE - e2;                  // alpha_m
        used     = 5'b11011;
      end
      3'd3: begin
        mul_x[0] = v - vk_q;  mul_y[0] = gkn4;
        mul_x[1] = v - vna_q; mul_y[1] = gm3h;
        mul_x[2] = ONE - n;   mul_y[2] = alpha_n;
        exp_x    = -tbn;                                  // beta_n
        div_x    = ONE; div_y = e6 + ONE;                 // beta_h
        used     = 5'b11111;
      end
      3'd4: begin
        mul_x[0] = isum;    mul_y[0] = cminv_q;
        mul_x[1] = n;       mul_y[1] = beta_n;
        mul_x[2] = ONE - m; mul_y[2] = alpha_m;
        exp_x    = -ta;                                   // alpha_h
        used     = 5'b01111;
      end
      3'd5: begin
        mul_x[0] = h;       mul_y[0] = beta_h;
        mul_x[1] = ONE - h; mul_y[1] = alpha_h;
        exp_x    = -tbm;                                  // beta_m
        used     = 5'b01011;
      end
      default: begin
        mul_x[0] = m;       mul_y[0] = beta_m;
        used     = 5'b00001;
      end
    endcase
  end

  assign mul_start = (phase == S_LAUNCH) ? used[2:0] : 3'b000;
  assign exp_start = (phase == S_LAUNCH) && used[3];
  assign div_start = (phase == S_LAUNCH) && used[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_IDLE; stage <= '0; pending <= '0; step_done <= 1'b0;
      v <= V_INIT; n <= N_INIT; m <= M_INIT; h <= H_INIT;
      {n2, m2, gh, n4, m3, il, gkn4, gm3h, ik, ina} <= '0;
      {an_t, am_t, bn_t, bm_t, ah_t, bh_t, dv} <= '0;
      {e1, e2, e6, e3, e4, alpha_n, alpha_m, beta_h, beta_m} <= '0;
    end else begin
      step_done <= 1'b0;
      unique case (phase)
        S_IDLE: if (en) begin
          stage <= '0;
          phase <= S_LAUNCH;
        end
        S_LAUNCH: begin
          pending <= used;
          phase   <= S_WAIT;
        end
        S_WAIT: begin
          logic [4:0] still;
          still = pending & ~{div_done, exp_done, mul_done};
          pending <= still;
          if (still == '0) begin
            unique case (stage)
              3'd0: begin n2 <= mul_z[0]; m2 <= mul_z[1]; gh <= mul_z[2]; e1 <= exp_z; end
              3'd1: begin n4 <= mul_z[0]; m3 <= mul_z[1]; il <= mul_z[2]; e2 <= exp_z;
                          alpha_n <= div_z; end
              3'd2: begin gkn4 <= mul_z[0]; gm3h <= mul_z[1]; e6 <= exp_z; alpha_m <= div_z; end
              3'd3: begin ik <= mul_z[0]; ina <= mul_z[1]; an_t <= mul_z[2]; e4 <= exp_z;
                          beta_h <= div_z; end
              3'd4: begin dv <= mul_z[0]; bn_t <= mul_z[1]; am_t <= mul_z[2]; e3 <= exp_z; end
              3'd5: begin bh_t <= mul_z[0]; ah_t <= mul_z[1]; beta_m <= exp_z <<< 2; end
              default: bm_t <= mul_z[0];
            endcase
            if (stage == 3'd6) phase <= S_UPDATE;
            else begin
              stage <= stage + 1'b1;
              phase <= S_LAUNCH;
            end
          end
        end
        S_UPDATE: begin                       // Euler step, dt = 2^-5
          v <= v + (dv >>> 5);
          n <= n + ((an_t - bn_t) >>> 5);
          m <= m + ((am_t - bm_t) >>> 5);
          h <= h + ((ah_t - bh_t) >>> 5);
          step_done <= 1'b1;
          phase     <= en ? S_LAUNCH : S_IDLE;
          stage     <= '0;
        end
        default: phase <= S_IDLE;
      endcase
    end
  end
endmodule
