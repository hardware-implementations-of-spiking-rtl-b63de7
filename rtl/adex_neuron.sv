// adex_neuron: Adaptive-Exponential Integrate-and-Fire neuron, 37-bit signed
// fixed point (13 integer and 23 fractional bits), with a per-evaluation
// time step dt = 2^-dt_shift:
//   V[n+1] = V + dt/C (-gL (V-EL) + gL DT e^((V-VT)/DT) - w + I)
//   w[n+1] = w + dt/tau_w (a (V-EL) - w)
//   if V[n] >= 20 mV: V -> Vr, w -> w + b  (instead of the integration step)
// The exponential is computed by a cordic_exp unit (the thesis' AdEx uses
// CORDIC for this term); its argument (V-VT)/DT is formed in the first
// cycle of an evaluation.  The products with model constants are constant
// multiplications.  The sum of the exponential term is saturated so that a
// large exponent near a spike cannot overflow the word.
// Handshake: with en high an evaluation runs (about 2*K+|x_int|+4 clocks)
// and done is held high afterwards until en is released.
// Units: mV, ms, nS, pF, pA.  The model constants are parameters whose
// defaults are the usual AdEx regular-spiking set (C = 281 pF, gL = 30 nS,
// EL = -70.6 mV, VT = -50.4 mV, DT = 2 mV, tau_w = 144 ms, a = 4 nS,
// b = 80.5 pA, Vr = -70.6 mV); the thesis does not list its values.
module adex_neuron #(
  parameter int  W      = 37,
  parameter int  F      = 23,
  parameter int  K_EXP  = 10,
  parameter real C_PF   = 281.0,
  parameter real GL_NS  = 30.0,
  parameter real EL_MV  = -70.6,
  parameter real VT_MV  = -50.4,
  parameter real DT_MV  = 2.0,
  parameter real TAUW   = 144.0,
  parameter real A_NS   = 4.0,
  parameter real B_PA   = 80.5,
  parameter real VR_MV  = -70.6,
  parameter real VPK_MV = 20.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] i_in,       // pA
  input  logic [3:0]          dt_shift,
  output logic signed [W-1:0] v,          // mV
  output logic signed [W-1:0] w,          // pA
  output logic                spike,
  output logic                done,
  output logic [31:0]         evals
);
  typedef logic signed [W-1:0]   fx_t;
  typedef logic signed [2*W-1:0] wide_t;

  function automatic fx_t q(input real r);
    return fx_t'(longint'(r * (2.0 ** F)));
  endfunction
  localparam fx_t INV_C  = q(1.0 / C_PF);
  localparam fx_t GL     = q(GL_NS);
  localparam fx_t GLDT   = q(GL_NS * DT_MV);
  localparam fx_t EL     = q(EL_MV);
  localparam fx_t VT     = q(VT_MV);
  localparam fx_t INV_DT = q(1.0 / DT_MV);
  localparam fx_t INV_TW = q(1.0 / TAUW);
  localparam fx_t A      = q(A_NS);
  localparam fx_t B      = q(B_PA);
  localparam fx_t VR     = q(VR_MV);
  localparam fx_t VPK    = q(VPK_MV);
  localparam wide_t SMAX = wide_t'(fx_t'({1'b0, {(W-1){1'b1}}}));

  function automatic wide_t wmul(input fx_t x, input fx_t y);
    return (wide_t'(x) * wide_t'(y)) >>> F;
  endfunction
  function automatic fx_t sat(input wide_t x);
    if (x > SMAX)       return fx_t'(SMAX);
    else if (x < -SMAX) return fx_t'(-SMAX);
    else                return fx_t'(x);
  endfunction

  typedef enum logic [1:0] {A_IDLE, A_EXP, A_UPD, A_DONE} state_t;
  state_t state;
  logic   exp_start, exp_done;
  fx_t    exp_x, exp_z;
  wide_t  isum, dv_w, dw_w;

  assign exp_x     = sat(wmul(v - VT, INV_DT));
  assign exp_start = (state == A_IDLE) && en;

  cordic_exp #(.W(W), .F(F), .K(K_EXP)) u_exp (
    .clk, .rst_n, .start(exp_start), .x(exp_x), .busy(), .done(exp_done), .z(exp_z));

  assign isum = -wmul(GL, v - EL) + wmul(GLDT, exp_z) - wide_t'(w) + wide_t'(i_in);
  assign dv_w = wmul(INV_C, sat(isum));
  assign dw_w = wmul(INV_TW, sat(wmul(A, v - EL) - wide_t'(w)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE; v <= EL; w <= '0; spike <= 1'b0; evals <= '0;
    end else begin
      spike <= 1'b0;
      unique case (state)
        A_IDLE: if (en) state <= A_EXP;
        A_EXP:  if (exp_done) state <= A_UPD;
        A_UPD: begin
          if (v >= VPK) begin
            v     <= VR;
            w     <= w + B;
            spike <= 1'b1;
          end else begin
            v <= sat(wide_t'(v) + (dv_w >>> dt_shift));
            w <= sat(wide_t'(w) + (dw_w >>> dt_shift));
          end
          evals <= evals + 1;
          state <= A_DONE;
        end
        A_DONE: if (!en) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  assign done = (state == A_DONE);
endmodule
