// izh_neuron: Izhikevich neuron, 33-bit signed fixed point (18 integer and
// 14 fractional bits), with a per-evaluation time step dt = 2^-dt_shift:
//   v[n+1] = v + dt (0.04 v^2 + 5 v + 140 - u + I)
//   u[n+1] = u + dt a (b v - u)
//   if v[n] >= 30: v -> c, u -> u + d  (instead of the integration step)
// A small state machine does one evaluation per request: with en high it
// squares v (one multiplier, a DSP in an FPGA) in the first cycle, updates
// v and u in the second, and then holds done high until en is released,
// which is the handshake the I-DEVS controller waits for.  With en held
// high and a fixed dt_shift it is the conventional fixed-step neuron.
// a, b, c, d and I are inputs in the same Q18.14 format.  The cycle split
// and the handshake are this design's choices.
module izh_neuron #(
  parameter int W = 33,
  parameter int F = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] i_in,
  input  logic [3:0]          dt_shift,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] v,
  output logic signed [W-1:0] u,
  output logic                spike,      // one-cycle pulse on a reset
  output logic                done,
  output logic [31:0]         evals       // number of evaluations done
);
  typedef logic signed [W-1:0]   fx_t;
  typedef logic signed [2*W-1:0] wide_t;
  localparam fx_t K004 = fx_t'(655);                 // 0.04 in Q.14
  localparam fx_t C140 = fx_t'(140) <<< F;
  localparam fx_t V30  = fx_t'(30)  <<< F;
  localparam fx_t V0   = -(fx_t'(65) <<< F);         // reset state
  localparam fx_t U0   = -(fx_t'(13) <<< F);

  function automatic fx_t fmul(input fx_t x, input fx_t y);
    wide_t p;
    p = wide_t'(x) * wide_t'(y);
    return fx_t'(p >>> F);
  endfunction

  typedef enum logic [1:0] {I_IDLE, I_SQ, I_UPD, I_DONE} state_t;
  state_t state;
  fx_t    vsq, dv, du;

  assign dv = fmul(K004, vsq) + (v <<< 2) + v + C140 - u + i_in;
  assign du = fmul(a, fmul(b, v) - u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE; v <= V0; u <= U0; vsq <= '0; spike <= 1'b0; evals <= '0;
    end else begin
      spike <= 1'b0;
      unique case (state)
        I_IDLE: if (en) state <= I_SQ;
        I_SQ: begin
          vsq   <= fmul(v, v);
          state <= I_UPD;
        end
        I_UPD: begin
          if (v >= V30) begin
            v     <= c;
            u     <= u + d;
            spike <= 1'b1;
          end else begin
            v <= v + (dv >>> dt_shift);
            u <= u + (du >>> dt_shift);
          end
          evals <= evals + 1;
          state <= I_DONE;
        end
        I_DONE: if (!en) state <= I_IDLE;
        default: state <= I_IDLE;
      endcase
    end
  end

  assign done = (state == I_DONE);
endmodule
