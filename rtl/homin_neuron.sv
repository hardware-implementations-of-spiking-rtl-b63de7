// homin_neuron: Hardware-Oriented Modified Izhikevich Neuron (HOMIN).
// A scaled Izhikevich model in which a, b and c are fixed and all
// coefficients are powers of two, so the only behaviour parameter is d
// (regular spiking, bursting, chattering, low-threshold spiking...):
//   v[n+1] = v + 2^-5 (2^-2 v^2 + 2^2 v + v + 14 - u + I)
//   u[n+1] = u + 2^-11 (2^-2 v - u)
//   if v[n] >= 3: v -> c, u -> u + d
// One Euler step per clock while en is high.  Datapath: 16-bit signed fixed
// point, 6 integer and 9 fractional bits, for v, u and I; d is 8-bit
// unsigned with 5 integer and 3 fractional bits.  v is clamped just above -8
// (at -8 + 2^-9), so |v| < 8 and v^2 needs no full multiplier: the square
// is a sum of 12 partial products, each truncated to 9 fractional bits, plus a rounding
// constant (3 LSB) for the average truncation loss.  All of this follows the
// thesis.  Not given there: the reset value c, taken as -6.5 (the
// Izhikevich -65 scaled by 1/10), the rounding constant, and the reset state
// (v = c, u = 2^-2 c).  Right shifts are arithmetic (they round towards
// minus infinity).
module homin_neuron #(
  parameter logic signed [15:0] C_RESET = -16'sd3328,  // -6.5 in Q6.9
  parameter int                 RC      = 3            // rounding constant, LSB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [15:0] i_in,    // Q6.9
  input  logic        [7:0]  d,       // Q5.3, unsigned
  output logic signed [15:0] v,       // Q6.9
  output logic signed [15:0] u,       // Q6.9
  output logic               spike
);
  localparam int F = 9;
  localparam logic signed [15:0] V_TH   = 16'sd3 <<< F;
  localparam logic signed [15:0] V_MIN  = -(16'sd8 <<< F) + 16'sd1;  // just above -8
  localparam logic signed [15:0] C14    = 16'sd14 <<< F;

  logic        [11:0] va;          // |v|, 3 integer + 9 fraction bits
  logic        [15:0] sq;          // v^2, Q6.9
  logic signed [15:0] dv, du, vn;
  logic signed [15:0] d_q;         // d in Q6.9

  assign va = v[15] ? 12'(-v) : v[11:0];

  // truncated squarer: sum_i va[i] * (va << i) >> 9, plus rounding constant
  always_comb begin
    sq = 16'(RC);
    for (int i = 0; i < 12; i++)
      if (va[i]) sq = sq + 16'((24'(va) << i) >> F);
  end

  assign dv  = $signed(sq >> 2) + (v <<< 2) + v + C14 - u + i_in;
  assign du  = (v >>> 2) - u;
  assign vn  = v + (dv >>> 5);
  assign d_q = $signed({2'b00, d, 6'b0});        // Q5.3 -> Q6.9

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= C_RESET; u <= C_RESET >>> 2; spike <= 1'b0;
    end else if (en) begin
      if (v >= V_TH) begin
        v     <= C_RESET;
        u     <= u + d_q;
        spike <= 1'b1;
      end else begin
        v     <= (vn < V_MIN) ? V_MIN : vn;
        u     <= u + (du >>> 11);
        spike <= 1'b0;
      end
    end else spike <= 1'b0;
  end
endmodule
