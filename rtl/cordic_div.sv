// cordic_div: iterative CORDIC (linear, vectoring-mode) divider, z = x / y.
// The dividend residual is driven towards zero by subtracting or adding
// 2^-i * y for i = -K..K (2K+1 iterations) while the quotient accumulates
// +/-2^-i.  Operands and result are signed fixed point with F fractional
// bits in W bits; internally they are extended by K fractional and K+1
// integer bits (39 bits for W=22, K=8), as the thesis describes.  The
// iteration runs on the magnitudes and the sign of the quotient is fixed at
// the end from the operand signs (the thesis selects between the quotient
// and its two's complement by the operand sign bits).  Two states per
// iteration, counter initialised to 32-(2K+1) ("001111" for K=8) and
// finished when its bit 5 is set.  Interface: pulse start; done pulses
// when z is valid; z holds until the next start.  Latency 2*(2K+1)+1
// cycles.  The quotient's absolute error is about 2^-K; a zero divisor
// gives the largest quotient the iteration can reach (about 2^(K+1)).
module cordic_div #(
  parameter int W = 22,
  parameter int F = 12,
  parameter int K = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] z
);
  localparam int WI = W + 2*K + 1;
  localparam int CW = 6;
  localparam logic [CW-1:0] CNT_INIT = CW'(32 - (2*K + 1));

  typedef enum logic [1:0] {IDLE, ST0, ST1} state_t;
  state_t state;

  logic signed [WI-1:0] xr, zr, yr;
  logic        [WI-1:0] pw;
  logic        [CW-1:0] cnt;
  logic                 neg;               // quotient sign
  logic signed [W-1:0]  xa, ya;

  assign xa = x[W-1] ? -x : x;
  assign ya = y[W-1] ? -y : y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; xr <= '0; zr <= '0; yr <= '0; pw <= '0; cnt <= '0;
      neg <= 1'b0; done <= 1'b0; z <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          xr    <= WI'(xa) <<< K;
          yr    <= WI'(ya) <<< (2*K);            // "y<<K"
          pw    <= WI'(1) << (F + 2*K);          // 2^K
          zr    <= '0;
          neg   <= x[W-1] ^ y[W-1];
          cnt   <= CNT_INIT;
          state <= ST0;
        end
        ST0: begin
          if (!xr[WI-1]) begin
            xr <= xr - yr;
            zr <= zr + $signed(pw);
          end else begin
            xr <= xr + yr;
            zr <= zr - $signed(pw);
          end
          cnt   <= cnt + 1'b1;
          state <= ST1;
        end
        ST1: begin
          if (cnt[CW-1]) begin
            z     <= neg ? -W'(zr >>> K) : W'(zr >>> K);
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            pw    <= pw >> 1;
            yr    <= yr >>> 1;
            state <= ST0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
