// cordic_mul: iterative CORDIC (linear, rotation-mode) multiplier, z = x * y.
// The multiplicand x is driven towards zero by adding or subtracting 2^-i
// for i = -K..K (2K+1 iterations); each step adds or subtracts 2^-i * y to
// the product accumulator z.  Operands and result are signed fixed point
// with F fractional bits in a W-bit word.  Internally the operands are
// extended by K fractional and K+1 integer bits (51 bits for W=22, K=14),
// as the thesis describes, so shifts never lose the sign or overflow.
// Like the thesis' unit it has two states per iteration: state 0 adds or
// subtracts and advances the counter, state 1 tests the counter's MSB and
// otherwise shifts the two right-shift registers.  The counter starts at
// 32-(2K+1) ("000011" for K=14), so its bit 5 flags the last iteration.
// Interface: pulse start with x and y valid; done pulses for one cycle
// when z is valid; z holds until the next start.  Latency 2*(2K+1)+1
// cycles.  |x| must be below 2^(K+1).  The handshake and the truncation of
// the result to W bits are this design's choices.
module cordic_mul #(
  parameter int W = 22,
  parameter int F = 12,
  parameter int K = 14
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
  localparam int WI = W + 2*K + 1;          // internal width
  localparam int CW = 6;                    // iteration counter width
  localparam logic [CW-1:0] CNT_INIT = CW'(32 - (2*K + 1));

  typedef enum logic [1:0] {IDLE, ST0, ST1} state_t;
  state_t state;

  logic signed [WI-1:0] xr, zr, yr;         // residual, product, shifted y
  logic        [WI-1:0] pw;                 // 2^-i in internal format
  logic        [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; xr <= '0; zr <= '0; yr <= '0; pw <= '0; cnt <= '0;
      done <= 1'b0; z <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          xr    <= WI'(x) <<< K;               // align x to K extra fraction bits
          yr    <= WI'(y) <<< (2*K);           // y * 2^K, aligned ("y<<K")
          pw    <= WI'(1) << (F + 2*K);        // 2^K, aligned
          zr    <= '0;
          cnt   <= CNT_INIT;
          state <= ST0;
        end
        ST0: begin
          if (!xr[WI-1]) begin
            xr <= xr - $signed(pw);
            zr <= zr + yr;
          end else begin
            xr <= xr + $signed(pw);
            zr <= zr - yr;
          end
          cnt   <= cnt + 1'b1;
          state <= ST1;
        end
        ST1: begin
          if (cnt[CW-1]) begin
            z     <= W'(zr >>> K);
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
