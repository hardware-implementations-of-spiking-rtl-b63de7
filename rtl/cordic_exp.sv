// cordic_exp: iterative CORDIC exponential, z = e^x.
// x is signed fixed point (W bits, F fractional bits).  It is split into a
// signed integer part x_int (the upper W-F bits, i.e. floor(x)) and a
// fraction x_frac in [0,1).  Phase 1 (states ST0/ST1, K iterations): a
// right-shift register holds 2^-i, starting at 2^-1; whenever
// x_frac >= 2^-i, 2^-i is removed from x_frac and z is multiplied by
// e^(2^-i).  That multiply is done by shift-and-add over the set bits of the
// constant e^(2^-i), chosen by a multiplexer on i.  The iteration counter
// starts at 16-K ("000110" for K=10) and its bit 4 ends the phase.
// Phase 2 (state ST2): z is multiplied by e (x_int > 0) or by 1/e (x_int < 0)
// once per cycle, |x_int| times, both as constant shift-and-add.
// z is kept with ZF fractional bits internally so that small results keep
// their precision, and saturates at the largest W-bit value.
// Interface: pulse start with x valid; done pulses for one cycle with z
// valid; z holds until the next start.  Latency 2K+|x_int|+2 cycles.
// The comparison ">=" (the algorithm listing prints ">") and the internal
// precision ZF are this design's choices.
module cordic_exp #(
  parameter int W  = 22,
  parameter int F  = 12,
  parameter int K  = 10,
  parameter int ZF = 28                     // internal fraction bits of z
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] z
);
  localparam int IW = W - F;                // integer bits of x (incl. sign)
  localparam int ZI = W - F + 1;            // internal integer bits of z
  localparam int ZW = ZI + ZF;              // internal width of z (unsigned)
  localparam int CF = 30;                   // fraction bits of the constants
  localparam logic [ZW-1:0] ZSAT = ZW'((64'(1) << (W - 1)) - 1) << (ZF - F);

  // e^(2^-i) for i = 1..16, e and 1/e, in unsigned Q2.30
  localparam logic [31:0] EXP_TAB [1:16] = '{
    32'h6984_A638, 32'h522D_78F1, 32'h4885_8117, 32'h4420_AD5E,
    32'h4208_1580, 32'h4102_02AD, 32'h4080_8056, 32'h4040_200B,
    32'h4020_0801, 32'h4010_0200, 32'h4008_0080, 32'h4004_0020,
    32'h4002_0008, 32'h4001_0002, 32'h4000_8001, 32'h4000_4000};
  localparam logic [31:0] E_Q     = 32'hADF8_5459;   // e
  localparam logic [31:0] E_INV_Q = 32'h178B_5636;   // 1/e

  typedef enum logic [1:0] {IDLE, ST0, ST1, ST2} state_t;
  state_t state;

  logic        [ZW-1:0]  zr;
  logic        [F-1:0]   xf;               // fractional part residual
  logic signed [IW-1:0]  xi;               // integer part
  logic        [IW-1:0]  xi_abs, icnt;     // |x_int| and phase-2 counter
  logic        [F-1:0]   pw;               // 2^-i
  logic        [4:0]     cnt;
  logic        [4:0]     idx;              // i = 1..K

  // shift-and-add multiply of z by an unsigned Q2.30 constant
  function automatic logic [ZW-1:0] cmul(input logic [ZW-1:0] a, input logic [31:0] c);
    logic [ZW+2:0] acc;
    acc = '0;
    for (int b = 0; b < 32; b++)
      if (c[b]) acc = acc + (ZW+3)'(((ZW+33)'(a) << b) >> CF);
    return (acc > (ZW+3)'(ZSAT)) ? ZSAT : ZW'(acc);
  endfunction

  assign idx = cnt - 5'(16 - K) + 5'(1);   // i for the current iteration

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; zr <= '0; xf <= '0; xi <= '0; xi_abs <= '0; icnt <= '0;
      pw <= '0; cnt <= '0; done <= 1'b0; z <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          zr     <= ZW'(1) << ZF;                // z = 1
          xf     <= x[F-1:0];
          xi     <= x[W-1:F];
          xi_abs <= x[W-1] ? -x[W-1:F] : x[W-1:F];
          pw     <= F'(1) << (F - 1);            // 2^-1
          cnt    <= 5'(16 - K);
          state  <= ST0;
        end
        ST0: begin                               // conditional e^(2^-i)
          if (xf >= pw) begin
            xf <= xf - pw;
            zr <= cmul(zr, EXP_TAB[idx]);
          end
          cnt   <= cnt + 1'b1;
          state <= ST1;
        end
        ST1: begin
          if (cnt[4]) begin
            icnt  <= '0;
            state <= ST2;
          end else begin
            pw    <= pw >> 1;
            state <= ST0;
          end
        end
        ST2: begin                               // integer part: * e or / e
          if (icnt == xi_abs) begin
            z     <= $signed(W'(zr >> (ZF - F)));
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            zr   <= cmul(zr, xi[IW-1] ? E_INV_Q : E_Q);
            icnt <= icnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
