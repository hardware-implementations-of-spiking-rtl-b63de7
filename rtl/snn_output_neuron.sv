// snn_output_neuron: signed 8-bit integrate-and-fire output neuron.
// On each cycle with weight_en high it integrates the weight of the input
// spike being applied, scaled by dt = 0.25 (arithmetic shift right by two):
//   v' = v + (w >>> DT_SHIFT)
//   if v' >= VTH (sign bit clear and a bit at or above the threshold bit
//   set): spike = 1, v' = 0
//   if v' <= -65 (sign bit set and bit 6 clear): v' = -65 (clamp)
// The clamp keeps the 8-bit register from rolling over: the most negative
// step is -32, so the potential never goes below -97.  srst is the
// synchronous reset to zero used between images.  spike is a registered
// one-cycle pulse.  The test on the integrated value (not on the previous
// one) is this design's choice; the thresholds, clamp and reset follow the
// thesis.
module snn_output_neuron #(
  parameter int VTH      = 32,
  parameter int DT_SHIFT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              srst,
  input  logic              weight_en,
  input  logic signed [7:0] weight,
  output logic signed [7:0] v,
  output logic              spike
);
  localparam int TB = $clog2(VTH);
  localparam logic signed [7:0] V_CLAMP = -8'sd65;

  logic signed [7:0] sum;
  logic              fire, clamp;

  assign sum   = v + (weight >>> DT_SHIFT);
  assign fire  = !sum[7] && (|sum[6:TB]);
  assign clamp = sum[7] && !sum[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; spike <= 1'b0;
    end else if (srst) begin
      v <= '0; spike <= 1'b0;
    end else begin
      spike <= 1'b0;
      if (weight_en) begin
        if (fire) begin
          v <= '0; spike <= 1'b1;
        end else if (clamp) v <= V_CLAMP;
        else               v <= sum;
      end
    end
  end
endmodule
