// snn_input_neuron: unsigned 8-bit integrate-and-fire neuron that converts a
// pixel intensity into a spike train (rate coding).  Combinational; the
// network time-multiplexes one instance over all retained pixels, reading
// and writing the per-pixel membrane potential from a RAM.
//   v' = v + (pixel >> DT_SHIFT)      (dt = 0.25, no leak)
//   if v' reaches the threshold VTH (a power of two): spike, v' = 0
// The threshold is detected from the bits at and above the threshold bit,
// which for the reachable range (v < VTH + 64) is the single threshold bit
// the thesis tests.  The thesis writes the threshold test on v[n]; here it
// is applied to the freshly integrated value, so a spike is emitted in the
// same update that crosses the threshold (this design's choice).
module snn_input_neuron #(
  parameter int VTH      = 128,
  parameter int DT_SHIFT = 2
) (
  input  logic [7:0] v_in,      // stored membrane potential
  input  logic [7:0] pixel,     // input current
  output logic [7:0] v_out,     // potential to store back
  output logic       spike
);
  localparam int TB = $clog2(VTH);
  logic [8:0] sum;

  assign sum   = {1'b0, v_in} + 9'(pixel >> DT_SHIFT);
  assign spike = |sum[8:TB];
  assign v_out = spike ? 8'd0 : sum[7:0];
endmodule
