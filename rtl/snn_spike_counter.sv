// snn_spike_counter: unsigned synchronous counter of an output neuron's
// spikes during one image exposure.  srst clears it to zero at the start of
// an image; each cycle with inc high adds one.  The 5-bit width is the
// thesis' choice; as in the thesis it wraps on overflow.
module snn_spike_counter #(
  parameter int CW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          srst,
  input  logic          inc,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    count <= '0;
    else if (srst) count <= '0;
    else if (inc)  count <= count + 1'b1;
endmodule
