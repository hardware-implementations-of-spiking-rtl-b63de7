// snn_ram: simple dual-port RAM, one synchronous write port and one
// asynchronous read port (distributed/LUT RAM).  Used for the input pixel
// store and for the membrane potentials of the time-multiplexed input
// neuron.  The asynchronous read lets the network read a pixel, update its
// neuron and write the new potential back in the same cycle.  The thesis
// names the RAM; its port structure is this design's choice.
module snn_ram #(
  parameter int DEPTH = 187,
  parameter int DW    = 8,
  parameter int AW    = 10
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && (int'(waddr) < DEPTH)) mem[IW'(waddr)] <= wdata;

  assign rdata = (int'(raddr) < DEPTH) ? mem[IW'(raddr)] : '0;
endmodule
