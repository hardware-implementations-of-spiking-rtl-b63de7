// snn_weight_rom: read-only memory of the trained synaptic weights, one row
// of NOUT signed 8-bit weights per retained input pixel.  When an input
// spike occurs the network presents that pixel's index with re high; one
// clock later the whole row appears on w (synchronous read, as a block RAM)
// and weight_en is high for that one cycle, so the row is applied to all
// output neurons in parallel and no update happens otherwise.
// Contents: read from INIT_FILE with $readmemh (NKEEP*NOUT hex bytes, row
// by row) when it is given, otherwise the stand-in pattern of
// snn_pkg::snn_weight().  The thesis' trained weights are not given as
// numbers.
module snn_weight_rom #(
  parameter int    NKEEP     = snn_pkg::NKEEP,
  parameter int    NOUT      = snn_pkg::NOUT,
  parameter int    AW        = snn_pkg::AW,
  parameter string INIT_FILE = ""
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    re,
  input  logic [AW-1:0]           addr,
  output logic signed [7:0]       w [NOUT],
  output logic                    weight_en
);
  logic [7:0] rom [NKEEP*NOUT];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
    else
      for (int k = 0; k < NKEEP; k++)
        for (int o = 0; o < NOUT; o++)
          rom[k*NOUT + o] = snn_pkg::snn_weight(k, o);
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int o = 0; o < NOUT; o++)
        w[o] <= $signed(rom[int'(addr)*NOUT + o]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) weight_en <= 1'b0;
    else        weight_en <= re;
endmodule
