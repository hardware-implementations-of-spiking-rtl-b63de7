// snn_image_loader: receives an image one 8-bit pixel per clock and stores
// only the pixels retained by Selective Input Sparsity (SIS).
// Handshake: while idle the loader raises new_data (ready for an image).
// The image source raises valid_in; the first cycle with both high is the
// handshake, and from the next cycle the source presents one pixel per cycle
// with its address (pix_addr) while valid_in is high (valid_in low stalls).
// A look-up table holds the ascending addresses of the retained pixels and
// a pointer into it starts at entry 0.  When the presented address equals
// the entry under the pointer, the pixel is written to input-RAM slot
// <pointer> and the pointer advances.  When the last entry has been loaded,
// end_of_data pulses; the remaining pixels of the image are ignored up to
// the one with the last address (NPIX-1), after which the loader is idle
// again.  For the fully connected baseline every address is
// retained (NKEEP = NPIX).  The table comes from INIT_FILE ($readmemh) or,
// when none is given, from snn_pkg::sis_index() (a stand-in: the trained
// index list is not given as numbers).  ram_we also clears the slot's
// membrane potential in the network.
module snn_image_loader #(
  parameter int    NPIX      = snn_pkg::NPIX,
  parameter int    NKEEP     = snn_pkg::NKEEP,
  parameter int    AW        = snn_pkg::AW,
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,       // network idle and able to accept an image
  input  logic          valid_in,
  input  logic [7:0]    pix_in,
  input  logic [AW-1:0] pix_addr,
  output logic          new_data,
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  output logic [7:0]    ram_wdata,
  output logic          end_of_data
);
  logic [AW-1:0] lut [NKEEP];
  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, lut);
    else
      for (int k = 0; k < NKEEP; k++) lut[k] = AW'(snn_pkg::sis_index(k, NPIX, NKEEP));
  end

  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_TAIL} lstate_t;
  lstate_t       state;
  logic [AW-1:0] ptr;
  logic          match;

  assign new_data  = (state == L_IDLE) && enable;
  assign match     = (state == L_LOAD) && valid_in && (pix_addr == lut[ptr]);
  assign ram_we    = match;
  assign ram_waddr = ptr;
  assign ram_wdata = pix_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE; ptr <= '0; end_of_data <= 1'b0;
    end else begin
      end_of_data <= 1'b0;
      unique case (state)
        L_IDLE: if (new_data && valid_in) begin
          ptr   <= '0;
          state <= L_LOAD;
        end
        L_LOAD: if (match) begin
          if (int'(ptr) == NKEEP - 1) begin
            end_of_data <= 1'b1;
            state       <= (int'(pix_addr) == NPIX - 1) ? L_IDLE : L_TAIL;
          end
          ptr <= ptr + 1'b1;
        end
        L_TAIL: if (valid_in && int'(pix_addr) == NPIX - 1) state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
