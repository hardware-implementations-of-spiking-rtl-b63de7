// snn_pkg: sizes and table functions shared by the spiking-network blocks.
// The network is a two-layer spiking classifier: NPIX input pixels of which
// NKEEP are retained by Selective Input Sparsity (SIS), NOUT output neurons,
// NSTEP exposure time steps with dt = 0.25, 8-bit datapaths and 5-bit
// output spike counters (all the thesis' numbers for the SIS MNIST-digits
// network).  The spike thresholds are powers of two (128 for the input
// layer, 32 for the SIS-digits output layer).
// The trained weights and the trained SIS index list are data, not logic,
// and are not given numerically; sis_index() and snn_weight() below supply
// stand-in contents (evenly spaced pixel indices and a fixed pseudo-random
// weight pattern).  The ROMs can instead be loaded from files through their
// file-name parameters.
package snn_pkg;
  localparam int NPIX      = 784;   // pixels per image (28 x 28)
  localparam int NKEEP     = 187;   // pixels retained by SIS (digits)
  localparam int NOUT      = 10;    // output classes
  localparam int NSTEP     = 16;    // exposure time steps per image
  localparam int CNT_W     = 5;     // spike counter width
  localparam int VTH_IN    = 128;   // input-layer threshold
  localparam int VTH_OUT   = 32;    // output-layer threshold (SIS digits)
  localparam int DT_SHIFT  = 2;     // dt = 0.25
  localparam int AW        = 10;    // pixel address width

  // k-th retained pixel (ascending), stand-in for the trained SIS list
  function automatic int sis_index(input int k, input int npix, input int nkeep);
    return (k * npix + npix / 2) / nkeep;
  endfunction

  // stand-in weight for retained pixel k and output o (signed 8 bit)
  function automatic logic signed [7:0] snn_weight(input int k, input int o);
    int unsigned s;
    s = (32'(k) * 32'h9E37_79B1) ^ 32'(o * 40503 + 12345);
    s = s ^ (s >> 13);
    s = s * 1103515245 + 12345;
    return 8'(s >> 16);
  endfunction
endpackage
