// snn_network: two-layer spiking classifier with Selective Input Sparsity.
// Operation for one image:
//  1. Load: snn_image_loader takes the image pixel by pixel over the
//     valid_in/new_data handshake and keeps the NKEEP retained pixels in the
//     pixel RAM; each stored slot's input-neuron potential is cleared, and
//     the output neurons and spike counters are reset at the handshake.
//  2. Expose: NSTEP passes over the stored pixels, one pixel per clock.
//     For pixel j the pixel and its membrane potential are read, the shared
//     input neuron integrates pixel*dt and writes the potential back; a spike
//     reads row j of the weight ROM, and on the next clock (weight_en) all
//     NOUT output neurons integrate their weight*dt in parallel.  Output
//     spikes increment 5-bit counters.
//  3. Classify: after the last pass and a 3-cycle pipeline drain the
//     comparison tree picks the output with the most spikes; class_out is
//     valid with class_valid (one-cycle pulse) and the network is ready for
//     the next image.
// Timing: class_valid rises NSTEP*NKEEP + 6 clocks after the clock edge
// that takes the last retained pixel (one clock per presented pixel before
// that, plus any stall cycles).
// The thesis gives the blocks, the handshake, the sizes and the sequence;
// the one-pixel-per-clock pipeline and its timing are this design's.
module snn_network #(
  parameter int    NPIX        = snn_pkg::NPIX,
  parameter int    NKEEP       = snn_pkg::NKEEP,
  parameter int    NOUT        = snn_pkg::NOUT,
  parameter int    NSTEP       = snn_pkg::NSTEP,
  parameter int    CW          = snn_pkg::CNT_W,
  parameter int    VTH_IN      = snn_pkg::VTH_IN,
  parameter int    VTH_OUT     = snn_pkg::VTH_OUT,
  parameter string WEIGHT_FILE = "",
  parameter string INDEX_FILE  = ""
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_in,
  input  logic [7:0]              pix_in,
  input  logic [snn_pkg::AW-1:0]  pix_addr,
  output logic                    new_data,
  output logic                    class_valid,
  output logic [$clog2(NOUT)-1:0] class_out,
  output logic [CW-1:0]           spike_count [NOUT],
  output logic                    in_spike,      // input-layer spike (observation)
  output logic [NOUT-1:0]         out_spike      // output-layer spikes (observation)
);
  localparam int AW = snn_pkg::AW;
  localparam int DT = snn_pkg::DT_SHIFT;

  typedef enum logic [2:0] {N_IDLE, N_LOAD, N_RUN, N_DRAIN, N_DONE} nstate_t;
  nstate_t state;

  // loader
  logic          ld_we, eod;
  logic [AW-1:0] ld_waddr;
  logic [7:0]    ld_wdata;
  logic          handshake;

  snn_image_loader #(.NPIX(NPIX), .NKEEP(NKEEP), .AW(AW), .INIT_FILE(INDEX_FILE)) u_loader (
    .clk, .rst_n, .enable(state == N_IDLE), .valid_in, .pix_in, .pix_addr,
    .new_data, .ram_we(ld_we), .ram_waddr(ld_waddr), .ram_wdata(ld_wdata),
    .end_of_data(eod));

  assign handshake = new_data && valid_in;

  // exposure counters
  logic [AW-1:0] j;
  logic [4:0]    t;
  logic [1:0]    drain;
  logic          run;
  assign run = (state == N_RUN);

  // pixel RAM and membrane RAM
  logic [7:0] pix_rd, vm_rd, vm_new;
  snn_ram #(.DEPTH(NKEEP), .DW(8), .AW(AW)) u_pix (
    .clk, .we(ld_we), .waddr(ld_waddr), .wdata(ld_wdata), .raddr(j), .rdata(pix_rd));
  snn_ram #(.DEPTH(NKEEP), .DW(8), .AW(AW)) u_vmem (
    .clk, .we(ld_we || run), .waddr(run ? j : ld_waddr), .wdata(run ? vm_new : 8'd0),
    .raddr(j), .rdata(vm_rd));

  // shared input neuron
  logic spk;
  snn_input_neuron #(.VTH(VTH_IN), .DT_SHIFT(DT)) u_in (
    .v_in(vm_rd), .pixel(pix_rd), .v_out(vm_new), .spike(spk));
  assign in_spike = run && spk;

  // weights
  logic signed [7:0] w [NOUT];
  logic              wen;
  snn_weight_rom #(.NKEEP(NKEEP), .NOUT(NOUT), .AW(AW), .INIT_FILE(WEIGHT_FILE)) u_rom (
    .clk, .rst_n, .re(in_spike), .addr(j), .w, .weight_en(wen));

  // output layer and counters
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    snn_output_neuron #(.VTH(VTH_OUT), .DT_SHIFT(DT)) u_on (
      .clk, .rst_n, .srst(handshake), .weight_en(wen), .weight(w[o]),
      .v(), .spike(out_spike[o]));
    snn_spike_counter #(.CW(CW)) u_cnt (
      .clk, .rst_n, .srst(handshake), .inc(out_spike[o]), .count(spike_count[o]));
  end

  logic [$clog2(NOUT)-1:0] winner;
  snn_argmax #(.N(NOUT), .CW(CW)) u_arg (.counts(spike_count), .idx(winner), .max_count());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= N_IDLE; j <= '0; t <= '0; drain <= '0;
      class_valid <= 1'b0; class_out <= '0;
    end else begin
      class_valid <= 1'b0;
      unique case (state)
        N_IDLE:  if (handshake) state <= N_LOAD;
        N_LOAD:  if (eod) begin
          j <= '0; t <= '0; state <= N_RUN;
        end
        N_RUN: begin
          if (int'(j) == NKEEP - 1) begin
            j <= '0;
            if (int'(t) == NSTEP - 1) begin
              drain <= '0;
              state <= N_DRAIN;
            end
            t <= t + 1'b1;
          end else j <= j + 1'b1;
        end
        N_DRAIN: begin                    // weight read, neuron update, count
          drain <= drain + 1'b1;
          if (drain == 2'd2) state <= N_DONE;
        end
        N_DONE: begin
          class_out   <= winner;
          class_valid <= 1'b1;
          state       <= N_IDLE;
        end
        default: state <= N_IDLE;
      endcase
    end
  end
endmodule
