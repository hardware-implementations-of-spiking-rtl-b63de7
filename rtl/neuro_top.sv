// neuro_top: the four independent neuromorphic designs side by side, each
// with its own ports; they share only the clock and the active-low reset.
//  * snn_network  - SIS spiking classifier (image in, class out)
//  * hh_neuron    - CORDIC Hodgkin-Huxley neuron with run-time parameters
//  * idevs_ctrl + izh_neuron  - Izhikevich neuron sampled by I-DEVS
//  * idevs_ctrl + adex_neuron - AdEx neuron sampled by I-DEVS
//  * homin_neuron - HOMIN neuron, behaviour set by d
// Each I-DEVS controller gates its neuron: the neuron's clock enable, input
// current and time step come from the controller, and the neuron's done
// flag returns to it.  The Izhikevich parameters a, b, c, d are top-level
// inputs (Q18.14).  All ports are plain vectors; the ten 5-bit spike
// counters of the network are packed into snn_spike_counts.  Timing of each
// part is that of its module (see the module headers).
module neuro_top (
  input  logic                     clk,
  input  logic                     rst_n,
  // spiking network
  input  logic                     snn_valid_in,
  input  logic [7:0]               snn_pix_in,
  input  logic [snn_pkg::AW-1:0]   snn_pix_addr,
  output logic                     snn_new_data,
  output logic                     snn_class_valid,
  output logic [3:0]               snn_class_out,
  output logic [snn_pkg::NOUT*snn_pkg::CNT_W-1:0] snn_spike_counts, // output o at [o*5 +: 5]
  output logic                     snn_in_spike,
  output logic [snn_pkg::NOUT-1:0] snn_out_spike,
  // Hodgkin-Huxley neuron
  input  logic                     hh_en,
  input  logic signed [21:0]       hh_i_in,
  input  logic signed [15:0]       hh_cm_inv,
  input  logic signed [15:0]       hh_v_na,
  input  logic signed [15:0]       hh_v_k,
  input  logic signed [15:0]       hh_v_l,
  input  logic signed [15:0]       hh_g_na,
  input  logic signed [15:0]       hh_g_k,
  input  logic signed [15:0]       hh_g_l,
  output logic signed [21:0]       hh_v,
  output logic signed [21:0]       hh_n,
  output logic signed [21:0]       hh_m,
  output logic signed [21:0]       hh_h,
  output logic                     hh_step_done,
  // I-DEVS Izhikevich neuron
  input  logic signed [32:0]       izh_i_in,
  input  logic signed [32:0]       izh_a,
  input  logic signed [32:0]       izh_b,
  input  logic signed [32:0]       izh_c,
  input  logic signed [32:0]       izh_d,
  output logic signed [32:0]       izh_v,
  output logic                     izh_spike,
  output logic                     izh_active,
  output logic [1:0]               izh_range,
  output logic [31:0]              izh_evals,
  // I-DEVS AdEx neuron
  input  logic signed [36:0]       adex_i_in,
  output logic signed [36:0]       adex_v,
  output logic                     adex_spike,
  output logic                     adex_active,
  output logic [1:0]               adex_range,
  output logic [31:0]              adex_evals,
  // HOMIN neuron
  input  logic                     homin_en,
  input  logic signed [15:0]       homin_i_in,
  input  logic        [7:0]        homin_d,
  output logic signed [15:0]       homin_v,
  output logic                     homin_spike
);
  logic [snn_pkg::CNT_W-1:0] snn_cnt [snn_pkg::NOUT];
  for (genvar o = 0; o < snn_pkg::NOUT; o++)
    assign snn_spike_counts[o*snn_pkg::CNT_W +: snn_pkg::CNT_W] = snn_cnt[o];

  snn_network u_snn (
    .clk, .rst_n, .valid_in(snn_valid_in), .pix_in(snn_pix_in), .pix_addr(snn_pix_addr),
    .new_data(snn_new_data), .class_valid(snn_class_valid), .class_out(snn_class_out),
    .spike_count(snn_cnt), .in_spike(snn_in_spike), .out_spike(snn_out_spike));

  hh_neuron u_hh (
    .clk, .rst_n, .en(hh_en), .i_in(hh_i_in), .cm_inv(hh_cm_inv), .v_na(hh_v_na),
    .v_k(hh_v_k), .v_l(hh_v_l), .g_na(hh_g_na), .g_k(hh_g_k), .g_l(hh_g_l),
    .v(hh_v), .n(hh_n), .m(hh_m), .h(hh_h), .step_done(hh_step_done));

  // I-DEVS + Izhikevich (I thresholds 10 and 20)
  logic signed [32:0] izh_ig;
  logic [3:0]         izh_dt;
  logic               izh_done;
  idevs_ctrl #(.W(33)) u_idevs_izh (
    .clk, .rst_n, .i_in(izh_i_in), .neuron_done(izh_done), .neuron_en(izh_active),
    .i_gated(izh_ig), .dt_shift(izh_dt), .range_sel(izh_range), .sample());
  izh_neuron u_izh (
    .clk, .rst_n, .en(izh_active), .i_in(izh_ig), .dt_shift(izh_dt),
    .a(izh_a), .b(izh_b), .c(izh_c), .d(izh_d), .v(izh_v), .u(),
    .spike(izh_spike), .done(izh_done), .evals(izh_evals));

  // I-DEVS + AdEx (I thresholds 400 pA and 800 pA)
  logic signed [36:0] adex_ig;
  logic [3:0]         adex_dt;
  logic               adex_done;
  idevs_ctrl #(.W(37), .ITH1(37'sd400 <<< 23), .ITH2(37'sd800 <<< 23)) u_idevs_adex (
    .clk, .rst_n, .i_in(adex_i_in), .neuron_done(adex_done), .neuron_en(adex_active),
    .i_gated(adex_ig), .dt_shift(adex_dt), .range_sel(adex_range), .sample());
  adex_neuron u_adex (
    .clk, .rst_n, .en(adex_active), .i_in(adex_ig), .dt_shift(adex_dt),
    .v(adex_v), .w(), .spike(adex_spike), .done(adex_done), .evals(adex_evals));

  homin_neuron u_homin (
    .clk, .rst_n, .en(homin_en), .i_in(homin_i_in), .d(homin_d),
    .v(homin_v), .u(), .spike(homin_spike));
endmodule
