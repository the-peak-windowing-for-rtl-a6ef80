// papr_tx_top: transmit baseband chain of the SDR base-station FPGA.
//
//   source (modem input or wfm_ram playback)
//     -> papr_reduction (peak windowing, Th and window programmable)
//     -> lp_fir_iq (40-tap programmable low-pass FIR)
//     -> y to the transceiver DAC interface.
// The clock is 4x the sample rate (122.88 MHz for 30.72 MS/s); samples move
// with a one-clock strobe every 4 clocks. src_sel = 1 plays the waveform RAM,
// 0 takes x_in/xen_in from the baseband modem (which must then also strobe
// once every 4 clocks). The three coefficient sets (PWFIR1, PWFIR2,
// low-pass FIR; 20 coefficients each) are loaded through one port selected by
// coef_sel. pw_bypass and lpf_bypass bypass the two processing blocks.
// Latency input strobe -> y_valid: 250 + 5 = 255 clocks with both blocks
// active. The modem, transceiver and power amplifier are outside this design.
module papr_tx_top
  import pw_pkg::*;
#(
  parameter int unsigned WFM_DEPTH = 4096,
  parameter int unsigned NMUL      = 5,
  parameter int unsigned PHASES    = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // source selection
  input  logic      src_sel,       // 0: modem, 1: waveform RAM
  input  logic      xen_in,        // modem sample strobe
  input  iq_t       x_in,          // modem sample
  // waveform RAM upload and playback
  input  logic      wfm_wr_en,
  input  logic [$clog2(WFM_DEPTH)-1:0] wfm_wr_addr,
  input  iq_t       wfm_wr_data,
  input  logic      wfm_play,
  input  logic [$clog2(WFM_DEPTH)-1:0] wfm_last,
  // configuration
  input  gain_t     th,
  input  logic      pw_bypass,
  input  logic      lpf_bypass,
  input  logic      coef_we,
  input  coef_sel_e coef_sel,
  input  logic [$clog2(NMUL*PHASES)-1:0] coef_addr,
  input  coef_t     coef_data,
  // output
  output iq_t       y,
  output logic      y_valid,
  // monitors
  output logic      clip_evt,
  output logic      peak_evt,
  output logic      fb_evt
);
  iq_t   wfm_x, src_x, pw_y;
  logic  wfm_xen, src_xen, pw_v;
  gain_t b_unused;

  wfm_ram #(.DEPTH(WFM_DEPTH), .PHASES(PHASES)) u_wfm (
    .clk, .rst_n, .wr_en(wfm_wr_en), .wr_addr(wfm_wr_addr), .wr_data(wfm_wr_data),
    .play(wfm_play && src_sel), .last(wfm_last), .x(wfm_x), .xen(wfm_xen)
  );

  assign src_x   = src_sel ? wfm_x   : x_in;
  assign src_xen = src_sel ? wfm_xen : xen_in;

  papr_reduction #(.NMUL(NMUL), .PHASES(PHASES)) u_papr (
    .clk, .rst_n, .xen(src_xen), .x(src_x), .th, .bypass(pw_bypass),
    .coef_we1(coef_we && coef_sel == SEL_PWFIR1),
    .coef_we2(coef_we && coef_sel == SEL_PWFIR2),
    .coef_addr, .coef_data,
    .y(pw_y), .out_valid(pw_v), .b_mon(b_unused),
    .clip_evt, .peak_evt, .fb_evt
  );

  lp_fir_iq #(.NMUL(NMUL), .PHASES(PHASES)) u_lpf (
    .clk, .rst_n, .xen(pw_v), .x(pw_y), .bypass(lpf_bypass),
    .coef_we(coef_we && coef_sel == SEL_LPF), .coef_addr, .coef_data,
    .y, .y_valid
  );
endmodule
