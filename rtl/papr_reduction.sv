// papr_reduction: the peak-windowing PAPR reduction block.
//
// Chain (all at the sample rate, pipeline registers enabled by xen):
//   envelope e(n) = |x(n)|  ->  clipping function c(n) = min(1, Th/e(n))
//   -> peak search cp(n) (local minima of c over 7 samples)
//   -> windowing with feedback (PWFIR1/PWFIR2) giving b(n), y(n) = b(n) x(n).
// The I/Q samples are delayed by pw_pkg::PRE_LAT = 41 samples so that they
// reach the windowing stage together with their cp(n).
// Interface: x with strobe xen, exactly one sample every PHASES (4) clocks
// while streaming; y with a one-clock out_valid per sample. Latency from xen
// to out_valid is (PRE_LAT + 20) samples + 6 clocks = 250 clocks.
// th is the clipping threshold on the I/Q scale (0.7 * 2**17 for Th = 0.7).
// bypass = 1 leaves the samples unchanged (b = 1) with the same latency, as
// when the threshold is set to 1.0 in the reference measurements.
// clip_evt, peak_evt and fb_evt are one-clock monitor pulses (a sample was
// above Th, a peak entered the window filter, the feedback reduced a peak).
module papr_reduction
  import pw_pkg::*;
#(
  parameter int unsigned NMUL   = 5,
  parameter int unsigned PHASES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  xen,
  input  iq_t   x,
  input  gain_t th,
  input  logic  bypass,
  input  logic  coef_we1,
  input  logic  coef_we2,
  input  logic [$clog2(NMUL*PHASES)-1:0] coef_addr,
  input  coef_t coef_data,
  output iq_t   y,
  output logic  out_valid,
  output gain_t b_mon,
  output logic  clip_evt,
  output logic  peak_evt,
  output logic  fb_evt
);
  gain_t env, c, cp;
  iq_t   xd [PRE_LAT];

  pw_envelope    u_env  (.clk, .rst_n, .en(xen), .xi(x.i), .xq(x.q), .env);
  pw_clip_gain   u_clip (.clk, .rst_n, .en(xen), .env, .th, .c);
  pw_peak_search u_peak (.clk, .rst_n, .en(xen), .c, .cp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PRE_LAT; k++) xd[k] <= '0;
    end else if (xen) begin
      xd[0] <= x;
      for (int k = 1; k < PRE_LAT; k++) xd[k] <= xd[k-1];
    end
  end

  pw_windowing #(.NMUL(NMUL), .PHASES(PHASES)) u_win (
    .clk, .rst_n, .xen, .cp, .x(xd[PRE_LAT-1]), .bypass,
    .coef_we1, .coef_we2, .coef_addr, .coef_data,
    .y, .out_valid, .b_mon, .fb_active(fb_evt)
  );

  assign clip_evt = xen && (c != ONE);
  assign peak_evt = xen && (cp != ONE);
endmodule
