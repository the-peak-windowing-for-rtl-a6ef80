// lp_fir_iq: programmable low-pass FIR on the I and Q paths.
//
// Two pw_mac_fir engines in symmetric mode, one per component, share the same
// 20 loadable coefficients: a 40-tap linear-phase filter built from 5
// multipliers per path, running 4 clocks per sample. Shorter filters are
// loaded as zero coefficients. It removes the out-of-band residue of the
// PAPR reduction and shapes the spectrum of the modem signal.
// Interface: x with strobe xen (one sample every 4 clocks), y with a one-clock
// y_valid. Filter latency: y_valid 5 clocks after xen; the filter's group
// delay is 19.5 samples.
// bypass = 1 passes the input through one register (y_valid one clock after
// xen): the bypass and its latency are this design's choice.
module lp_fir_iq
  import pw_pkg::*;
#(
  parameter int unsigned NMUL   = 5,
  parameter int unsigned PHASES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  xen,
  input  iq_t   x,
  input  logic  bypass,
  input  logic  coef_we,
  input  logic [$clog2(NMUL*PHASES)-1:0] coef_addr,
  input  coef_t coef_data,
  output iq_t   y,
  output logic  y_valid
);
  sample_t fi, fq;
  logic    vi, vq;
  sample_t unused_si, unused_sq;
  logic    unused_vi, unused_vq;
  iq_t     byp_q;
  logic    byp_v;

  pw_mac_fir #(.NMUL(NMUL), .PHASES(PHASES), .SYMMETRIC(1'b1)) u_fir_i (
    .clk, .rst_n, .xen, .x(x.i), .coef_we, .coef_addr, .coef_data,
    .sum_now(unused_si), .sum_valid(unused_vi), .y(fi), .y_valid(vi)
  );
  pw_mac_fir #(.NMUL(NMUL), .PHASES(PHASES), .SYMMETRIC(1'b1)) u_fir_q (
    .clk, .rst_n, .xen, .x(x.q), .coef_we, .coef_addr, .coef_data,
    .sum_now(unused_sq), .sum_valid(unused_vq), .y(fq), .y_valid(vq)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_q <= '0;
      byp_v <= 1'b0;
    end else begin
      byp_v <= xen;
      if (xen) byp_q <= x;
    end
  end

  always_comb begin
    if (bypass) begin
      y       = byp_q;
      y_valid = byp_v;
    end else begin
      y.i     = fi;
      y.q     = fq;
      y_valid = vi;
    end
  end

  a_iq_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vi == vq)
    else $error("I and Q filters out of step");
endmodule
