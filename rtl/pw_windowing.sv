// pw_windowing: windowing FIR with feedback and gain correction.
//
// Input: cp(n) from the peak search and the matching I/Q sample, both taken
// on the sample strobe xen (every PHASES = 4 clocks). Output: y(n) = b(n) x(n).
//
// Feedback structure. The PWFIR input is
//     p(n) = max(0, (1 - cp(n)) - f(n)),
// where f(n) = sum_{j=0}^{19} h2(j) p(n-1-j) is the PWFIR2 output: the part of
// the attenuation 1 - cp(n) that windows of earlier peaks already supply at
// sample n. So a peak close behind another one only adds what is still
// missing, and the signal is not attenuated more than needed.
// PWFIR1 (symmetric, 40 taps from 20 coefficients h1) gives
//     1 - b(n) = sum_i h(i) p(n-i),
// saturated to [0, 1). The I/Q sample is delayed by 19 samples so that the
// coefficient h1(19) (the window centre) meets its own p(n); b(n) then
// multiplies it. Both filters are pw_mac_fir engines with 5 multipliers.
//
// Timing: p(n) is formed combinationally in the xen cycle that follows the
// one in which cp(n) was sampled, from PWFIR2's sum that completes in that
// same cycle (or its held value if xen came late), and is written into both
// filters on that edge. The output register updates one clock after the
// PWFIR1 result; out_valid is a one-clock pulse. Latency from the input xen to
// out_valid: 20 sample periods plus 6 clocks (86 clocks).
// bypass = 1 forces b(n) = 1 with the same latency.
// The reference design gives PWFIR1/PWFIR2, the feedback path, the clamp of
// negative inputs to zero and the delay-matched gain correction; the exact
// feedback equation and the 19-sample alignment are this design's reading.
module pw_windowing
  import pw_pkg::*;
#(
  parameter int unsigned NMUL   = 5,
  parameter int unsigned PHASES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       xen,          // sample strobe
  input  gain_t      cp,           // peak-only clipping function
  input  iq_t        x,            // input sample, aligned with cp
  input  logic       bypass,       // force b(n) = 1
  // coefficient load
  input  logic       coef_we1,     // PWFIR1
  input  logic       coef_we2,     // PWFIR2
  input  logic [$clog2(NMUL*PHASES)-1:0] coef_addr,
  input  coef_t      coef_data,
  output iq_t        y,            // gain-corrected sample
  output logic       out_valid,
  output gain_t      b_mon,        // b(n) applied to the last output
  output logic       fb_active     // a peak input was reduced by the feedback
);
  localparam int unsigned XDLY = NMUL * PHASES - 1;   // 19: centre coefficient

  gain_t   cp_q;
  iq_t     x_q;
  iq_t     xdl [XDLY+1];          // xdl[k]: sample paired with p(n-k)
  iq_t     xpair;
  logic    xen_d;

  sample_t f_now, f_held, f_use;
  logic    f_valid;
  sample_t u_y;
  logic    u_valid;
  sample_t u_unused;
  logic    u_unused_v;
  logic    f_unused_v;
  sample_t p;
  gain_t   b;

  // Input registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_q <= ONE;
      x_q  <= '0;
    end else if (xen) begin
      cp_q <= cp;
      x_q  <= x;
    end
  end

  // Feedback: p = max(0, (1 - cp) - f), f from PWFIR2.
  assign f_use = f_valid ? f_now : f_held;
  always_comb begin
    logic signed [DW+1:0] d;
    d = $signed({2'b00, ONE - cp_q}) - $signed({{2{f_use[DW-1]}}, f_use});
    if (d < 0)                       p = '0;
    else if (d > ((1 << FRAC) - 1))  p = sample_t'((1 << FRAC) - 1);
    else                             p = sample_t'(d);
  end
  assign fb_active = xen && (cp_q != ONE) && (f_use > 0);

  pw_mac_fir #(.NMUL(NMUL), .PHASES(PHASES), .SYMMETRIC(1'b0)) u_pwfir2 (
    .clk, .rst_n, .xen, .x(p),
    .coef_we(coef_we2), .coef_addr, .coef_data,
    .sum_now(f_now), .sum_valid(f_valid), .y(f_held), .y_valid(f_unused_v)
  );

  pw_mac_fir #(.NMUL(NMUL), .PHASES(PHASES), .SYMMETRIC(1'b1)) u_pwfir1 (
    .clk, .rst_n, .xen, .x(p),
    .coef_we(coef_we1), .coef_addr, .coef_data,
    .sum_now(u_unused), .sum_valid(u_unused_v), .y(u_y), .y_valid(u_valid)
  );

  // I/Q delay line matching PWFIR1's centre tap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= XDLY; k++) xdl[k] <= '0;
      xen_d <= 1'b0;
      xpair <= '0;
    end else begin
      xen_d <= xen;
      if (xen) begin
        xdl[0] <= x_q;
        for (int k = 1; k <= XDLY; k++) xdl[k] <= xdl[k-1];
      end
      if (xen_d) xpair <= xdl[XDLY];
    end
  end

  // b = 1 - PWFIR1 output, the filter output saturated to [0, 1).
  always_comb begin
    if (bypass || u_y <= 0) b = ONE;
    else                    b = ONE - gain_t'(u_y);
  end

  function automatic sample_t gain_mul(sample_t s, gain_t g);
    logic signed [2*DW:0] m;
    m = s * $signed({1'b0, g});
    return sample_t'(m >>> FRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
      b_mon     <= ONE;
    end else begin
      out_valid <= u_valid;
      if (u_valid) begin
        y.i   <= gain_mul(xpair.i, b);
        y.q   <= gain_mul(xpair.q, b);
        b_mon <= b;
      end
    end
  end
endmodule
