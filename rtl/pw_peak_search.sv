// pw_peak_search: keeps only the local minima of the clipping function.
//
// A 7-sample shift register holds c(n)..c(n-6). The block Comp compares the
// centre sample a = c(n-3) with b = min(c(n)..c(n-6)) and outputs a when
// a == b, else 1.0, so cp(n) differs from 1 only at the deepest point of each
// clipped peak. The window of seven samples is the reference design's; the
// minimum tree and the registered output are this design's choice.
// Registers advance on the sample strobe `en`. Latency pw_pkg::PEAK_LAT = 5
// samples (3 to reach the centre tap, one window register, one output
// register). The window resets to 1.0 (no clipping).
module pw_peak_search
  import pw_pkg::*;
#(
  parameter int unsigned WIN = 7   // samples examined (odd)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,   // sample strobe (Xen)
  input  gain_t c,    // clipping function c(n)
  output gain_t cp    // peak-only clipping function cp(n)
);
  localparam int unsigned MID = WIN / 2;

  gain_t win_q [WIN];
  gain_t wmin;

  always_comb begin
    wmin = win_q[0];
    for (int k = 1; k < WIN; k++)
      if (win_q[k] < wmin) wmin = win_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WIN; k++) win_q[k] <= ONE;
      cp <= ONE;
    end else if (en) begin
      win_q[0] <= c;
      for (int k = 1; k < WIN; k++) win_q[k] <= win_q[k-1];
      // Comp, eq. (6): y = a if a == b, else 1
      cp <= (win_q[MID] == wmin) ? win_q[MID] : ONE;
    end
  end

  initial assert (WIN % 2 == 1) else $error("WIN must be odd");
endmodule
