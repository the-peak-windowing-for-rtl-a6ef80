// pw_mac_fir: time-multiplexed multiply-accumulate FIR filter.
//
// One engine serves PWFIR1, PWFIR2 and the low-pass FIR. The clock runs
// PHASES (4) times faster than the sample rate; NMUL (5) multipliers are each
// used once per clock, so one output needs PHASES clocks and the filter has
// NMUL*PHASES = 20 coefficients.
//   * SYMMETRIC = 1 (PWFIR1, low-pass FIR): 2*NMUL = 10 data banks hold a
//     40-sample delay line; each multiplier takes the pre-added pair
//     D_j + D_{9-j} of samples whose taps share a coefficient, so
//     y(n) = sum_{i=0}^{19} h(i) * (x(n-i) + x(n-39+i)).
//   * SYMMETRIC = 0 (PWFIR2): NMUL = 5 data banks, 20 taps,
//     y(n) = sum_{i=0}^{19} h(i) * x(n-i).
// Coefficient h(i) lives in coefficient bank i / PHASES at address
// i % PHASES; data bank k holds delays PHASES*k .. PHASES*k+PHASES-1 as a
// circular buffer. All banks are register arrays addressed from the 2-bit
// phase counter `cnt`; coefficients have a separate write port for loading.
//
// Timing: the input is taken on the clock edge where xen = 1, and `cnt` is
// cleared. The next PHASES clocks multiply-accumulate, the first one clearing
// the integrator. In the last of them (which is the next xen cycle when xen
// comes every PHASES clocks) the complete sum is on `sum_now` with
// `sum_valid` = 1, and on the following edge it is latched into `y`, flagged
// by a one-clock `y_valid`. So y_valid comes PHASES+1 clocks after xen.
// xen must be at least PHASES clocks apart (asserted).
// Arithmetic is exact up to the final scaling: the sum is shifted right by
// COEF_FRAC (floor) and saturated to DW bits.
// The bank structure, counter and integrator follow the reference design;
// the circular buffering and the output scaling are this design's choice.
module pw_mac_fir
  import pw_pkg::*;
#(
  parameter int unsigned NMUL      = 5,   // multipliers = coefficient banks
  parameter int unsigned PHASES    = 4,   // clocks per sample (power of 2)
  parameter bit          SYMMETRIC = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          xen,        // sample strobe
  input  sample_t                       x,          // input sample
  input  logic                          coef_we,    // coefficient load
  input  logic [$clog2(NMUL*PHASES)-1:0] coef_addr, // coefficient index 0..19
  input  coef_t                         coef_data,
  output sample_t                       sum_now,    // result, valid with sum_valid
  output logic                          sum_valid,
  output sample_t                       y,          // latched result
  output logic                          y_valid     // one clock after sum_valid
);
  localparam int unsigned NDB   = SYMMETRIC ? 2*NMUL : NMUL;  // data banks
  localparam int unsigned NCOEF = NMUL * PHASES;
  localparam int unsigned PW    = $clog2(PHASES);
  localparam int unsigned PSUMW = DW + 1 + CW + $clog2(NMUL) + 1;
  localparam int unsigned ACCW  = PSUMW + PW + 1;

  coef_t   cmem [NMUL][PHASES];   // Mem blocks
  sample_t dmem [NDB][PHASES];    // Dmem blocks
  logic [PW-1:0] wp;              // address of the newest sample
  logic [PW-1:0] cnt;             // phase counter
  logic          run;             // MAC cycles in progress
  logic signed [ACCW-1:0] acc;    // integrator
  logic signed [ACCW-1:0] prod;   // this clock's sum of NMUL products
  logic signed [ACCW-1:0] total;
  logic signed [ACCW-1:0] scaled;

  // Coefficient memory: write port for loading, read by cnt.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NMUL; b++)
        for (int a = 0; a < PHASES; a++) cmem[b][a] <= '0;
    end else if (coef_we && int'(coef_addr) < NCOEF) begin
      cmem[int'(coef_addr) / PHASES][int'(coef_addr) % PHASES] <= coef_data;
    end
  end

  // Data memory: on xen every bank writes at the next address; bank 0 takes
  // the new sample, bank k the oldest sample of bank k-1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      for (int b = 0; b < NDB; b++)
        for (int a = 0; a < PHASES; a++) dmem[b][a] <= '0;
    end else if (xen) begin
      wp         <= wp + 1'b1;
      dmem[0][PW'(wp + 1'b1)] <= x;
      for (int b = 1; b < NDB; b++)
        dmem[b][PW'(wp + 1'b1)] <= dmem[b-1][PW'(wp + 1'b1)];
    end
  end

  // Phase counter and run flag (the delayed input enable).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      run <= 1'b0;
    end else if (xen) begin
      cnt <= '0;
      run <= 1'b1;
    end else if (run) begin
      cnt <= cnt + 1'b1;
      if (cnt == PW'(PHASES-1)) run <= 1'b0;
    end
  end

  // Multipliers. Lower bank j at phase r reads delay PHASES*j + r; its mirror
  // bank NDB-1-j reads delay NDB*PHASES-1-(PHASES*j + r).
  always_comb begin
    prod = '0;
    for (int j = 0; j < NMUL; j++) begin
      logic signed [DW:0] pair;
      pair = {dmem[j][PW'(wp - cnt)][DW-1], dmem[j][PW'(wp - cnt)]};
      if (SYMMETRIC)
        pair = pair + {dmem[NDB-1-j][PW'(wp - PW'(PHASES-1) + cnt)][DW-1],
                       dmem[NDB-1-j][PW'(wp - PW'(PHASES-1) + cnt)]};
      prod = prod + ACCW'(pair * cmem[j][cnt]);
    end
  end

  // Integrator: cleared on the first phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (run) acc <= (cnt == '0) ? prod : acc + prod;
  end

  assign total     = (cnt == '0) ? prod : acc + prod;
  assign scaled    = total >>> COEF_FRAC;
  assign sum_valid = run && (cnt == PW'(PHASES-1));

  localparam logic signed [ACCW-1:0] SMAX = ACCW'((1 << (DW-1)) - 1);
  localparam logic signed [ACCW-1:0] SMIN = -ACCW'(1 << (DW-1));
  always_comb begin
    if (scaled > SMAX)      sum_now = sample_t'(SMAX);
    else if (scaled < SMIN) sum_now = sample_t'(SMIN);
    else                    sum_now = sample_t'(scaled);
  end

  // Output latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= sum_valid;
      if (sum_valid) y <= sum_now;
    end
  end

  // Handshake rule: a new sample may not arrive before the last MAC phase.
  a_xen_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                  xen && run |-> cnt == PW'(PHASES-1))
    else $error("xen closer than PHASES clocks");

  initial assert ((1 << PW) == PHASES) else $error("PHASES must be a power of 2");
endmodule
