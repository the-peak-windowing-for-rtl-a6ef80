// pw_envelope: envelope detector e(n) = sqrt(xI(n)^2 + xQ(n)^2).
//
// First stage squares and adds I and Q (36-bit exact sum). Then a pipelined
// digit-by-digit (restoring) square root resolves one root bit per stage,
// most significant first, so the result is floor(sqrt(I^2+Q^2)), exact.
// Every register advances only on the sample strobe `en` (Xen), so the block
// runs at the sample rate and its latency is pw_pkg::ENV_LAT = 19 samples:
// the envelope of the sample taken on one `en` is on `env` after the 19th `en`
// that follows, counting that one.
// The reference design names squarer and square-root circuits and an 18-bit
// precision but not their insides; the restoring recurrence is this design's
// choice. Output: unsigned, same scale as I/Q (up to sqrt(2) of full scale).
module pw_envelope
  import pw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,      // sample strobe (Xen)
  input  sample_t xi,
  input  sample_t xq,
  output gain_t   env      // floor(sqrt(xi^2 + xq^2))
);
  localparam int unsigned RW   = 2*DW;   // radicand width
  localparam int unsigned NST  = DW;     // root bits = stages
  localparam int unsigned REMW = DW + 2; // partial remainder width

  typedef struct packed {
    logic [RW-1:0]   rad;   // radicand bits not yet consumed, MSB aligned
    logic [REMW-1:0] rem;   // partial remainder
    logic [DW-1:0]   root;  // root bits found so far
  } sq_stage_t;

  logic [RW-1:0] sumsq_q;
  sq_stage_t     st_q [NST];

  // Stage 0: squares and sum. Both squares are non-negative and below 2**34.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sumsq_q <= '0;
    else if (en) sumsq_q <= RW'(xi * xi) + RW'(xq * xq);
  end

  // One root bit per stage.
  function automatic sq_stage_t sqrt_step(sq_stage_t s);
    sq_stage_t       n;
    logic [REMW-1:0] r;
    logic [REMW-1:0] t;
    r = {s.rem[REMW-3:0], s.rad[RW-1 -: 2]};
    t = {s.root, 2'b01};
    n.rad = s.rad << 2;
    if (r >= t) begin
      n.rem  = r - t;
      n.root = {s.root[DW-2:0], 1'b1};
    end else begin
      n.rem  = r;
      n.root = {s.root[DW-2:0], 1'b0};
    end
    return n;
  endfunction

  sq_stage_t st_in;
  always_comb begin
    st_in.rad  = sumsq_q;
    st_in.rem  = '0;
    st_in.root = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NST; k++) st_q[k] <= '0;
    end else if (en) begin
      st_q[0] <= sqrt_step(st_in);
      for (int k = 1; k < NST; k++) st_q[k] <= sqrt_step(st_q[k-1]);
    end
  end

  assign env = st_q[NST-1].root;
endmodule
