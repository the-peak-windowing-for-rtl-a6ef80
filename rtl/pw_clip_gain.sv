// pw_clip_gain: clipping function c(n) = Th / e(n) when e(n) > Th, else 1.
//
// A pipelined restoring divider produces the 17 fractional bits of Th/e one
// per stage (the quotient is below 1 whenever clipping applies, so no integer
// bit is needed). The compare e > Th is made in the first stage and carried
// along; the last stage selects the quotient or 1.0. Registers advance on the
// sample strobe `en`, latency pw_pkg::CLIP_LAT = 17 samples.
// Function and 18-bit precision follow the reference design; the divider
// structure is this design's choice. c is truncated (rounded toward zero),
// so the clipped envelope never exceeds Th.
// Formats: e and th unsigned on the I/Q scale; c unsigned, 1.0 = 2**17.
module pw_clip_gain
  import pw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,     // sample strobe (Xen)
  input  gain_t env,    // envelope e(n)
  input  gain_t th,     // clipping threshold Th
  output gain_t c       // clipping function c(n)
);
  localparam int unsigned NST = FRAC;

  typedef struct packed {
    logic          clip;  // e > Th
    logic [DW:0]   rem;   // partial remainder (< 2 * divisor)
    logic [DW-1:0] div;   // divisor e(n)
    logic [FRAC-1:0] q;   // quotient bits found so far
  } dv_stage_t;

  dv_stage_t st_q [NST];

  function automatic dv_stage_t div_step(dv_stage_t s);
    dv_stage_t   n;
    logic [DW:0] r;
    r      = {s.rem[DW-1:0], 1'b0};
    n      = s;
    if (r >= {1'b0, s.div}) begin
      n.rem = r - {1'b0, s.div};
      n.q   = {s.q[FRAC-2:0], 1'b1};
    end else begin
      n.rem = r;
      n.q   = {s.q[FRAC-2:0], 1'b0};
    end
    return n;
  endfunction

  dv_stage_t st_in;
  always_comb begin
    st_in.clip = env > th;
    // When not clipping the quotient is not used; a remainder of 0 keeps the
    // recurrence inside its range.
    st_in.rem  = st_in.clip ? {1'b0, th} : '0;
    st_in.div  = env;
    st_in.q    = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NST; k++) st_q[k] <= '0;
    end else if (en) begin
      st_q[0] <= div_step(st_in);
      for (int k = 1; k < NST; k++) st_q[k] <= div_step(st_q[k-1]);
    end
  end

  assign c = st_q[NST-1].clip ? gain_t'(st_q[NST-1].q) : ONE;
endmodule
