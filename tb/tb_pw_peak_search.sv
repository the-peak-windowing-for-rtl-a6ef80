// tb_pw_peak_search: feeds clipping-function sequences (mostly 1.0 with
// clipped bumps of random depth and width, some flat-bottomed, some close
// together) and checks cp against a reference that marks sample k as a peak
// when it equals the minimum of c(k-3)..c(k+3). Latency: 5 samples.
`timescale 1ns/1ps
module tb_pw_peak_search;
  import pw_pkg::*;
  localparam int N = 4000;
  logic clk = 0, rst_n = 0, en = 0;
  gain_t c = ONE, cp;
  int checks = 0, failures = 0, npeaks = 0;
  gain_t seq [N];

  pw_peak_search dut (.*);
  always #5 clk = ~clk;

  function automatic gain_t ref_cp(int k);
    gain_t m = ONE, a;
    a = (k >= 0 && k < N) ? seq[k] : ONE;
    for (int d = -3; d <= 3; d++) begin
      gain_t v = (k+d >= 0 && k+d < N) ? seq[k+d] : ONE;
      if (v < m) m = v;
    end
    return (a == m) ? a : ONE;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the sequence: bumps of width 1..9 with a parabolic dip
    int k = 0;
    while (k < N) begin
      int gap;
      gap = $urandom_range(0, 12);
      for (int g = 0; g < gap && k < N; g++) seq[k++] = ONE;
      begin
        int w, depth;
        bit flat;
        w     = $urandom_range(1, 9);
        depth = $urandom_range(1, 50000);
        flat  = ($urandom_range(0, 3) == 0);
        for (int t = 0; t < w && k < N; t++) begin
          int dd, v;
          dd = 2*t - (w-1);
          if (dd < 0) dd = -dd;
          v = (1 << FRAC) - depth + (flat ? 0 : dd * dd * 300);
          if (v > (1 << FRAC)) v = 1 << FRAC;
          seq[k++] = gain_t'(v);
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N + PEAK_LAT; n++) begin
      c  = (n < N) ? seq[n] : ONE;
      en = 1;
      @(posedge clk); #1;
      en = 0;
      if (n >= PEAK_LAT - 1) begin
        // after strobe n the output holds the decision for sample n-4,
        // whose window is c(n-7)..c(n-1)
        gain_t e;
        e = ref_cp(n - (PEAK_LAT - 1));
        checks++;
        if (e != ONE) npeaks++;
        if (cp != e) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d cp=%0d exp=%0d", n, cp, e);
        end
      end
      if ($urandom_range(0, 3) == 0) @(posedge clk);
      #1;
    end
    if (npeaks < 50) failures++;
    $display("peaks seen: %0d", npeaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
