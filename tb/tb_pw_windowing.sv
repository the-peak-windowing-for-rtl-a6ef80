// tb_pw_windowing: checks the feedback windowing stage bit-exactly against a
// sample-domain model written independently in the testbench:
//   f(n) = sat(sum_j h2(j) p(n-1-j) >> 16),  p(n) = clamp((1-cp(n)) - f(n)),
//   u(n) = sat(sum_i h1(i) (p(n-i) + p(n-39+i)) >> 16),
//   b(m) = 1 - max(u(m+19), 0),  y(m) = floor(x(m) b(m) / 2**17).
// Hann coefficients are built from the window equations for N = 40, 19 and
// 9. The cp input has isolated peaks and peaks a few samples apart, so the
// feedback path must act. Also checks the 86-clock latency, that the
// feedback acted, and that bypass returns the input unchanged.
`timescale 1ns/1ps
module tb_pw_windowing;
  import pw_pkg::*;
  localparam int NS = 1500;
  logic clk = 0, rst_n = 0, xen = 0, bypass = 0;
  logic coef_we1 = 0, coef_we2 = 0;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  gain_t cp = ONE, b_mon;
  iq_t x = '0, y;
  logic out_valid, fb_active;
  int checks = 0, failures = 0, fb_count = 0, cyc = 0;
  longint h1 [20], h2 [20];
  longint cps [NS], xi [NS], xq [NS], p [NS], fr [NS];
  int xen_cyc [NS + 40];
  int pulse;

  pw_windowing dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (fb_active) fb_count++;

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic longint hann(int k, int n);
    return longint'(0.5 * (1.0 - $cos(2.0 * 3.14159265358979 * k / (n - 1))) * 65536.0 + 0.5);
  endfunction

  task automatic make_coefs(int n);
    int half = (n + 1) / 2;
    for (int j = 0; j < 20; j++) begin
      h1[j] = (j >= 20 - half) ? hann(j - (20 - half), n) : 0;
      h2[j] = (j <= n / 2 - 1) ? hann(half + j, n) : 0;
    end
  endtask

  task automatic load_coefs();
    for (int j = 0; j < 20; j++) begin
      @(negedge clk);
      coef_addr = 5'(j);
      coef_we1 = 1; coef_we2 = 0; coef_data = coef_t'(h1[j]);
      @(negedge clk);
      coef_we1 = 0; coef_we2 = 1; coef_data = coef_t'(h2[j]);
    end
    @(negedge clk);
    coef_we2 = 0;
  endtask

  function automatic longint pv(int m);
    return (m >= 0 && m < NS) ? p[m] : 0;
  endfunction

  task automatic run_case(int n, bit byp);
    // stimulus
    int gap;
    gap = 0;
    for (int m = 0; m < NS; m++) begin
      xi[m] = longint'($urandom_range(0, 262143)) - 131072;
      xq[m] = longint'($urandom_range(0, 262143)) - 131072;
      if (gap == 0 && m < NS - 60) begin
        cps[m] = longint'($urandom_range(60000, 131000));
        gap = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 8) : $urandom_range(9, 60);
      end else begin
        cps[m] = 131072;
        if (gap > 0) gap--;
      end
    end
    // reference model
    make_coefs(n);
    for (int m = 0; m < NS; m++) begin
      longint acc, d;
      acc = 0;
      for (int j = 0; j < 20; j++) acc += h2[j] * pv(m - 1 - j);
      fr[m] = sat18(acc >>> COEF_FRAC);
      d = (131072 - cps[m]) - fr[m];
      p[m] = (d < 0) ? 0 : (d > 131071) ? 131071 : d;
    end
    // run
    rst_n = 0; bypass = byp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs();
    pulse = 0;
    fork
      begin
        for (int k = 0; k < NS + 25; k++) begin
          @(negedge clk);
          x.i = sample_t'((k < NS) ? xi[k] : 0);
          x.q = sample_t'((k < NS) ? xq[k] : 0);
          cp  = gain_t'((k < NS) ? cps[k] : 131072);
          xen = 1;
          xen_cyc[k] = cyc;
          @(negedge clk);
          xen = 0;
          repeat (2) @(negedge clk);
        end
      end
      begin
        while (pulse < NS + 20) begin
          @(negedge clk);
          if (out_valid) begin
            int m;
            longint acc, u, bb, ei, eq;
            m = pulse - 20;
            checks++;
            if (cyc - xen_cyc[pulse] != 6) begin
              failures++;
              if (failures < 10) $display("timing: pulse %0d at +%0d", pulse, cyc - xen_cyc[pulse]);
            end
            if (m >= 0) begin
              acc = 0;
              for (int i = 0; i < 20; i++)
                acc += h1[i] * (pv(m + 19 - i) + pv(m + 19 - 39 + i));
              u  = sat18(acc >>> COEF_FRAC);
              bb = (byp || u <= 0) ? 131072 : 131072 - u;
              ei = (xi[m] * bb) >>> FRAC;
              eq = (xq[m] * bb) >>> FRAC;
              checks++;
              if (longint'(y.i) != ei || longint'(y.q) != eq || longint'(b_mon) != bb) begin
                failures++;
                if (failures < 10)
                  $display("N=%0d m=%0d y=(%0d,%0d) exp=(%0d,%0d) b=%0d exp=%0d",
                           n, m, y.i, y.q, ei, eq, b_mon, bb);
              end
              if (byp) begin
                checks++;
                if (longint'(y.i) != xi[m] || longint'(y.q) != xq[m]) failures++;
              end
            end
            pulse++;
          end
        end
      end
    join
  endtask

  initial begin
    repeat (4 * 4 * (NS + 200) + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_case(40, 1'b0);
    run_case(19, 1'b0);
    run_case(9, 1'b0);
    run_case(40, 1'b1);
    $display("feedback reductions: %0d", fb_count);
    if (fb_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
