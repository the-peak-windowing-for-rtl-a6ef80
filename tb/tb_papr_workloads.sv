// tb_papr_workloads: the parameter sweeps of the measurement campaign, run on
// the PAPR reduction block with an OFDM-like signal (600 QPSK subcarriers of a
// 2048-point grid, as in 10 MHz LTE at 30.72 MS/s, peak at full scale):
//   * Hann window, N = 9, 19, 29, 39, Th from 1.0 down to 0.6 in 0.04 steps;
//   * Hamming and Blackman-Harris windows, N = 9, 19, 39, Th = 0.7 and 0.6.
// Every output sample is compared bit-exactly with the reference model.
// Also checked: Th = 1.0 leaves the signal unchanged; for Hann and Hamming
// with N >= 19 and any window with N = 39 the output envelope stays within
// 2 % of Th (narrower windows do not cover a whole clipped peak, so its
// neighbours may stay above Th: reported only); PAPR falls as Th falls; at Th = 0.6 a short window
// (N = 9) distorts less (lower EVM) than a long one (N = 39).
// Prints PAPR and EVM (error of y against x, relative to the rms of x) per run.
`timescale 1ns/1ps
module tb_papr_workloads;
  import pw_pkg::*;
  import pw_ref_pkg::*;
  localparam int NS = 1200;
  logic clk = 0, rst_n = 0, xen = 0, bypass = 0;
  logic coef_we1 = 0, coef_we2 = 0;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  gain_t th = '0, b_mon;
  iq_t x = '0, y;
  logic out_valid, clip_evt, peak_evt, fb_evt;
  int checks = 0, failures = 0;
  arr_t si, sq;

  papr_reduction dut (.*);
  always #5 clk = ~clk;

  task automatic run(int n, int wtype, real thr, output real papr_db, output real evm_pct,
                     output real env_ratio);
    arr_t yi, yq;
    longint h1 [20], h2 [20];
    int mc, mp, mf, pulse, bad;
    real pk, avg, err, pw;
    pw_coefs(n, h1, h2, wtype);
    th = gain_t'(longint'(thr * 131072.0));
    papr(si, sq, longint'(th), h1, h2, 1'b0, yi, yq, mc, mp, mf);
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 20; j++) begin
      @(negedge clk);
      coef_addr = 5'(j);
      coef_we1 = 1; coef_data = coef_t'(h1[j]);
      @(negedge clk);
      coef_we1 = 0; coef_we2 = 1; coef_data = coef_t'(h2[j]);
      @(negedge clk);
      coef_we2 = 0;
    end
    pulse = 0; bad = 0;
    pk = 0; avg = 0; err = 0; pw = 0;
    fork
      for (int k = 0; k < NS + 70; k++) begin
        @(negedge clk);
        x.i = sample_t'((k < NS) ? si[k] : 0);
        x.q = sample_t'((k < NS) ? sq[k] : 0);
        xen = 1;
        @(negedge clk);
        xen = 0;
        repeat (2) @(negedge clk);
      end
      while (pulse < NS + PRE_LAT + 20) begin
        @(negedge clk);
        if (out_valid) begin
          int m;
          m = pulse - (PRE_LAT + 20);
          if (m >= 0) begin
            real e;
            checks++;
            if (longint'(y.i) != yi[m] || longint'(y.q) != yq[m]) bad++;
            if (thr >= 1.0) begin
              checks++;
              if (longint'(y.i) != si[m] || longint'(y.q) != sq[m]) bad++;
            end
            e = real'(y.i) ** 2 + real'(y.q) ** 2;
            if (e > pk) pk = e;
            avg += e;
            err += (real'(y.i) - real'(si[m])) ** 2 + (real'(y.q) - real'(sq[m])) ** 2;
            pw += real'(si[m]) ** 2 + real'(sq[m]) ** 2;
          end
          pulse++;
        end
      end
    join
    failures += bad;
    papr_db = 10.0 * $log10(pk / (avg / NS));
    evm_pct = 100.0 * $sqrt(err / pw);
    env_ratio = $sqrt(pk) / real'(th);
    // Hann and Hamming windows of 19 taps and more, and all 39-tap windows,
    // cover the whole clipped region of a peak
    if ((n >= 19 && wtype < 2) || n >= 39) begin
      checks++;
      if (env_ratio > 1.02) begin
        bad++;
        failures++;
      end
    end
    $display("  %-15s N=%0d Th=%0.2f  PAPR %5.2f dB  EVM %5.2f %%  max|y|/Th %0.4f  peaks %0d  feedback %0d  mismatches %0d",
             wtype == 0 ? "Hann" : wtype == 1 ? "Hamming" : "Blackman-Harris", n, thr, papr_db,
             evm_pct, env_ratio, mp, mf, bad);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nl [4] = '{9, 19, 29, 39};
    real papr_db, evm, ratio, prev, papr_in, evm9, evm39;
    ofdm_signal(NS, 600, 0.99, si, sq);
    begin
      real pk, av;
      pk = 0;
      av = 0;
      for (int m = 0; m < NS; m++) begin
        real e;
        e = real'(si[m]) ** 2 + real'(sq[m]) ** 2;
        if (e > pk) pk = e;
        av += e;
      end
      papr_in = 10.0 * $log10(pk / (av / NS));
      $display("input PAPR %0.2f dB", papr_in);
    end
    foreach (nl[i]) begin
      prev = 100.0;
      for (int t = 0; t <= 10; t++) begin
        real thr;
        thr = 1.0 - 0.04 * t;
        run(nl[i], 0, thr, papr_db, evm, ratio);
        checks++;
        if (papr_db > prev + 0.1) begin
          failures++;
          $display("PAPR rose as Th fell");
        end
        prev = papr_db;
        if (t == 10 && nl[i] == 9) evm9 = evm;
        if (t == 10 && nl[i] == 39) evm39 = evm;
      end
    end
    checks++;
    if (!(evm9 < evm39)) begin
      failures++;
      $display("EVM at Th = 0.6: N=9 %0.2f %% not below N=39 %0.2f %%", evm9, evm39);
    end
    for (int wt = 1; wt <= 2; wt++)
      foreach (nl[i])
        if (nl[i] != 29) begin
          run(nl[i], wt, 0.7, papr_db, evm, ratio);
          run(nl[i], wt, 0.6, papr_db, evm, ratio);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
