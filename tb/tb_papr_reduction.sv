// tb_papr_reduction: end-to-end check of the peak-windowing block against the
// sample-domain reference model (pw_ref_pkg). An OFDM-like multitone test
// signal with its peak at full scale is clipped at Th = 0.7 and 0.6 with window
// lengths N = 40 and 19, then passed with bypass. Checks every output sample
// bit-exactly, the 250-clock latency, the clip / peak / feedback event counts,
// and reports the peak-to-average ratio before and after.
`timescale 1ns/1ps
module tb_papr_reduction;
  import pw_pkg::*;
  import pw_ref_pkg::*;
  localparam int NS  = 1500;
  localparam int LAT = 4 * (PRE_LAT + 20) + 6;
  logic clk = 0, rst_n = 0, xen = 0, bypass = 0;
  logic coef_we1 = 0, coef_we2 = 0;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  gain_t th = '0, b_mon;
  iq_t x = '0, y;
  logic out_valid, clip_evt, peak_evt, fb_evt;
  int checks = 0, failures = 0, cyc = 0;
  int n_clip, n_peak, n_fb;
  int xen_cyc [NS + 100];

  papr_reduction dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (clip_evt) n_clip++;
    if (peak_evt) n_peak++;
    if (fb_evt) n_fb++;
  end

  task automatic run_case(int n, real thr, bit byp);
    arr_t xi, xq, yi, yq;
    longint h1 [20], h2 [20];
    int mc, mp, mf, pulse;
    real pin, pout, ain, aout;
    test_signal(NS, 0.99, xi, xq);
    pw_coefs(n, h1, h2);
    th = gain_t'(longint'(thr * 131072.0));
    papr(xi, xq, longint'(th), h1, h2, byp, yi, yq, mc, mp, mf);
    rst_n = 0; bypass = byp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_clip = 0; n_peak = 0; n_fb = 0;
    for (int j = 0; j < 20; j++) begin
      @(negedge clk);
      coef_addr = 5'(j);
      coef_we1 = 1; coef_data = coef_t'(h1[j]);
      @(negedge clk);
      coef_we1 = 0; coef_we2 = 1; coef_data = coef_t'(h2[j]);
      @(negedge clk);
      coef_we2 = 0;
    end
    pulse = 0;
    pin = 0; pout = 0; ain = 0; aout = 0;
    fork
      for (int k = 0; k < NS + 70; k++) begin
        @(negedge clk);
        x.i = sample_t'((k < NS) ? xi[k] : 0);
        x.q = sample_t'((k < NS) ? xq[k] : 0);
        xen = 1;
        xen_cyc[k] = cyc;
        @(negedge clk);
        xen = 0;
        repeat (2) @(negedge clk);
      end
      while (pulse < NS + 61) begin
        @(negedge clk);
        if (out_valid) begin
          int m;
          m = pulse - (PRE_LAT + 20);
          if (m >= 0) begin
            real ei, eo;
            checks += 2;
            if (cyc - xen_cyc[m] != LAT) begin
              failures++;
              if (failures < 10) $display("latency %0d", cyc - xen_cyc[m]);
            end
            if (longint'(y.i) != yi[m] || longint'(y.q) != yq[m]) begin
              failures++;
              if (failures < 10) $display("N=%0d m=%0d y=(%0d,%0d) exp=(%0d,%0d)",
                                          n, m, y.i, y.q, yi[m], yq[m]);
            end
            ei = real'(xi[m]) ** 2 + real'(xq[m]) ** 2;
            eo = real'(y.i) ** 2 + real'(y.q) ** 2;
            if (ei > pin) pin = ei;
            if (eo > pout) pout = eo;
            ain += ei;
            aout += eo;
          end
          pulse++;
        end
      end
    join
    checks += 3;
    if (n_clip != mc || n_peak != mp || n_fb != mf) begin
      failures++;
      $display("events clip %0d/%0d peak %0d/%0d fb %0d/%0d", n_clip, mc, n_peak, mp, n_fb, mf);
    end
    if (!byp && (mc == 0 || mp == 0 || mf == 0)) failures++;
    // the output envelope must stay at the threshold (2 % allowance for the
    // window shape between neighbouring peaks)
    $display("max output envelope / Th = %0.4f", $sqrt(pout) / real'(th));
    if (!byp) begin
      checks++;
      if ($sqrt(pout) > 1.02 * real'(th)) failures++;
    end
    $display("N=%0d Th=%0.2f bypass=%0d: PAPR in %0.2f dB, out %0.2f dB, peaks %0d, feedback %0d",
             n, thr, byp, 10 * $log10(pin / (ain / NS)), 10 * $log10(pout / (aout / NS)), mp, mf);
  endtask

  initial begin
    repeat (3 * 4 * (NS + 200) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_case(40, 0.7, 1'b0);
    run_case(19, 0.6, 1'b0);
    run_case(40, 0.7, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
