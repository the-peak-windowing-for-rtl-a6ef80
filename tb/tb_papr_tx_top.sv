// tb_papr_tx_top: end-to-end test of the transmit chain at its default size.
//   1. A 4096-sample multitone waveform (peak at full scale) is uploaded to
//      the waveform RAM and played in a loop through peak windowing (Hann,
//      N = 40, Th = 0.7) and the 10 MHz low-pass FIR: every output sample of
//      one full pass plus 200 wrapped samples is compared bit-exactly with
//      the reference model.
//   2. Modem input, window reloaded for N = 9 and Th = 0.6, low-pass bypassed.
//   3. Modem input with both blocks bypassed: output equals input, 251 clocks
//      later.
// Counts how often each mechanism was exercised (clipping, peak detection,
// feedback, both bypasses, both sources, coefficient reloads) and fails if
// one never happened.
`timescale 1ns/1ps
module tb_papr_tx_top;
  import pw_pkg::*;
  import pw_ref_pkg::*;
  localparam int WLEN = 4096;
  localparam int PW_LAT_S = PRE_LAT + 20;   // samples through papr_reduction

  logic clk = 0, rst_n = 0;
  logic src_sel = 0, xen_in = 0;
  iq_t x_in = '0;
  logic wfm_wr_en = 0, wfm_play = 0;
  logic [11:0] wfm_wr_addr = '0, wfm_last = '0;
  iq_t wfm_wr_data = '0;
  gain_t th = '0;
  logic pw_bypass = 0, lpf_bypass = 0, coef_we = 0;
  coef_sel_e coef_sel = SEL_PWFIR1;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  iq_t y;
  logic y_valid, clip_evt, peak_evt, fb_evt;

  int checks = 0, failures = 0, cyc = 0;
  int n_clip = 0, n_peak = 0, n_fb = 0, n_reload = 0;
  int n_pwbyp = 0, n_lpfbyp = 0, n_wfm = 0, n_modem = 0, n_lpf = 0;
  int xen_cyc [$];

  // Expected source strobe: the modem strobe, or during playback one strobe
  // every 4 clocks starting one clock after wfm_play rises.
  logic [1:0] wph = '0;
  logic wstrobe = 0;
  always @(posedge clk) begin
    if (src_sel && wfm_play) wph <= wph + 1'b1;
    else wph <= '0;
    wstrobe <= src_sel && wfm_play && wph == '0;
  end

  papr_tx_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (clip_evt) n_clip++;
    if (peak_evt) n_peak++;
    if (fb_evt) n_fb++;
    if (src_sel ? wstrobe : xen_in) begin
      xen_cyc.push_back(cyc);
      if (src_sel) n_wfm++; else n_modem++;
      if (pw_bypass) n_pwbyp++;
      if (lpf_bypass) n_lpfbyp++; else n_lpf++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(coef_sel_e sel, longint h [20]);
    for (int j = 0; j < 20; j++) begin
      @(negedge clk);
      coef_we = 1; coef_sel = sel; coef_addr = 5'(j); coef_data = coef_t'(h[j]);
    end
    @(negedge clk);
    coef_we = 0;
    n_reload++;
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xen_cyc.delete();
  endtask

  // expected chain output for input stream xi/xq (one entry per strobe)
  task automatic expect_chain(arr_t xi, arr_t xq, longint thv, longint h1 [20], longint h2 [20],
                              longint hl [20], bit pbyp, bit lbyp, output arr_t ei, output arr_t eq);
    arr_t pi, pq, si, sq;
    int mc, mp, mf, ns;
    ns = xi.size();
    papr(xi, xq, thv, h1, h2, pbyp, pi, pq, mc, mp, mf);
    si = new[ns];
    sq = new[ns];
    for (int j = 0; j < ns; j++) begin
      si[j] = (j >= PW_LAT_S) ? pi[j - PW_LAT_S] : 0;
      sq[j] = (j >= PW_LAT_S) ? pq[j - PW_LAT_S] : 0;
    end
    ei = lbyp ? si : fir40(si, hl);
    eq = lbyp ? sq : fir40(sq, hl);
  endtask

  // collect n outputs and compare. Output k is stream position k: it carries
  // input sample k - PW_LAT_S and comes `lat` clocks after input strobe k, so
  // the sample latency is 4 * PW_LAT_S + lat clocks (255 with the low-pass).
  task automatic collect(arr_t ei, arr_t eq, int n, int lat, string tag);
    int k = 0, bad = 0;
    while (k < n) begin
      @(negedge clk);
      if (y_valid) begin
        checks += 2;
        if (cyc - xen_cyc[k] != lat) begin
          bad++;
          if (bad < 5) $display("%s k=%0d latency %0d", tag, k, cyc - xen_cyc[k]);
        end
        if (longint'(y.i) != ei[k] || longint'(y.q) != eq[k]) begin
          bad++;
          if (bad < 5) $display("%s k=%0d y=(%0d,%0d) exp=(%0d,%0d)", tag, k, y.i, y.q, ei[k], eq[k]);
        end
        k++;
      end
    end
    failures += bad;
    $display("%s: %0d outputs compared, %0d mismatches", tag, n, bad);
  endtask

  task automatic modem_stream(arr_t xi, arr_t xq, int n);
    for (int m = 0; m < n + 80; m++) begin
      @(negedge clk);
      x_in.i = sample_t'((m < n) ? xi[m] : 0);
      x_in.q = sample_t'((m < n) ? xq[m] : 0);
      xen_in = 1;
      @(negedge clk);
      xen_in = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    arr_t wi, wq, xi, xq, ei, eq;
    longint h1 [20], h2 [20], hl [20];
    int ns;

    // ---- 1. waveform RAM playback, full chain ------------------------------
    test_signal(WLEN, 0.99, wi, wq);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WLEN; a++) begin
      @(negedge clk);
      wfm_wr_en = 1; wfm_wr_addr = 12'(a);
      wfm_wr_data.i = sample_t'(wi[a]);
      wfm_wr_data.q = sample_t'(wq[a]);
    end
    @(negedge clk);
    wfm_wr_en = 0;
    pw_coefs(40, h1, h2);
    lpf_coefs(10.0 / 30.72, hl);
    load(SEL_PWFIR1, h1);
    load(SEL_PWFIR2, h2);
    load(SEL_LPF, hl);
    th = gain_t'(longint'(0.7 * 131072.0));
    ns = WLEN + 200;
    xi = new[ns];
    xq = new[ns];
    for (int m = 0; m < ns; m++) begin
      xi[m] = wi[m % WLEN];
      xq[m] = wq[m % WLEN];
    end
    expect_chain(xi, xq, longint'(th), h1, h2, hl, 1'b0, 1'b0, ei, eq);
    @(negedge clk);
    src_sel = 1; wfm_last = 12'(WLEN - 1); wfm_play = 1;
    collect(ei, eq, ns - PW_LAT_S - 20, 6 + 5, "wfm+pw+lpf");
    wfm_play = 0;

    // ---- 2. modem input, N = 9, Th = 0.6, low-pass bypassed -----------------
    restart();
    src_sel = 0; lpf_bypass = 1;
    pw_coefs(9, h1, h2);
    load(SEL_PWFIR1, h1);
    load(SEL_PWFIR2, h2);
    th = gain_t'(longint'(0.6 * 131072.0));
    test_signal(800, 0.99, xi, xq);
    xi = new[880](xi);
    xq = new[880](xq);
    expect_chain(xi, xq, longint'(th), h1, h2, hl, 1'b0, 1'b1, ei, eq);
    fork
      modem_stream(xi, xq, 800);
      collect(ei, eq, 860, 6 + 1, "modem+pw N=9");
    join

    // ---- 3. both bypassed ------------------------------------------------
    restart();
    pw_bypass = 1; lpf_bypass = 1;
    load(SEL_PWFIR1, h1);
    load(SEL_PWFIR2, h2);
    test_signal(300, 0.99, xi, xq);
    xi = new[380](xi);
    xq = new[380](xq);
    expect_chain(xi, xq, longint'(th), h1, h2, hl, 1'b1, 1'b1, ei, eq);
    fork
      modem_stream(xi, xq, 300);
      collect(ei, eq, 360, 6 + 1, "bypass");
    join
    for (int m = 0; m < 300; m++) begin
      checks++;
      if (ei[m + PW_LAT_S] != xi[m]) failures++;
    end

    $display("events: clip %0d peak %0d feedback %0d reload %0d pw_bypass %0d lpf_bypass %0d lpf %0d wfm %0d modem %0d",
             n_clip, n_peak, n_fb, n_reload, n_pwbyp, n_lpfbyp, n_lpf, n_wfm, n_modem);
    checks += 9;
    if (n_clip == 0) failures++;
    if (n_peak == 0) failures++;
    if (n_fb == 0) failures++;
    if (n_reload < 2) failures++;
    if (n_pwbyp == 0) failures++;
    if (n_lpfbyp == 0) failures++;
    if (n_lpf == 0) failures++;
    if (n_wfm == 0) failures++;
    if (n_modem == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
