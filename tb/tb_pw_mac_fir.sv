// tb_pw_mac_fir: checks the time-multiplexed FIR engine in both of its forms,
// symmetric 40-tap (PWFIR1, low-pass FIR) and plain 20-tap (PWFIR2), against
// a direct-form convolution computed in the testbench with 64-bit integers,
// floored by 2**16 and saturated to 18 bits. Random signed data and
// coefficients (including full-scale values), coefficients reloaded while
// running, sample strobes every 4 clocks with occasional longer gaps. Also
// checks that y_valid follows xen by exactly 5 clocks (4 MAC phases + latch)
// and that sum_now equals the latched y.
`timescale 1ns/1ps
module tb_pw_mac_fir;
  import pw_pkg::*;
  localparam int NS = 3000;
  logic clk = 0, rst_n = 0, xen = 0, coef_we = 0;
  sample_t x = '0;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  sample_t s_sum, s_y, n_sum, n_y;
  logic s_sv, s_yv, n_sv, n_yv;
  int checks = 0, failures = 0;
  longint h [20];
  longint hist [$];                // hist[0] newest
  longint exp_s [$], exp_n [$];
  int xen_time [$];
  int cyc = 0;

  pw_mac_fir #(.SYMMETRIC(1'b1)) dut_s (.clk, .rst_n, .xen, .x, .coef_we, .coef_addr,
    .coef_data, .sum_now(s_sum), .sum_valid(s_sv), .y(s_y), .y_valid(s_yv));
  pw_mac_fir #(.SYMMETRIC(1'b0)) dut_n (.clk, .rst_n, .xen, .x, .coef_we, .coef_addr,
    .coef_data, .sum_now(n_sum), .sum_valid(n_sv), .y(n_y), .y_valid(n_yv));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint sat_scale(longint acc);
    longint v = acc >>> COEF_FRAC;
    if (v > 131071) v = 131071;
    if (v < -131072) v = -131072;
    return v;
  endfunction

  function automatic longint hx(int d);
    return (d < hist.size()) ? hist[d] : 0;
  endfunction

  task automatic load_coefs(bit full);
    for (int i = 0; i < 20; i++) begin
      longint v;
      v = full ? ((i % 2) ? -131072 : 131071) : longint'($urandom_range(0, 262143)) - 131072;
      h[i] = v;
      @(negedge clk);
      coef_we = 1; coef_addr = 5'(i); coef_data = coef_t'(v);
      @(negedge clk);
      coef_we = 0;
    end
  endtask

  // compare outputs whenever they are flagged
  always @(negedge clk) if (rst_n) begin
    if (s_yv) begin
      longint e;
      int t0;
      e  = exp_s.pop_front();
      t0 = xen_time.pop_front();
      checks += 3;
      if (longint'(s_y) != e) begin failures++; if (failures < 10) $display("sym mismatch %0d vs %0d", s_y, e); end
      if (cyc - t0 != 5) begin failures++; $display("latency %0d", cyc - t0); end
      if (!n_yv) failures++;
    end
    if (n_yv) begin
      longint e;
      e = exp_n.pop_front();
      checks++;
      if (longint'(n_y) != e) begin failures++; if (failures < 10) $display("plain mismatch %0d vs %0d", n_y, e); end
    end
    if (s_sv) begin
      checks++;
      if (longint'(s_sum) != exp_s[0]) failures++;
    end
  end

  initial begin
    repeat (NS * 8 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs(1'b1);
    for (int n = 0; n < NS; n++) begin
      longint acc_s, acc_n;
      acc_s = 0;
      acc_n = 0;
      if (n == 500) begin
        repeat (8) @(negedge clk);   // let the last result drain
        load_coefs(1'b0);
      end
      if (n < 40) x = (n % 2) ? -18'sd131072 : 18'sd131071;
      else        x = sample_t'($urandom);
      hist.push_front(longint'(x));
      for (int i = 0; i < 20; i++) begin
        acc_s += h[i] * (hx(i) + hx(39 - i));
        acc_n += h[i] * hx(i);
      end
      exp_s.push_back(sat_scale(acc_s));
      exp_n.push_back(sat_scale(acc_n));
      @(negedge clk);
      xen = 1;
      xen_time.push_back(cyc);
      @(negedge clk);
      xen = 0;
      repeat (2) @(negedge clk);
      if ($urandom_range(0, 9) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    if (exp_s.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
