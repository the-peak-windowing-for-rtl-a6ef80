// tb_pw_envelope: checks the envelope detector against an integer square root
// computed in the testbench (floor(sqrt) from real arithmetic, corrected to be
// exact). Random I/Q including the extreme corners; the enable is given with
// random gaps, and the latency of 19 enabled samples is checked by pairing
// each output with the input 18 strobes earlier.
`timescale 1ns/1ps
module tb_pw_envelope;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t xi = '0, xq = '0;
  gain_t env;
  int checks = 0, failures = 0;
  longint exp_q[$];

  pw_envelope dut (.*);
  always #5 clk = ~clk;

  function automatic longint isqrt(longint v);
    longint r = longint'($sqrt(real'(v)));
    while (r*r > v) r--;
    while ((r+1)*(r+1) <= v) r++;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int sel;
      sel = $urandom_range(0, 9);
      if (n < 4) begin
        xi = (n % 2) ? -18'sd131072 : 18'sd131071;
        xq = (n / 2) ? -18'sd131072 : 18'sd131071;
      end else if (sel == 0) begin
        xi = '0; xq = '0;
      end else begin
        xi = sample_t'($urandom);
        xq = sample_t'($urandom);
      end
      en = 1;
      exp_q.push_back(isqrt(longint'(xi)*xi + longint'(xq)*xq));
      @(posedge clk); #1;
      en = 0;
      if (exp_q.size() >= ENV_LAT) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(env) != e) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d env=%0d exp=%0d", n, env, e);
        end
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
