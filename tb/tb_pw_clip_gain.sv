// tb_pw_clip_gain: checks c(n) = Th/e(n) (truncated to 17 fractional bits)
// when e(n) > Th and 1.0 otherwise, against integer division in the
// testbench, with the latency of 17 enabled samples. Thresholds sweep the
// 0.6..1.0 range used in the measurements; envelopes cover both sides of Th,
// equality and the largest possible envelope.
`timescale 1ns/1ps
module tb_pw_clip_gain;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  gain_t env = '0, th = '0, c;
  int checks = 0, failures = 0, nclip = 0;
  longint exp_q[$];

  pw_clip_gain dut (.*);
  always #5 clk = ~clk;

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
      th  = gain_t'(longint'((0.6 + 0.04 * (n % 11)) * 131072.0));
      sel = $urandom_range(0, 7);
      case (sel)
        0: env = th;
        1: env = th + 1;
        2: env = gain_t'(185364);          // above sqrt(2) full scale
        default: env = gain_t'($urandom_range(0, 185364));
      endcase
      en = 1;
      if (env > th) begin
        exp_q.push_back((longint'(th) << FRAC) / longint'(env));
        nclip++;
      end else exp_q.push_back(longint'(ONE));
      @(posedge clk); #1;
      en = 0;
      if (exp_q.size() >= CLIP_LAT) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(c) != e) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d c=%0d exp=%0d", n, c, e);
        end
      end
      repeat ($urandom_range(0, 1)) @(posedge clk);
      #1;
    end
    if (nclip < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
