// tb_lp_fir_iq: checks the I/Q low-pass filter against the direct 40-tap
// convolution of pw_ref_pkg with a windowed-sinc low-pass (cut-off 10 MHz at
// 30.72 MS/s), random I/Q at near full scale; y_valid must come 5 clocks
// after each strobe. Then bypass: output equals input one clock later.
`timescale 1ns/1ps
module tb_lp_fir_iq;
  import pw_pkg::*;
  import pw_ref_pkg::*;
  localparam int NS = 1200;
  logic clk = 0, rst_n = 0, xen = 0, bypass = 0, coef_we = 0;
  logic [4:0] coef_addr = '0;
  coef_t coef_data = '0;
  iq_t x = '0, y;
  logic y_valid;
  int checks = 0, failures = 0, cyc = 0;
  int xen_cyc [NS];

  lp_fir_iq dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2 * 4 * NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit byp);
    arr_t xi, xq, yi, yq;
    longint h [20];
    int k;
    xi = new[NS];
    xq = new[NS];
    for (int m = 0; m < NS; m++) begin
      xi[m] = longint'($urandom_range(0, 262143)) - 131072;
      xq[m] = longint'($urandom_range(0, 262143)) - 131072;
    end
    lpf_coefs(10.0 / 30.72, h);
    yi = fir40(xi, h);
    yq = fir40(xq, h);
    bypass = byp;
    for (int j = 0; j < 20; j++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 5'(j); coef_data = coef_t'(h[j]);
    end
    @(negedge clk);
    coef_we = 0;
    k = 0;
    fork
      for (int m = 0; m < NS; m++) begin
        @(negedge clk);
        x.i = sample_t'(xi[m]);
        x.q = sample_t'(xq[m]);
        xen = 1;
        xen_cyc[m] = cyc;
        @(negedge clk);
        xen = 0;
        repeat (2) @(negedge clk);
      end
      while (k < NS) begin
        @(negedge clk);
        if (y_valid) begin
          checks++;
          if (cyc - xen_cyc[k] != (byp ? 1 : 5)) failures++;
          if (byp) begin
            if (longint'(y.i) != xi[k] || longint'(y.q) != xq[k]) failures++;
          end else if (longint'(y.i) != yi[k] || longint'(y.q) != yq[k]) begin
            failures++;
            if (failures < 10) $display("k=%0d y=(%0d,%0d) exp=(%0d,%0d)", k, y.i, y.q, yi[k], yq[k]);
          end
          k++;
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1'b0);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
