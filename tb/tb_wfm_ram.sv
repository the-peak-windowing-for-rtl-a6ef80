// tb_wfm_ram: uploads a random waveform, plays it with a loop length shorter
// than the memory, and checks that a strobe comes exactly every 4 clocks with
// the samples in order, wrapping from `last` to 0; stopping and restarting
// playback starts again from address 0.
`timescale 1ns/1ps
module tb_wfm_ram;
  import pw_pkg::*;
  localparam int DEPTH = 4096;
  logic clk = 0, rst_n = 0, wr_en = 0, play = 0;
  logic [11:0] wr_addr = '0, last = '0;
  iq_t wr_data = '0, x;
  logic xen;
  int checks = 0, failures = 0, cyc = 0;
  iq_t ref_mem [DEPTH];

  wfm_ram dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play_check(int len, int nsamp);
    int idx = 0, last_cyc = -1;
    @(negedge clk);
    last = 12'(len - 1);
    play = 1;
    while (idx < nsamp) begin
      @(negedge clk);
      if (xen) begin
        checks++;
        if (x != ref_mem[idx % len]) begin
          failures++;
          if (failures < 10) $display("sample %0d wrong", idx);
        end
        if (last_cyc >= 0 && cyc - last_cyc != 4) failures++;
        last_cyc = cyc;
        idx++;
      end
    end
    play = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (xen) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ref_mem[a] = iq_t'({$urandom, $urandom});
      wr_en = 1; wr_addr = 12'(a); wr_data = ref_mem[a];
    end
    @(negedge clk);
    wr_en = 0;
    play_check(100, 350);
    play_check(DEPTH, DEPTH + 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
