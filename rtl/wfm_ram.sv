// wfm_ram: test-waveform memory for development and demonstration.
//
// A host uploads I/Q samples through the write port; with play = 1 the
// memory is read from address 0 to `last` and around again, one sample every
// PHASES clocks, producing the sample strobe xen for the chain (30.72 MS/s
// at a 122.88 MHz clock). The reference design names the block and its use;
// its depth (DEPTH, 4096 here), the upload port and the looping are this
// design's choice. Timing: x and xen change on the same edge; xen is a
// one-clock pulse; the first sample appears one clock after play rises.
module wfm_ram
  import pw_pkg::*;
#(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned PHASES = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  iq_t                      wr_data,
  input  logic                     play,
  input  logic [$clog2(DEPTH)-1:0] last,    // address of the last sample
  output iq_t                      x,
  output logic                     xen
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = $clog2(PHASES);

  iq_t           mem [DEPTH];
  logic [AW-1:0] raddr;
  logic [PW-1:0] ph;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr <= '0;
      ph    <= '0;
      xen   <= 1'b0;
      x     <= '0;
    end else if (!play) begin
      raddr <= '0;
      ph    <= '0;
      xen   <= 1'b0;
    end else begin
      ph  <= ph + 1'b1;
      xen <= (ph == '0);
      if (ph == '0) begin
        x     <= mem[raddr];
        raddr <= (raddr == last) ? '0 : raddr + 1'b1;
      end
    end
  end
endmodule
