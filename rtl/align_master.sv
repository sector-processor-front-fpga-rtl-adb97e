// Alignment master: releases the read side of every alignment FIFO.
//
// Lives in the one Front FPGA that owns the CSC offset register.  Each Front
// FPGA reports one write status (`af_wr_in`, high once all its links have
// started writing their alignment FIFOs).  These arrive from other chips, so
// each passes a two-flop synchroniser into the global (FIFO read) clock.
// When every status is high, i.e. the latest link has started, a counter
// waits `csc_offset` further clocks (the offset lets CSC data line up with
// barrel data) and then raises `af_rd`, which is distributed back to all
// Front FPGAs and stays high until reset.  Unused inputs must be tied high.
//
// Timing: af_rd rises csc_offset + 1 clocks after the synchronised statuses
// are all high, that is csc_offset + 3 clocks after the last raw status rises.
module align_master #(
  parameter int NFPGA  = 5,
  parameter int OFFS_W = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NFPGA-1:0]  af_wr_in,
  input  logic [OFFS_W-1:0] csc_offset,
  output logic              af_rd
);
  logic [NFPGA-1:0]  s1, s2;
  logic [OFFS_W-1:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0;
    end else begin
      s1 <= af_wr_in; s2 <= s1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0;
      af_rd    <= 1'b0;
    end else if (!af_rd && (&s2)) begin
      if (wait_cnt == csc_offset) af_rd <= 1'b1;
      else                        wait_cnt <= wait_cnt + 1'b1;
    end
  end

endmodule
