// Alignment FIFO of one link.
//
// Moves the link's 16-bit words from its receive clock to the global clock
// and lets all links be read out in step.  Writing starts with the first
// normal data word after the link's synchronisation procedure (`start`, from
// the link monitor) and then continues on every receive clock, so the FIFO
// holds an unbroken bunch-crossing sequence; a clock that carries no normal
// data is written as a zero word.  `af_wr` reports that writing has begun;
// the alignment master collects this status from every Front FPGA and, once
// the latest link has started, raises `af_rd` for all of them at once, so
// every link delivers its first bunch crossing on the same global clock.
// Reading then continues on every global clock while `af_rd` is high.
//
// Status (global clock): 6-bit word count, empty (AEF) and full (AFF).  Depth
// is a 64-entry RAM holding 63 words, the 16 x 63 block-RAM FIFO of the
// resource budget.  A word arriving while the FIFO is full is dropped and
// the sticky `overflow` bit is set (the drop policy is this design's choice).
// Output data is registered: `dout_vld` follows `af_rd` by one global clock.
module alignment_fifo #(
  parameter int DW = 16,
  parameter int AW = 6
) (
  // receive-clock side
  input  logic          wclk,
  input  logic          wrst,
  input  logic          start,      // first normal word after sync
  input  logic          word_ok,    // current word is normal data
  input  logic [DW-1:0] din,
  output logic          af_wr,      // writing has started
  output logic          overflow,
  // global-clock side
  input  logic          rclk,
  input  logic          rrst,
  input  logic          af_rd,      // read enable from the alignment master
  output logic [DW-1:0] dout,
  output logic          dout_vld,
  output logic          empty,      // AEF
  output logic          full,       // AFF
  output logic [AW-1:0] count       // AC
);
  logic          wr_active, wr, wfull;
  logic [DW-1:0] wdata;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wr_active <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (start) wr_active <= 1'b1;
      if (wr && wfull) overflow <= 1'b1;
    end
  end

  assign wr    = wr_active || start;
  assign wdata = word_ok ? din : '0;
  assign af_wr = wr_active;

  async_fifo #(.DW(DW), .AW(AW)) u_fifo (
    .wclk(wclk), .wrst(wrst), .wr(wr), .wdata(wdata), .wfull(wfull),
    .rclk(rclk), .rrst(rrst), .rd(af_rd), .rdata(dout), .rvalid(dout_vld),
    .rempty(empty), .rcount(count)
  );

  assign full = (count == AW'(2**AW - 1));

endmodule
