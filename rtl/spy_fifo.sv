// L1A spy FIFO: a VME-readable copy of the data read out to the DDU.
//
// While `en` is set, every event word that the readout takes from the L1A
// DAQ FIFO (frame 0 and frame 1 of each event, NLINKS*16 bits side by side)
// is also written into this FIFO, 2**AW entries of NLINKS*16 bits (16 x 256
// per link, capacity 255).  The oldest word is prefetched into a head
// register; VME reads the head one 16-bit lane per link, and reading the last
// lane advances to the next word.  Status: word count (head included,
// saturating at 255), empty (SEF) and full (SFF).  A word arriving when full
// is dropped.  Which words are copied, the enable bit and the read order are
// this design's choices.
module spy_fifo #(
  parameter int NLINKS = 3,
  parameter int DW     = 16,
  parameter int AW     = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic                  wr,
  input  logic [NLINKS*DW-1:0]  wdata,
  input  logic                  rd_last,   // the last lane of the head was read
  output logic [NLINKS*DW-1:0]  head,
  output logic                  empty,     // SEF
  output logic                  full,      // SFF
  output logic [AW-1:0]         count
);
  logic          head_vld, f_rd, f_rvalid, f_empty;
  logic [AW-1:0] f_count;
  logic [NLINKS*DW-1:0] f_rdata;

  sync_fifo #(.DW(NLINKS*DW), .AW(AW)) u_fifo (
    .clk(clk), .rst(rst), .wr(wr && en), .wdata(wdata),
    .rd(f_rd), .rdata(f_rdata), .rvalid(f_rvalid),
    .empty(f_empty), .full(full), .count(f_count)
  );

  // fetch the next word when the head is free and no fetch is in flight
  assign f_rd = !f_empty && !f_rvalid && (!head_vld || rd_last);

  always_ff @(posedge clk) begin
    if (rst) begin
      head_vld <= 1'b0;
      head     <= '0;
    end else begin
      if (f_rvalid) begin
        head     <= f_rdata;
        head_vld <= 1'b1;
      end else if (rd_last) begin
        head_vld <= 1'b0;
      end
    end
  end

  assign empty = !head_vld;
  assign count = (head_vld && !(&f_count)) ? f_count + 1'b1 : f_count;

endmodule
