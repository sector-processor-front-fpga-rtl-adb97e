// Test pattern generator of one link.
//
// A 16 x 256 FIFO (capacity 255) is loaded word by word over VME.  While the
// link's TEN control bit is set the FIFO is played out, one word per global
// clock, on the TLK2501 transmit bus: TI_TXD carries the word and TI_TX_EN is
// high for it.  TI_TX_ER follows the TER control bit, so a pattern can also be
// sent as error-propagation words.  With TEN clear or the FIFO empty TX_EN is
// low, which the TLK2501 sends as IDLE (or carrier extend with TER set).
// Looped back (TLK2501 LOOPEN) or sent down a fibre, the pattern simulates an
// MPC data stream.  With TEN clear a VME read of the data register pops and
// returns the next word, so a pattern can be read back.  The TX bus is
// registered: a popped word drives TXD one clock after the pop.  Driving the
// transmitter from this FIFO is this design's reading of the test pattern
// feature.
module test_pattern #(
  parameter int DW = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ten,          // play the pattern out
  input  logic          ter,          // TX_ER level
  input  logic          vme_wr,       // push a word
  input  logic          vme_rd,       // pop a word (read back, TEN clear)
  input  logic [DW-1:0] vme_wdata,
  output logic [DW-1:0] vme_rdata,
  output logic          vme_rvalid,
  output logic          empty,        // TEF
  output logic          full,         // TFF
  output logic [AW-1:0] count,        // TC
  output logic [DW-1:0] txd,          // TI_TXD
  output logic          tx_en,        // TI_TX_EN
  output logic          tx_er         // TI_TX_ER
);
  logic          rd, rvalid;
  logic [DW-1:0] rdata;

  assign rd = ten ? !empty : vme_rd;

  sync_fifo #(.DW(DW), .AW(AW)) u_fifo (
    .clk(clk), .rst(rst), .wr(vme_wr), .wdata(vme_wdata),
    .rd(rd), .rdata(rdata), .rvalid(rvalid),
    .empty(empty), .full(full), .count(count)
  );

  logic played;   // the word in rdata was popped for transmission
  always_ff @(posedge clk) begin
    if (rst) played <= 1'b0;
    else     played <= ten && !empty;
  end

  assign txd        = (rvalid && played) ? rdata : '0;
  assign tx_en      = rvalid && played;
  assign tx_er      = ter;
  assign vme_rdata  = rdata;
  assign vme_rvalid = rvalid && !played;

endmodule
