// Single-clock block-RAM FIFO with word count and flags.
//
// 2**AW entries of DW bits, capacity 2**AW-1 so the word count fits the
// AW-bit status field.  A write when full and a read when empty are ignored.
// Read data is registered: `rdata`/`rvalid` appear one clock after `rd`.
// Used as the L1A DAQ FIFO (16 bits per link, 256 deep) and the test
// pattern FIFO (16 x 256).  Synchronous reset empties it.
module sync_fifo #(
  parameter int DW = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  output logic          empty,
  output logic          full,
  output logic [AW-1:0] count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (&count);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp     <= '0;
      rp     <= '0;
      count  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= do_rd;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
    if (do_rd) rdata   <= mem[rp];
  end

endmodule
