// Reset synchroniser: turns the global reset into a reset that rises and
// falls on the destination clock (two-flop, synchronous), for the receive
// clock domains of the links.  Release is delayed by two clocks.
module rst_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic m;
  always_ff @(posedge clk) begin
    m       <= rst_in;
    rst_out <= m;
  end
endmodule
