// Two-flop synchroniser for W independent bits (or a Gray-coded value).
// Each bit is registered twice in the destination clock; a value whose bits
// change together may be seen mixed for one clock, so multi-bit values must
// change one bit at a time.  Latency: two destination clocks.
module sync_bits #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] m;
  always_ff @(posedge clk) begin
    m <= d;
    q <= m;
  end
endmodule
