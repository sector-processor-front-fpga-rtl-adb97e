// Level-1 pipeline FIFO: a programmable delay line for all links of a chip.
//
// The aligned 16-bit words of all NLINKS links are written side by side
// (NLINKS*16 bits) into one 2**AW-entry block RAM on every clock with
// `din_vld`.  The write pointer wraps; the read address trails it by `depth`
// entries, so the output is the word written `depth` writes earlier, which
// covers the L1Accept latency.  `depth` is the 9-bit VME field PC8..PC0
// (one value, the same in every Front FPGA) and must be at least 1.
//
// Status: `fill` counts writes since reset, saturating at 2**AW-1.  `empty`
// (PEF) means nothing has been written; `full` (PFF) means the line holds at
// least `depth` words, so `dout` is the delayed stream (`dout_vld`).
// Timing: a word written on clock k is output (registered) after clock
// k+depth, i.e. input-to-output latency is depth+1 clocks.
module pipeline_fifo #(
  parameter int NLINKS = 3,
  parameter int DW     = 16,
  parameter int AW     = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NLINKS*DW-1:0] din,
  input  logic                 din_vld,
  input  logic [AW-1:0]        depth,
  output logic [NLINKS*DW-1:0] dout,
  output logic                 dout_vld,
  output logic                 empty,
  output logic                 full
);
  logic [NLINKS*DW-1:0] mem [2**AW];
  logic [AW-1:0]        wp, fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      fill     <= '0;
      dout_vld <= 1'b0;
    end else begin
      dout_vld <= 1'b0;
      if (din_vld) begin
        wp <= wp + 1'b1;
        if (!(&fill)) fill <= fill + 1'b1;
        dout_vld <= (fill >= depth) && (depth != '0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (din_vld) begin
      mem[wp] <= din;
      dout    <= mem[wp - depth];
    end
  end

  assign empty = (fill == '0);
  assign full  = (fill >= depth) && (depth != '0);

endmodule
