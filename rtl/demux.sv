// 16-bit @ 80 MHz to 32-bit @ 40 MHz demultiplexer.
//
// Each bunch crossing a link carries one muon stub as two consecutive 16-bit
// frames.  Once the aligned stream starts (`din_vld` rises) the first word is
// frame 0 and the next frame 1; the pair is output as one 32-bit stub
// {frame1, frame0} with a one-clock `dout_vld` strobe, i.e. one stub every
// two global (80 MHz) clocks.  `dout` holds its value between strobes, which
// is what the external lookup memories clocked at 40 MHz sample.  The frame
// phase restarts whenever `din_vld` drops.  Which frame is the low half is
// this design's choice.
// Timing: the stub is registered and appears one clock after its frame 1.
module demux #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] din,
  input  logic          din_vld,
  output logic [2*DW-1:0] dout,
  output logic          dout_vld
);
  logic          phase;      // 0: expecting frame 0, 1: expecting frame 1
  logic [DW-1:0] frame0;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= 1'b0;
      frame0   <= '0;
      dout     <= '0;
      dout_vld <= 1'b0;
    end else begin
      dout_vld <= 1'b0;
      if (!din_vld) begin
        phase <= 1'b0;
      end else if (!phase) begin
        frame0 <= din;
        phase  <= 1'b1;
      end else begin
        dout     <= {din, frame0};
        dout_vld <= 1'b1;
        phase    <= 1'b0;
      end
    end
  end

endmodule
