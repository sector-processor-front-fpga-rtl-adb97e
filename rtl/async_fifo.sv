// Dual-clock FIFO with Gray-coded pointers.
//
// A 2**AW-entry RAM written in wclk and read in rclk.  Each side keeps a
// binary pointer one bit wider than the address and a Gray copy of it; the
// Gray pointer crosses to the other clock through two flops.  Full is
// detected on the write side, empty on the read side, each conservative with
// respect to the other clock.  To match a block-RAM FIFO of 2**AW-1 words the
// capacity is limited to 2**AW-1 entries, so the word count fits in AW bits.
// Read data appears one rclk cycle after `rd` (registered output, `rvalid`).
// Resets are synchronous, one per clock domain, and must overlap.
module async_fifo #(
  parameter int DW = 16,
  parameter int AW = 6
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  output logic          rempty,
  output logic [AW-1:0] rcount
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   wgray_r1, wgray_r2, rgray_w1, rgray_w2;
  logic [AW:0]   rbin_w, wbin_r, wused;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side
  always_ff @(posedge wclk) begin
    if (wrst) begin
      rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end
  assign rbin_w = g2b(rgray_w2);
  assign wused  = wbin - rbin_w;
  assign wfull  = (wused >= (AW+1)'(2**AW - 1));

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr && !wfull) begin
      wbin  <= wbin + 1'b1;
      wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
    end
  end
  always_ff @(posedge wclk)
    if (wr && !wfull) mem[wbin[AW-1:0]] <= wdata;

  // ---------------- read side
  always_ff @(posedge rclk) begin
    if (rrst) begin
      wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
  assign wbin_r = g2b(wgray_r2);
  assign rempty = (wbin_r == rbin);
  logic [AW:0] rused;
  assign rused  = wbin_r - rbin;
  assign rcount = rused[AW-1:0];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin   <= '0;
      rgray  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd && !rempty;
      if (rd && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end
  end
  always_ff @(posedge rclk)
    if (rd && !rempty) rdata <= mem[rbin[AW-1:0]];

endmodule
