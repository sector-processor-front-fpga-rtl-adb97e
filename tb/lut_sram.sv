// Behavioural model of a pipelined synchronous SRAM (no-bus-turnaround type,
// such as the lookup memories of the Front FPGA) for testbenches only.
// Address, controls and write data are sampled on the clock; a read returns
// data LAT clocks after the address.  One write strobe per 16-bit lane.  The
// array is a sparse associative array, so a 512K-word part costs only what
// is written; unwritten words read as zero.
module lut_sram #(
  parameter int AW  = 19,
  parameter int DW  = 32,
  parameter int NWE = 2,
  parameter int LAT = 2
) (
  input  logic           clk,
  input  logic [AW-1:0]  a,
  input  logic           ce_n,
  input  logic           oe_n,
  input  logic [NWE-1:0] we_n,
  input  logic [DW-1:0]  d,
  output logic [DW-1:0]  q
);
  logic [DW-1:0] mem [logic [AW-1:0]];
  logic [DW-1:0] pipe [LAT];

  always @(posedge clk) begin
    logic [DW-1:0] cur;
    cur = mem.exists(a) ? mem[a] : '0;
    if (!ce_n)
      for (int l = 0; l < NWE; l++)
        if (!we_n[l]) cur[l*16 +: 16] = d[l*16 +: 16];
    if (!ce_n && (we_n != '1)) mem[a] = cur;
    pipe[0] <= (!ce_n && !oe_n) ? cur : '0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign q = pipe[LAT-1];
endmodule
