// Address and control port of one external lookup SRAM.
//
// The Front FPGA drives the address and the control strobes of each external
// synchronous SRAM (local phi, global phi, global eta LUT).  In run mode the
// address is `run_addr`, derived from the incoming stub, with the SRAM
// selected and its outputs enabled, so the LUT answers every clock.
//
// For VME loading and read-back the port holds an address register written
// as a high part (bits AW-1..16, register `ahi_wr`) and a low part (bits 15..0,
// `alo_wr`); the user loads high, then low, then data.  Every data access
// (`op` = write or read) uses the register, then increments it by one.  The
// LUT data word is LDW bits; the VME sees 16-bit halves selected by `hi`
// (LDW=32, the global phi LUT: two write strobes, one per half, and a common
// address counter, so the part behaves like two 16-bit SRAMs).
//   write: one clock with the address, CE_n=0, WE_n[half]=0 and `lut_dout`
//          driven (`lut_doe`); `done` pulses the next clock.
//   read : one clock with CE_n=0, OE_n=0; `lut_din` is sampled LAT clocks
//          later (pipelined SRAM) and returned on `rdata` with `done`.
// An access steals the address from run mode only for its own clocks.  `op`
// is ignored while a read is in flight (`busy`).  The strobe timing against
// the SRAM's own clock phase is this design's choice.  Two outputs are plain
// by design: `lut_ce_n` is held low (the SRAM is selected every clock, run
// mode included), and `lut_dout` is the VME data word, placed on every 16-bit
// half and qualified by `lut_doe` and the half's write strobe.
module lut_port #(
  parameter int AW  = 18,   // SRAM address bits
  parameter int LDW = 16,   // SRAM data bits seen by the VME (16 or 32)
  parameter int NWE = 1,    // write strobes (LDW/16)
  parameter int LAT = 2     // SRAM read latency in clocks
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [AW-1:0]      run_addr,
  // VME side
  input  logic               ahi_wr,
  input  logic               alo_wr,
  input  fp_pkg::lut_op_e    op,
  input  logic               hi,         // upper 16-bit half (LDW=32)
  input  logic [15:0]        wdata,
  output logic [AW-1:0]      addr_reg,
  output logic [15:0]        rdata,
  output logic               done,
  output logic               busy,
  output logic               acc,        // this clock is a VME access
  // SRAM pins
  output logic [AW-1:0]      lut_a,
  output logic               lut_ce_n,
  output logic               lut_oe_n,
  output logic [NWE-1:0]     lut_we_n,
  output logic [LDW-1:0]     lut_dout,
  output logic               lut_doe,
  input  logic [LDW-1:0]     lut_din
);
  import fp_pkg::lut_op_e;
  import fp_pkg::LUT_WRITE;
  import fp_pkg::LUT_READ;

  logic [LAT:0]  rd_pipe;      // read in flight, one bit per clock of latency
  logic          rd_hi;
  logic          acc_wr, acc_rd;

  assign busy   = |rd_pipe[LAT-1:0];
  assign acc_wr = (op == LUT_WRITE) && !busy;
  assign acc_rd = (op == LUT_READ)  && !busy;
  assign acc    = acc_wr || acc_rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_reg <= '0;
      rd_pipe  <= '0;
      rd_hi    <= 1'b0;
      done     <= 1'b0;
      rdata    <= '0;
    end else begin
      rd_pipe <= {rd_pipe[LAT-1:0], acc_rd};
      done    <= acc_wr || rd_pipe[LAT-1];
      if (acc_rd) rd_hi <= hi;
      if (rd_pipe[LAT-1])
        rdata <= (LDW > 16 && rd_hi) ? lut_din[LDW-1 -: 16] : lut_din[15:0];
      if (ahi_wr)
        addr_reg[AW-1:16] <= wdata[AW-17:0];
      if (alo_wr)
        addr_reg[15:0] <= wdata;
      if (acc_wr || acc_rd)
        addr_reg <= addr_reg + 1'b1;
    end
  end

  always_comb begin
    lut_a    = (acc_wr || acc_rd) ? addr_reg : run_addr;
    lut_ce_n = 1'b0;
    lut_oe_n = acc_wr;
    lut_we_n = '1;
    if (acc_wr) begin
      if (NWE > 1) lut_we_n[hi] = 1'b0;
      else         lut_we_n[0]  = 1'b0;
    end
    lut_doe  = acc_wr;
    lut_dout = {(LDW/16){wdata}};
  end

endmodule
