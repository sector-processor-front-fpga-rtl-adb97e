// VME register file of one Front FPGA.
//
// The chip occupies a 256-byte window of D16 registers (byte offset
// `vme_addr`, bit 0 ignored).  Link n (n < NLINKS) owns offsets n*0x40 ..
// n*0x40+0x3F: link control/status, error counter, alignment and test FIFO
// status, test FIFO data, and the address/data registers of its three
// lookup memories.  Offsets 0xC0 (pipeline depth/status), 0xC8 (L1A DAQ FIFO
// status), 0xD0..0xD7 (spy FIFO) and 0xE0 (CSC offset, present only when IS_MASTER) are chip-wide.
//
// Bus cycle: the host pulses `vme_cs` for one clock with `vme_we`, `vme_addr`
// and `vme_din`, then waits for the one-clock `vme_ack`; read data is valid
// on `vme_dout` with `vme_ack`.  Register accesses acknowledge on the next
// clock; a test FIFO read waits for the FIFO's registered data (2 clocks) and
// a LUT data access waits for the LUT port's `done`.  A test FIFO read while
// the FIFO is empty or playing returns 0.  Unmapped offsets read 0 and
// ignore writes.  Register formats (bit 15 left):
//   link CSR    : LID LER LCE LSD - RER RDV SD - - PEN LEN ENB TER TEN TD
//   error count : - - CER CCE - - EC9..EC0
//   AF status   : - - AFF AEF - - - - - - AC5..AC0
//   TF status   : - - TFF TEF - - - - TC7..TC0
//   pipeline    : - - PFF PEF - - - PC8..PC0   (PC is the depth, W/R)
//   DAQ status  : - - DFF DEF - - - - DC7..DC0
//   CSC offset  : CO4..CO0 in bits 4..0
//   spy status  : SPE - SFF SEF - - - - SC7..SC0 (0xD0, SPE = enable, W/R)
//   spy data    : 0xD2 + 2n, lane n of the oldest spy word; reading the
//                 last link's lane advances to the next word
// The bus cycle, the reset values (transceiver enabled, everything else
// off, pipeline depth 0) and the placement of the 6-bit AF count in bits
// 5..0 are this design's choices.
module vme_regs #(
  parameter int NLINKS    = 3,
  parameter bit IS_MASTER = 1'b1
) (
  input  logic clk,
  input  logic rst,
  // VME side
  input  logic        vme_cs,
  input  logic        vme_we,
  input  logic [7:0]  vme_addr,
  input  logic [15:0] vme_din,
  output logic [15:0] vme_dout,
  output logic        vme_ack,
  // per-link controls and statuses
  output fp_pkg::link_ctrl_t link_ctrl [NLINKS],
  output logic [NLINKS-1:0]  link_cce,
  output logic [NLINKS-1:0]  link_cer,
  input  fp_pkg::link_stat_t link_stat [NLINKS],
  // test pattern FIFOs
  output logic [NLINKS-1:0]  tf_wr,
  output logic [NLINKS-1:0]  tf_rd,
  input  logic [15:0]        tf_rdata  [NLINKS],
  input  logic [NLINKS-1:0]  tf_rvalid,
  // lookup memory ports, [link][lut]
  output logic               lut_ahi_wr [NLINKS][fp_pkg::NLUT],
  output logic               lut_alo_wr [NLINKS][fp_pkg::NLUT],
  output fp_pkg::lut_op_e    lut_op     [NLINKS][fp_pkg::NLUT],
  output logic               lut_hi     [NLINKS][fp_pkg::NLUT],
  input  logic [fp_pkg::LUT_AWM-1:0] lut_addr [NLINKS][fp_pkg::NLUT],
  input  logic [15:0]        lut_rdata  [NLINKS][fp_pkg::NLUT],
  input  logic               lut_done   [NLINKS][fp_pkg::NLUT],
  // chip-wide
  output logic [8:0]         pipe_depth,
  input  logic               pipe_empty,
  input  logic               pipe_full,
  input  logic               daq_empty,
  input  logic               daq_full,
  input  logic [7:0]         daq_count,
  output logic [4:0]         csc_offset,
  // spy FIFO
  output logic               spy_en,
  output logic               spy_rd_last,
  input  logic [NLINKS*16-1:0] spy_head,
  input  logic               spy_empty,
  input  logic               spy_full,
  input  logic [7:0]         spy_count
);
  import fp_pkg::*;

  typedef enum logic [1:0] {W_NONE, W_TF, W_LUT} wait_e;

  logic [1:0]  sel_link;
  logic [5:0]  ofs;
  logic        is_link;
  logic [15:0] rd_val;
  wait_e       waiting;
  logic [1:0]  wait_link;
  lut_id_e     wait_lut;
  logic        ack_now;
  logic        vme_we_q;     // direction of the cycle being waited on

  always_ff @(posedge clk) if (ack_now) vme_we_q <= vme_we;

  assign sel_link = vme_addr[7:6];
  assign ofs      = {vme_addr[5:1], 1'b0};
  assign is_link  = (int'(sel_link) < NLINKS);

  // -------- combinational read value of plain registers
  always_comb begin
    link_stat_t st;
    rd_val = '0;
    st     = '0;
    if (is_link) begin
      st = link_stat[sel_link];
      case (ofs)
        OFS_LINK_CSR: rd_val = {st.latched, 1'b0, st.rer, st.rdv, st.sd, 2'b00,
                                link_ctrl[sel_link]};
        OFS_LINK_ERR: rd_val = {2'b00, link_cer[sel_link], link_cce[sel_link], 2'b00, st.err_cnt};
        OFS_AF_STAT:  rd_val = {2'b00, st.af_full, st.af_empty, 6'b0, st.af_count};
        OFS_TF_STAT:  rd_val = {2'b00, st.tf_full, st.tf_empty, 4'b0, st.tf_count};
        OFS_LP_AHI:   rd_val = 16'(lut_addr[sel_link][LUT_LP][LUT_AWM-1:16]);
        OFS_LP_ALO:   rd_val = lut_addr[sel_link][LUT_LP][15:0];
        OFS_GP_AHI:   rd_val = 16'(lut_addr[sel_link][LUT_GP][LUT_AWM-1:16]);
        OFS_GP_ALO:   rd_val = lut_addr[sel_link][LUT_GP][15:0];
        OFS_GE_AHI:   rd_val = 16'(lut_addr[sel_link][LUT_GE][LUT_AWM-1:16]);
        OFS_GE_ALO:   rd_val = lut_addr[sel_link][LUT_GE][15:0];
        default:      rd_val = '0;
      endcase
    end else begin
      case ({vme_addr[7:1], 1'b0})
        OFS_PIPE:     rd_val = {2'b00, pipe_full, pipe_empty, 3'b000, pipe_depth};
        OFS_DAQ_STAT: rd_val = {2'b00, daq_full, daq_empty, 4'b0, daq_count};
        OFS_CSC_OFS:  rd_val = IS_MASTER ? {11'b0, csc_offset} : 16'h0;
        OFS_SPY_STAT: rd_val = {spy_en, 1'b0, spy_full, spy_empty, 4'b0, spy_count};
        default: begin
          rd_val = '0;
          for (int l = 0; l < NLINKS; l++)
            if ({vme_addr[7:1], 1'b0} == OFS_SPY_DATA + 8'(2 * l))
              rd_val = spy_empty ? 16'h0 : spy_head[l*16 +: 16];
        end
      endcase
    end
  end

  // -------- strobes to the datapath (combinational, during the vme_cs clock)
  always_comb begin
    tf_wr = '0;
    tf_rd = '0;
    for (int l = 0; l < NLINKS; l++)
      for (int u = 0; u < NLUT; u++) begin
        lut_ahi_wr[l][u] = 1'b0;
        lut_alo_wr[l][u] = 1'b0;
        lut_op[l][u]     = LUT_NONE;
        lut_hi[l][u]     = 1'b0;
      end
    if (vme_cs && is_link && waiting == W_NONE) begin
      case (ofs)
        OFS_TF_DATA: begin
          tf_wr[sel_link] = vme_we;
          tf_rd[sel_link] = !vme_we && !link_ctrl[sel_link].ten &&
                            !link_stat[sel_link].tf_empty;
        end
        OFS_LP_AHI: lut_ahi_wr[sel_link][LUT_LP] = vme_we;
        OFS_LP_ALO: lut_alo_wr[sel_link][LUT_LP] = vme_we;
        OFS_GP_AHI: lut_ahi_wr[sel_link][LUT_GP] = vme_we;
        OFS_GP_ALO: lut_alo_wr[sel_link][LUT_GP] = vme_we;
        OFS_GE_AHI: lut_ahi_wr[sel_link][LUT_GE] = vme_we;
        OFS_GE_ALO: lut_alo_wr[sel_link][LUT_GE] = vme_we;
        OFS_LP_DATA: lut_op[sel_link][LUT_LP] = vme_we ? LUT_WRITE : LUT_READ;
        OFS_GP_DHI: begin
          lut_op[sel_link][LUT_GP] = vme_we ? LUT_WRITE : LUT_READ;
          lut_hi[sel_link][LUT_GP] = 1'b1;
        end
        OFS_GP_DLO: lut_op[sel_link][LUT_GP] = vme_we ? LUT_WRITE : LUT_READ;
        OFS_GE_DATA: lut_op[sel_link][LUT_GE] = vme_we ? LUT_WRITE : LUT_READ;
        default: ;
      endcase
    end
  end

  // reading the last link's lane of the spy FIFO head advances it
  assign spy_rd_last = ack_now && !vme_we && !spy_empty &&
                       ({vme_addr[7:1], 1'b0} == OFS_SPY_DATA + 8'(2 * (NLINKS - 1)));

  // -------- register writes and the acknowledge
  assign ack_now = vme_cs && (waiting == W_NONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < NLINKS; l++)
        link_ctrl[l] <= '{pen: 1'b0, len: 1'b0, enb: 1'b1, ter: 1'b0, ten: 1'b0, td: 1'b0};
      link_cce   <= '0;
      link_cer   <= '0;
      pipe_depth <= '0;
      csc_offset <= '0;
      spy_en     <= 1'b0;
      vme_ack    <= 1'b0;
      vme_dout   <= '0;
      waiting    <= W_NONE;
      wait_link  <= '0;
      wait_lut   <= LUT_LP;
    end else begin
      vme_ack <= 1'b0;
      if (ack_now) begin
        wait_link <= sel_link;
        if (is_link && ofs == OFS_TF_DATA && !vme_we && (|tf_rd)) begin
          waiting <= W_TF;
        end else if (is_link && (ofs == OFS_LP_DATA || ofs == OFS_GP_DHI ||
                                 ofs == OFS_GP_DLO || ofs == OFS_GE_DATA)) begin
          waiting  <= W_LUT;
          wait_lut <= (ofs == OFS_LP_DATA) ? LUT_LP :
                      (ofs == OFS_GE_DATA) ? LUT_GE : LUT_GP;
        end else begin
          vme_ack  <= 1'b1;
          vme_dout <= vme_we ? 16'h0 : rd_val;
        end
        if (vme_we) begin
          if (is_link) begin
            case (ofs)
              OFS_LINK_CSR: link_ctrl[sel_link] <= link_ctrl_t'(vme_din[5:0]);
              OFS_LINK_ERR: begin
                link_cer[sel_link] <= vme_din[13];
                link_cce[sel_link] <= vme_din[12];
              end
              default: ;
            endcase
          end else begin
            case ({vme_addr[7:1], 1'b0})
              OFS_PIPE:    pipe_depth <= vme_din[8:0];
              OFS_CSC_OFS: if (IS_MASTER) csc_offset <= vme_din[4:0];
              OFS_SPY_STAT: spy_en <= vme_din[15];
              default: ;
            endcase
          end
        end
      end else if (waiting == W_TF && tf_rvalid[wait_link]) begin
        waiting  <= W_NONE;
        vme_ack  <= 1'b1;
        vme_dout <= tf_rdata[wait_link];
      end else if (waiting == W_LUT && lut_done[wait_link][wait_lut]) begin
        waiting  <= W_NONE;
        vme_ack  <= 1'b1;
        vme_dout <= vme_we_q ? 16'h0 : lut_rdata[wait_link][wait_lut];
      end
    end
  end

  // a new cycle may only start after the previous one was acknowledged
  assert property (@(posedge clk) disable iff (rst) vme_cs |-> waiting == W_NONE);

endmodule
