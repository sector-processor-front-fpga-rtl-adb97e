// Front FPGA of the SP2002 sector processor: the receive side of NLINKS
// optical links between the muon port cards and the main sector processor.
//
// Per link, in the link's receive clock (TI_RX_CLK80): the link monitor
// registers RXD/RX_DV/RX_ER, synchronises SD, detects the TLK2501
// synchronisation procedure and keeps the latched statuses and the error
// counter; the alignment FIFO starts writing at the first data word after
// synchronisation.  Everything else runs in the global 80 MHz clock `clk`:
//   - the alignment FIFOs are read in step once the alignment master (in the
//     IS_MASTER chip) has seen every Front FPGA start writing and has waited
//     the CSC offset, so all links deliver the same bunch crossing together;
//   - each aligned 16-bit stream is demultiplexed into one 32-bit stub per
//     bunch crossing, which addresses the link's external lookup memories;
//   - the aligned words of all links enter the pipeline FIFO, a delay line of
//     programmable depth; on L1A its output is copied into the L1A DAQ FIFO
//     and later read out to the DDU with a request/acknowledge handshake,
//     optionally copied into a VME-readable spy FIFO;
//   - a test pattern FIFO per link can be played out on the TLK2501 transmit
//     bus; all transceiver control pins come from VME registers.
// The alignment write status leaves the chip on `af_wr_o` (all links of this
// chip writing); the master's read enable returns on `af_rd_i` and is
// registered once.  A non-master chip ties `af_wr_in` off and ignores
// `af_rd_o`.  All control lines are active high here; on the board the
// active-low pins (/AF_WR, /AF_RD, /xx_CE, /xx_OE, /xx_WE) carry them
// inverted at the pads, except the LUT strobes which are already active low.
//
// Run-mode LUT addresses: the local phi and global eta LUTs are addressed
// by the low bits of the link's current stub; the global phi LUT address in
// run mode comes from the nets between the local and global phi LUTs
// (`gp_run_addr`), and this chip drives those nets (through the board
// buffer, `gp_aoe`) only during VME accesses.  Which stub bits address
// which LUT is this design's choice.  LUT data reaches this chip through the
// board buffers: `*_dout`/`*_doe` for writes, `*_din` for reads.  The
// LUT write data buses carry the VME data word as it is (qualified by
// `*_doe` and the write strobes), and TI_TX_ER is the TER control bit, so
// these outputs follow inputs directly by design.  LP_CLK40 and GP_CLK40
// are the 40 MHz clocks of the local and global phi LUTs (phase 0 and 180):
// a divide-by-two of `clk` brought into step with the stub strobe; deriving
// them from `clk` rather than from CLK40 is this design's choice.
module front_fpga #(
  parameter int NLINKS    = 3,
  parameter int NFPGA     = 5,
  parameter bit IS_MASTER = 1'b1
) (
  input  logic        clk,                  // global 80 MHz clock
  input  logic        rst,                  // synchronous to clk
  // Finisar transceivers
  input  logic [NLINKS-1:0] fi_sd,
  output logic [NLINKS-1:0] fi_td,
  // TI TLK2501 transceivers
  output logic [NLINKS-1:0] ti_enable,
  output logic [NLINKS-1:0] ti_loopen,
  output logic [NLINKS-1:0] ti_prbsen,
  output logic [NLINKS-1:0] ti_tx_en,
  output logic [NLINKS-1:0] ti_tx_er,
  output logic [15:0]       ti_txd [NLINKS],
  input  logic [NLINKS-1:0] ti_rx_clk,
  input  logic [NLINKS-1:0] ti_rx_dv,
  input  logic [NLINKS-1:0] ti_rx_er,
  input  logic [15:0]       ti_rxd [NLINKS],
  // local phi LUT, 256K x 18
  output logic [17:0]       lp_a   [NLINKS],
  output logic [NLINKS-1:0] lp_ce_n,
  output logic [NLINKS-1:0] lp_oe_n,
  output logic [NLINKS-1:0] lp_we_n,
  output logic [15:0]       lp_dout [NLINKS],
  output logic [NLINKS-1:0] lp_doe,
  input  logic [15:0]       lp_din  [NLINKS],
  output logic              lp_clk40,       // LP_CLK40, phase 0
  output logic              gp_clk40,       // GP_CLK40, phase 180
  // global phi LUT, 512K x 36 (used as 2 x 16)
  input  logic [18:0]       gp_run_addr [NLINKS],
  output logic [18:0]       gp_a   [NLINKS],
  output logic [NLINKS-1:0] gp_aoe,
  output logic [NLINKS-1:0] gp_ce_n,
  output logic [NLINKS-1:0] gp_oe_n,
  output logic [NLINKS-1:0] gph_we_n,
  output logic [NLINKS-1:0] gpl_we_n,
  output logic [31:0]       gp_dout [NLINKS],
  output logic [NLINKS-1:0] gp_doe,
  input  logic [31:0]       gp_din  [NLINKS],
  // global eta LUT, 512K x 18
  output logic [18:0]       ge_a   [NLINKS],
  output logic [NLINKS-1:0] ge_ce_n,
  output logic [NLINKS-1:0] ge_oe_n,
  output logic [NLINKS-1:0] ge_we_n,
  output logic [15:0]       ge_dout [NLINKS],
  output logic [NLINKS-1:0] ge_doe,
  input  logic [15:0]       ge_din  [NLINKS],
  // demultiplexed stubs (32 bits per bunch crossing)
  output logic [31:0]       stub   [NLINKS],
  output logic              stub_vld,
  // alignment
  output logic              af_wr_o,
  input  logic [NFPGA-1:0]  af_wr_in,
  output logic              af_rd_o,
  input  logic              af_rd_i,
  // CCB
  input  logic              l1a,
  // DDU
  input  logic              ro_start,
  input  logic              ro_req,
  output logic              ro_ack,
  output logic [15:0]       ro_data,
  output logic [NLINKS-1:0] valid_pattern,
  output logic              ro_busy,
  // VME
  input  logic              vme_cs,
  input  logic              vme_we,
  input  logic [7:0]        vme_addr,
  input  logic [15:0]       vme_din,
  output logic [15:0]       vme_dout,
  output logic              vme_ack
);
  import fp_pkg::*;

  // ---------------- VME-side signals
  link_ctrl_t        link_ctrl [NLINKS];
  logic [NLINKS-1:0] link_cce, link_cer;
  link_stat_t        link_stat [NLINKS];
  logic [NLINKS-1:0] tf_wr, tf_rd, tf_rvalid;
  logic [15:0]       tf_rdata [NLINKS];
  logic              lut_ahi_wr [NLINKS][NLUT];
  logic              lut_alo_wr [NLINKS][NLUT];
  lut_op_e           lut_op     [NLINKS][NLUT];
  logic              lut_hi     [NLINKS][NLUT];
  logic [LUT_AWM-1:0] lut_addr  [NLINKS][NLUT];
  logic [15:0]       lut_rdata  [NLINKS][NLUT];
  logic              lut_done   [NLINKS][NLUT];
  logic [8:0]        pipe_depth;
  logic              pipe_empty, pipe_full;
  logic              daq_empty, daq_full, daq_overflow;
  logic [7:0]        daq_count;
  logic [4:0]        csc_offset;
  logic              ev_word_vld, spy_en, spy_rd_last, spy_empty, spy_full;
  logic [NLINKS*16-1:0] ev_word_data, spy_head;
  logic [7:0]        spy_count;

  // ---------------- datapath signals
  logic [NLINKS-1:0] af_wr_rx, af_wr_s, al_vld;
  logic [15:0]       al_dout [NLINKS];
  logic [NLINKS*16-1:0] pipe_din, pipe_dout;
  logic              pipe_vld;
  logic [NLINKS-1:0] stub_vld_l;
  logic              af_rd_q;

  function automatic logic [9:0] gray2bin(input logic [9:0] g);
    logic [9:0] b;
    b[9] = g[9];
    for (int i = 8; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) af_rd_q <= 1'b0;
    else     af_rd_q <= af_rd_i;
  end

  for (genvar l = 0; l < NLINKS; l++) begin : g_link
    logic        rx_rst;
    logic        sd_q, dv_q, er_q, word_ok, sync_done, synced, af_ovf;
    logic [15:0] rxd_q;
    link_latch_t latched;
    logic [9:0]  err_cnt, err_gray, err_gray_s;
    logic [2:0]  cur_s;
    link_latch_t latched_s;
    logic        al_empty, al_full;
    logic [5:0]  al_count;
    logic        tf_empty, tf_full;
    logic [7:0]  tf_count;
    logic [15:0] gp_rd16;

    rst_sync u_rst (.clk(ti_rx_clk[l]), .rst_in(rst), .rst_out(rx_rst));

    link_monitor u_mon (
      .rx_clk(ti_rx_clk[l]), .rst(rx_rst),
      .sd(fi_sd[l]), .rx_dv(ti_rx_dv[l]), .rx_er(ti_rx_er[l]), .rxd(ti_rxd[l]),
      .cce(link_cce[l]), .cer(link_cer[l]),
      .sd_q(sd_q), .dv_q(dv_q), .er_q(er_q), .rxd_q(rxd_q), .word_ok(word_ok),
      .sync_done(sync_done), .synced(synced), .latched(latched),
      .err_cnt(err_cnt), .err_cnt_gray(err_gray)
    );

    alignment_fifo u_af (
      .wclk(ti_rx_clk[l]), .wrst(rx_rst), .start(sync_done), .word_ok(word_ok),
      .din(rxd_q), .af_wr(af_wr_rx[l]), .overflow(af_ovf),
      .rclk(clk), .rrst(rst), .af_rd(af_rd_q), .dout(al_dout[l]),
      .dout_vld(al_vld[l]), .empty(al_empty), .full(al_full), .count(al_count)
    );

    // statuses into the global clock
    sync_bits #(.W(1))  u_s_afwr (.clk(clk), .d(af_wr_rx[l]), .q(af_wr_s[l]));
    sync_bits #(.W(3))  u_s_cur  (.clk(clk), .d({sd_q, dv_q, er_q}), .q(cur_s));
    sync_bits #(.W(4))  u_s_lat  (.clk(clk), .d(latched), .q(latched_s));
    sync_bits #(.W(10)) u_s_err  (.clk(clk), .d(err_gray), .q(err_gray_s));

    always_comb begin
      link_stat[l] = '{sd: cur_s[2], rdv: cur_s[1], rer: cur_s[0],
                       latched: latched_s, err_cnt: gray2bin(err_gray_s),
                       af_full: al_full, af_empty: al_empty, af_count: al_count,
                       tf_full: tf_full, tf_empty: tf_empty, tf_count: tf_count};
    end

    demux u_demux (
      .clk(clk), .rst(rst), .din(al_dout[l]), .din_vld(al_vld[l]),
      .dout(stub[l]), .dout_vld(stub_vld_l[l])
    );

    assign pipe_din[l*16 +: 16] = al_dout[l];

    test_pattern u_tp (
      .clk(clk), .rst(rst), .ten(link_ctrl[l].ten), .ter(link_ctrl[l].ter),
      .vme_wr(tf_wr[l]), .vme_rd(tf_rd[l]), .vme_wdata(vme_din),
      .vme_rdata(tf_rdata[l]), .vme_rvalid(tf_rvalid[l]),
      .empty(tf_empty), .full(tf_full), .count(tf_count),
      .txd(ti_txd[l]), .tx_en(ti_tx_en[l]), .tx_er(ti_tx_er[l])
    );

    // transceiver controls
    assign fi_td[l]     = link_ctrl[l].td;
    assign ti_enable[l] = link_ctrl[l].enb;
    assign ti_loopen[l] = link_ctrl[l].len;
    assign ti_prbsen[l] = link_ctrl[l].pen;

    // lookup memories
    lut_port #(.AW(18), .LDW(16), .NWE(1)) u_lp (
      .clk(clk), .rst(rst), .run_addr(stub[l][17:0]),
      .ahi_wr(lut_ahi_wr[l][LUT_LP]), .alo_wr(lut_alo_wr[l][LUT_LP]),
      .op(lut_op[l][LUT_LP]), .hi(lut_hi[l][LUT_LP]), .wdata(vme_din),
      .addr_reg(lut_addr[l][LUT_LP][17:0]), .rdata(lut_rdata[l][LUT_LP]),
      .done(lut_done[l][LUT_LP]), .busy(), .acc(),
      .lut_a(lp_a[l]), .lut_ce_n(lp_ce_n[l]), .lut_oe_n(lp_oe_n[l]),
      .lut_we_n(lp_we_n[l +: 1]), .lut_dout(lp_dout[l]), .lut_doe(lp_doe[l]),
      .lut_din(lp_din[l])
    );
    assign lut_addr[l][LUT_LP][18] = 1'b0;

    lut_port #(.AW(19), .LDW(32), .NWE(2)) u_gp (
      .clk(clk), .rst(rst), .run_addr(gp_run_addr[l]),
      .ahi_wr(lut_ahi_wr[l][LUT_GP]), .alo_wr(lut_alo_wr[l][LUT_GP]),
      .op(lut_op[l][LUT_GP]), .hi(lut_hi[l][LUT_GP]), .wdata(vme_din),
      .addr_reg(lut_addr[l][LUT_GP]), .rdata(gp_rd16),
      .done(lut_done[l][LUT_GP]), .busy(), .acc(gp_aoe[l]),
      .lut_a(gp_a[l]), .lut_ce_n(gp_ce_n[l]), .lut_oe_n(gp_oe_n[l]),
      .lut_we_n({gph_we_n[l], gpl_we_n[l]}), .lut_dout(gp_dout[l]), .lut_doe(gp_doe[l]),
      .lut_din(gp_din[l])
    );
    assign lut_rdata[l][LUT_GP] = gp_rd16;

    lut_port #(.AW(19), .LDW(16), .NWE(1)) u_ge (
      .clk(clk), .rst(rst), .run_addr(stub[l][18:0]),
      .ahi_wr(lut_ahi_wr[l][LUT_GE]), .alo_wr(lut_alo_wr[l][LUT_GE]),
      .op(lut_op[l][LUT_GE]), .hi(lut_hi[l][LUT_GE]), .wdata(vme_din),
      .addr_reg(lut_addr[l][LUT_GE]), .rdata(lut_rdata[l][LUT_GE]),
      .done(lut_done[l][LUT_GE]), .busy(), .acc(),
      .lut_a(ge_a[l]), .lut_ce_n(ge_ce_n[l]), .lut_oe_n(ge_oe_n[l]),
      .lut_we_n(ge_we_n[l +: 1]), .lut_dout(ge_dout[l]), .lut_doe(ge_doe[l]),
      .lut_din(ge_din[l])
    );
  end

  assign af_wr_o  = &af_wr_s;
  assign pipe_vld = &al_vld;
  assign stub_vld = &stub_vld_l;

  // ---------------- 40 MHz LUT clocks: a toggle of clk, resynchronised so
  // that LP_CLK40 is high in the clock after each new stub; GP_CLK40 is its
  // inverse (180 degrees)
  logic clk40_q;
  always_ff @(posedge clk) begin
    if (rst) clk40_q <= 1'b0;
    else     clk40_q <= stub_vld ? 1'b1 : !clk40_q;
  end
  assign lp_clk40 = clk40_q;
  assign gp_clk40 = !clk40_q;

  // ---------------- alignment master (one chip only)
  if (IS_MASTER) begin : g_master
    align_master #(.NFPGA(NFPGA), .OFFS_W(5)) u_master (
      .clk(clk), .rst(rst), .af_wr_in(af_wr_in), .csc_offset(csc_offset),
      .af_rd(af_rd_o)
    );
  end else begin : g_slave
    assign af_rd_o = 1'b0;
  end

  // ---------------- L1A pipeline and DAQ readout
  pipeline_fifo #(.NLINKS(NLINKS), .DW(16), .AW(9)) u_pipe (
    .clk(clk), .rst(rst), .din(pipe_din), .din_vld(pipe_vld), .depth(pipe_depth),
    .dout(pipe_dout), .dout_vld(), .empty(pipe_empty), .full(pipe_full)
  );

  daq_readout #(.NLINKS(NLINKS), .DW(16), .AW(8)) u_daq (
    .clk(clk), .rst(rst), .pipe_dout(pipe_dout), .l1a(l1a),
    .ro_start(ro_start), .ro_req(ro_req), .ro_ack(ro_ack), .ro_data(ro_data),
    .valid_pattern(valid_pattern), .ro_busy(ro_busy),
    .daq_empty(daq_empty), .daq_full(daq_full), .daq_count(daq_count),
    .overflow(daq_overflow), .ev_word_vld(ev_word_vld), .ev_word_data(ev_word_data)
  );

  // ---------------- L1A spy FIFO
  spy_fifo #(.NLINKS(NLINKS), .DW(16), .AW(8)) u_spy (
    .clk(clk), .rst(rst), .en(spy_en), .wr(ev_word_vld), .wdata(ev_word_data),
    .rd_last(spy_rd_last), .head(spy_head), .empty(spy_empty), .full(spy_full),
    .count(spy_count)
  );

  // ---------------- VME registers
  vme_regs #(.NLINKS(NLINKS), .IS_MASTER(IS_MASTER)) u_vme (
    .clk(clk), .rst(rst),
    .vme_cs(vme_cs), .vme_we(vme_we), .vme_addr(vme_addr), .vme_din(vme_din),
    .vme_dout(vme_dout), .vme_ack(vme_ack),
    .link_ctrl(link_ctrl), .link_cce(link_cce), .link_cer(link_cer),
    .link_stat(link_stat),
    .tf_wr(tf_wr), .tf_rd(tf_rd), .tf_rdata(tf_rdata), .tf_rvalid(tf_rvalid),
    .lut_ahi_wr(lut_ahi_wr), .lut_alo_wr(lut_alo_wr), .lut_op(lut_op),
    .lut_hi(lut_hi), .lut_addr(lut_addr), .lut_rdata(lut_rdata),
    .lut_done(lut_done),
    .pipe_depth(pipe_depth), .pipe_empty(pipe_empty), .pipe_full(pipe_full),
    .daq_empty(daq_empty), .daq_full(daq_full), .daq_count(daq_count),
    .csc_offset(csc_offset),
    .spy_en(spy_en), .spy_rd_last(spy_rd_last), .spy_head(spy_head),
    .spy_empty(spy_empty), .spy_full(spy_full), .spy_count(spy_count)
  );

endmodule
