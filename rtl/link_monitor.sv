// Link monitor for one optical link (Finisar FTRJ-8519 + TI TLK2501).
//
// Runs in the link's receive clock (TI_RX_CLK80).  The receive data word,
// RX_DV and RX_ER are registered twice and SD (asynchronous) passes a
// two-flop synchroniser, so all three status lines and the data word stay
// cycle-aligned at the outputs.
//
// Classification of each receive clock (SD, RX_DV, RX_ER):
//   normal   : SD=1 RX_DV=1 RX_ER=0   data word
//   idle     : SD=1 RX_DV=0 RX_ER=0
//   carrier  : SD=1 RX_DV=0 RX_ER=1   carrier extend
//   error    : SD=1 RX_DV=1 RX_ER=1   error propagation
//   no signal: SD=0
// A synchronisation procedure is a run of at least IDLE_MIN idle clocks.  The
// first normal word that follows it pulses `sync_done`, clears the latched
// statuses and the error counter (statuses accumulate from the previous
// synchronisation) and marks the link `synced`.  Every abnormal
// combination sets its latch (LSD, LID, LCE, LER).  The 10-bit error counter
// counts carrier-extend words when `cce` is set and error words when `cer`
// is set; it saturates at its maximum (saturation is this design's choice).
//
// `err_cnt_gray` is the Gray-coded counter for crossing into the global
// clock: it changes one bit per increment.  Its clear at a synchronisation is
// the one multi-bit step; a reader may see one wrong value at that moment.
// `cce`/`cer` are static configuration bits from the global domain and are
// synchronised here.  Reset is synchronous to rx_clk.
module link_monitor #(
  parameter int IDLE_MIN = 3,
  parameter int CNT_W    = 10,
  parameter int DW       = 16
) (
  input  logic             rx_clk,
  input  logic             rst,          // synchronous to rx_clk
  input  logic             sd,           // Finisar signal detect (async)
  input  logic             rx_dv,        // TLK2501 RX_DV/LOS
  input  logic             rx_er,        // TLK2501 RX_ER/PRBS_PASS
  input  logic [DW-1:0]    rxd,          // TLK2501 RXD
  input  logic             cce,          // count carrier-extend words
  input  logic             cer,          // count error words
  output logic             sd_q,         // current (synchronised) SD
  output logic             dv_q,         // current RX_DV
  output logic             er_q,         // current RX_ER
  output logic [DW-1:0]    rxd_q,        // data word aligned with the flags
  output logic             word_ok,      // the aligned word is normal data
  output logic             sync_done,    // first normal word after a sync
  output logic             synced,       // a synchronisation has been seen
  output fp_pkg::link_latch_t latched,
  output logic [CNT_W-1:0] err_cnt,
  output logic [CNT_W-1:0] err_cnt_gray
);

  logic          sd_m, dv_m, er_m;
  logic [DW-1:0] rxd_m;
  logic [1:0]    cce_s, cer_s;
  logic [$clog2(IDLE_MIN+1)-1:0] idle_run;
  logic          idle_c, carr_c, err_c, normal_c, nosig_c;

  // input registers / synchronisers
  always_ff @(posedge rx_clk) begin
    sd_m  <= sd;    sd_q  <= sd_m;
    dv_m  <= rx_dv; dv_q  <= dv_m;
    er_m  <= rx_er; er_q  <= er_m;
    rxd_m <= rxd;   rxd_q <= rxd_m;
    cce_s <= {cce_s[0], cce};
    cer_s <= {cer_s[0], cer};
  end

  always_comb begin
    nosig_c  = !sd_q;
    idle_c   = sd_q && !dv_q && !er_q;
    carr_c   = sd_q && !dv_q &&  er_q;
    err_c    = sd_q &&  dv_q &&  er_q;
    normal_c = sd_q &&  dv_q && !er_q;
  end

  assign word_ok   = normal_c;
  assign sync_done = normal_c && (idle_run >= IDLE_MIN[$bits(idle_run)-1:0]);

  always_ff @(posedge rx_clk) begin
    if (rst) begin
      idle_run <= '0;
      synced   <= 1'b0;
      latched  <= '0;
      err_cnt  <= '0;
    end else begin
      // length of the current idle run, saturating at IDLE_MIN; any other
      // combination except a normal word ends the run without arming
      if (idle_c) begin
        if (idle_run < IDLE_MIN[$bits(idle_run)-1:0]) idle_run <= idle_run + 1'b1;
      end else begin
        idle_run <= '0;
      end

      if (sync_done) begin
        synced  <= 1'b1;
        latched <= '0;
        err_cnt <= '0;
      end else begin
        if (nosig_c) latched.lsd <= 1'b1;
        if (idle_c)  latched.lid <= 1'b1;
        if (carr_c)  latched.lce <= 1'b1;
        if (err_c)   latched.ler <= 1'b1;
        if (((cce_s[1] && carr_c) || (cer_s[1] && err_c)) && !(&err_cnt))
          err_cnt <= err_cnt + 1'b1;
      end
    end
  end

  assign err_cnt_gray = err_cnt ^ (err_cnt >> 1);

endmodule
