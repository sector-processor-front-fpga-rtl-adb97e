// End-to-end testbench of one Front FPGA at its default size (3 links,
// 5 Front FPGAs in the alignment group, alignment master).
//
// Three muon-port-card sources, each in its own receive clock phase, send
// loss of signal, then an IDLE synchronisation run of different length,
// then one stub per bunch crossing as two 16-bit frames.  Frame 0 holds a
// valid flag, the link number and the bunch-crossing number; frame 1 a
// checkable function of both.  The other four Front FPGAs of the alignment
// group are modelled by their write statuses, raised late, so the master
// releases the alignment FIFOs only when the last one is ready.
// The test then checks:
//   - alignment: every demultiplexed stub has the same bunch-crossing number
//     on all three links, advancing by one per stub;
//   - run-mode LUT addressing follows the stub;
//   - L1A capture through the programmed pipeline depth and DDU readout with
//     the valid pattern and the request/acknowledge handshake, against the
//     aligned word history seen at the pipeline input;
//   - DAQ FIFO overflow on an L1A burst and its status flags;
//   - error words latched (LER) and counted (CER) on one link, over VME;
//   - a test pattern played out on the TLK2501 transmit bus;
//   - VME loading and read-back of a local phi and a global phi LUT;
//   - the spy FIFO copy of the read-out words, read over VME;
//   - the 40 MHz LUT clocks in step with the stubs.
// Each mechanism's occurrences are counted; one that never happens fails.
module tb_front_fpga;
  import fp_pkg::*;
  localparam int NL = 3;
  localparam int NF = 5;
  localparam int DEPTH = 40;                 // pipeline depth, 80 MHz words

  logic clk = 0, rst = 1;
  logic [NL-1:0] rx_clk = '0;
  logic [NL-1:0] fi_sd, fi_td, ti_enable, ti_loopen, ti_prbsen, ti_tx_en, ti_tx_er;
  logic [NL-1:0] ti_rx_dv, ti_rx_er;
  logic [15:0]   ti_txd [NL], ti_rxd [NL];
  logic [17:0]   lp_a [NL];
  logic [NL-1:0] lp_ce_n, lp_oe_n, lp_we_n, lp_doe;
  logic lp_clk40, gp_clk40;
  logic [15:0]   lp_dout [NL], lp_din [NL];
  logic [18:0]   gp_run_addr [NL], gp_a [NL];
  logic [NL-1:0] gp_aoe, gp_ce_n, gp_oe_n, gph_we_n, gpl_we_n, gp_doe;
  logic [31:0]   gp_dout [NL], gp_din [NL];
  logic [18:0]   ge_a [NL];
  logic [NL-1:0] ge_ce_n, ge_oe_n, ge_we_n, ge_doe;
  logic [15:0]   ge_dout [NL], ge_din [NL];
  logic [31:0]   stub [NL];
  logic          stub_vld;
  logic          af_wr_o, af_rd_o;
  logic [NF-1:0] af_wr_in;
  logic          l1a, ro_start, ro_req, ro_ack, ro_busy;
  logic [15:0]   ro_data;
  logic [NL-1:0] valid_pattern;
  logic          vme_cs, vme_we, vme_ack;
  logic [7:0]    vme_addr;
  logic [15:0]   vme_din, vme_dout;

  int checks = 0, failures = 0;

  front_fpga dut (
    .clk(clk), .rst(rst), .fi_sd(fi_sd), .fi_td(fi_td),
    .ti_enable(ti_enable), .ti_loopen(ti_loopen), .ti_prbsen(ti_prbsen),
    .ti_tx_en(ti_tx_en), .ti_tx_er(ti_tx_er), .ti_txd(ti_txd),
    .ti_rx_clk(rx_clk), .ti_rx_dv(ti_rx_dv), .ti_rx_er(ti_rx_er), .ti_rxd(ti_rxd),
    .lp_clk40(lp_clk40), .gp_clk40(gp_clk40),
    .lp_a(lp_a), .lp_ce_n(lp_ce_n), .lp_oe_n(lp_oe_n), .lp_we_n(lp_we_n),
    .lp_dout(lp_dout), .lp_doe(lp_doe), .lp_din(lp_din),
    .gp_run_addr(gp_run_addr), .gp_a(gp_a), .gp_aoe(gp_aoe), .gp_ce_n(gp_ce_n),
    .gp_oe_n(gp_oe_n), .gph_we_n(gph_we_n), .gpl_we_n(gpl_we_n),
    .gp_dout(gp_dout), .gp_doe(gp_doe), .gp_din(gp_din),
    .ge_a(ge_a), .ge_ce_n(ge_ce_n), .ge_oe_n(ge_oe_n), .ge_we_n(ge_we_n),
    .ge_dout(ge_dout), .ge_doe(ge_doe), .ge_din(ge_din),
    .stub(stub), .stub_vld(stub_vld),
    .af_wr_o(af_wr_o), .af_wr_in(af_wr_in), .af_rd_o(af_rd_o), .af_rd_i(af_rd_o),
    .l1a(l1a), .ro_start(ro_start), .ro_req(ro_req), .ro_ack(ro_ack),
    .ro_data(ro_data), .valid_pattern(valid_pattern), .ro_busy(ro_busy),
    .vme_cs(vme_cs), .vme_we(vme_we), .vme_addr(vme_addr), .vme_din(vme_din),
    .vme_dout(vme_dout), .vme_ack(vme_ack));

  // external lookup memories
  for (genvar l = 0; l < NL; l++) begin : g_sram
    lut_sram #(.AW(18), .DW(16), .NWE(1), .LAT(2)) u_lp (.clk(clk), .a(lp_a[l]),
      .ce_n(lp_ce_n[l]), .oe_n(lp_oe_n[l]), .we_n(lp_we_n[l]), .d(lp_dout[l]), .q(lp_din[l]));
    lut_sram #(.AW(19), .DW(32), .NWE(2), .LAT(2)) u_gp (.clk(clk), .a(gp_a[l]),
      .ce_n(gp_ce_n[l]), .oe_n(gp_oe_n[l]), .we_n({gph_we_n[l], gpl_we_n[l]}),
      .d(gp_dout[l]), .q(gp_din[l]));
    lut_sram #(.AW(19), .DW(16), .NWE(1), .LAT(2)) u_ge (.clk(clk), .a(ge_a[l]),
      .ce_n(ge_ce_n[l]), .oe_n(ge_oe_n[l]), .we_n(ge_we_n[l]), .d(ge_dout[l]), .q(ge_din[l]));
    assign gp_run_addr[l] = 19'(lp_din[l]);
  end

  // 80 MHz global clock; receive clocks at the same rate, other phases
  always #6.25 clk = ~clk;
  initial begin
    #2.0 forever #6.25 rx_clk[0] = ~rx_clk[0];
  end
  initial begin
    #4.5 forever #6.25 rx_clk[1] = ~rx_clk[1];
  end
  initial begin
    #9.1 forever #6.25 rx_clk[2] = ~rx_clk[2];
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- muon port card sources
  function automatic logic [15:0] frame0(input int l, input int bx);
    return {1'(((bx + l) % 3) != 0), 2'(l), 13'(bx)};
  endfunction
  function automatic logic [15:0] frame1(input int l, input int bx);
    return 16'(bx * 7 + l * 1000 + 3);
  endfunction

  int  start_clk [NL] = '{100, 110, 120};      // receive clock at which IDLE starts
  int  idle_len  [NL] = '{5, 3, 9};
  bit  inject_err [NL];
  int  n_err_words = 0;
  for (genvar l = 0; l < NL; l++) begin : g_src
    int t = 0, w = 0;
    always @(posedge rx_clk[l]) begin
      t <= t + 1;
      if (rst || t < start_clk[l]) begin
        fi_sd[l] <= 0; ti_rx_dv[l] <= 0; ti_rx_er[l] <= 0; ti_rxd[l] <= 16'hDEAD;
      end else if (t < start_clk[l] + idle_len[l]) begin
        fi_sd[l] <= 1; ti_rx_dv[l] <= 0; ti_rx_er[l] <= 0; ti_rxd[l] <= 16'hBC50;
      end else begin
        fi_sd[l] <= 1; ti_rx_dv[l] <= 1;
        ti_rx_er[l] <= inject_err[l];
        if (inject_err[l]) n_err_words++;
        ti_rxd[l] <= (w % 2 == 0) ? frame0(l, w / 2) : frame1(l, w / 2);
        w <= w + 1;
      end
    end
  end

  // ---------------- observation of the aligned stream and the stubs
  logic [47:0] hist [int];          // pipeline input by global clock index
  int gclk = 0, n_stub = 0, n_stub_bad = 0, last_bx = -1, n_lut_run = 0, n_lut_bad = 0;
  int first_idx = -1;
  int n_clk40 = 0, n_clk40_bad = 0;
  bit prev_sv = 0;
  int n_af_rd = 0, n_err_stub = 0, err_bx [$];
  always @(posedge clk) begin
    gclk <= gclk + 1;
    if (!rst && dut.pipe_vld) begin
      hist[gclk] = dut.pipe_din;
      if (first_idx < 0) first_idx = gclk;
    end
    if (!rst && af_rd_o && n_af_rd == 0) n_af_rd = 1;
    // LUT clocks: LP_CLK40 high (GP_CLK40 low) in the clock after each stub
    if (!rst && prev_sv) begin
      if (lp_clk40 == 1'b1 && gp_clk40 == 1'b0) n_clk40++;
      else n_clk40_bad++;
    end
    prev_sv = !rst && stub_vld;
    if (!rst && stub_vld) begin
      int bx;
      bit ok;
      bx = int'(stub[0][12:0]);
      ok = 1;
      for (int l = 0; l < NL; l++) begin
        if (stub[l][15:0] != frame0(l, bx) || stub[l][31:16] != frame1(l, bx)) begin
          // a stub hit by an injected error word arrives zeroed on that link
          if (!(l == 2 && (stub[l][15:0] == 0 || stub[l][31:16] == 0))) ok = 0;
          else n_err_stub++;
        end
      end
      if (last_bx >= 0 && bx != last_bx + 1) ok = 0;
      last_bx = bx;
      n_stub++;
      if (!ok) begin
        n_stub_bad++;
        if (n_stub_bad < 5) $display("stub mismatch at bx %0d: %h %h %h", bx, stub[0], stub[1], stub[2]);
      end
    end
  end
  // run-mode LUT address follows the registered stub
  always @(negedge clk) if (!rst && n_stub > 2 && !lp_doe[0] && lp_oe_n[0] == 0 && !vme_busy) begin
    n_lut_run++;
    if (lp_a[0] != stub[0][17:0] || ge_a[1] != stub[1][18:0]) n_lut_bad++;
  end

  // ---------------- VME helpers (driven on the falling edge)
  bit vme_busy = 0;
  task automatic vme(input logic we, input logic [7:0] a, input logic [15:0] d,
                     output logic [15:0] r);
    int guard = 0;
    vme_busy = 1;
    @(negedge clk);
    vme_cs = 1; vme_we = we; vme_addr = a; vme_din = d;
    @(negedge clk);
    vme_cs = 0;
    while (!vme_ack && guard < 50) begin @(negedge clk); guard++; end
    if (guard >= 50) begin failures++; $display("FAIL vme timeout at %h", a); end
    r = vme_dout;
    @(negedge clk);
    vme_busy = 0;
  endtask
  task automatic vw(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] r;
    vme(1, a, d, r);
  endtask
  task automatic vr(input logic [7:0] a, output logic [15:0] r);
    vme(0, a, 0, r);
  endtask

  // ---------------- L1A and readout
  logic [47:0] ev_q [$];
  logic [47:0] spy_exp [$];
  int n_spy = 0;
  int n_l1a = 0, n_events = 0, n_words = 0, n_pair_ok = 0;

  // wait until an L1A on the next clock edge captures frame 0 then frame 1
  task automatic wait_frame0();
    int guard = 0;
    forever begin
      @(negedge clk);
      if (first_idx >= 0 && gclk - 1 - DEPTH >= first_idx &&
          ((gclk - 1 - DEPTH - first_idx) % 2) == 0) break;
      if (++guard > 1000) begin failures++; $display("FAIL no frame 0"); break; end
    end
  endtask

  // one L1A clock; records the two words the DAQ FIFO should capture
  task automatic fire_l1a(input bit keep);
    l1a = 1;
    @(posedge clk);
    if (keep) begin
      ev_q.push_back(hist[gclk - 1 - DEPTH]);
      ev_q.push_back(hist[gclk - DEPTH]);
    end
    @(negedge clk);
    l1a = 0;
    n_l1a++;
  endtask

  task automatic handshake(output logic [15:0] w);
    int guard = 0;
    @(negedge clk);
    ro_req = 1;
    while (!ro_ack && guard < 50) begin @(negedge clk); guard++; end
    w = ro_data;
    ro_req = 0;
    while (ro_ack && guard < 100) begin @(negedge clk); guard++; end
    if (guard >= 50) begin failures++; $display("FAIL handshake timeout"); end
  endtask

  task automatic readout_one();
    logic [47:0] f0, f1;
    logic [2:0] vp;
    logic [15:0] w;
    int guard = 0;
    f0 = ev_q.pop_front(); f1 = ev_q.pop_front();
    vp = {f0[47], f0[31], f0[15]};
    @(negedge clk); ro_start = 1;
    @(negedge clk); ro_start = 0;
    while ((ro_busy || guard < 2) && guard < 20) begin @(negedge clk); guard++; end
    chk("valid pattern", int'(valid_pattern), int'(vp));
    for (int l = 0; l < NL; l++)
      if (vp[l]) begin
        handshake(w); chk($sformatf("ro link %0d f0", l), int'(w), int'(f0[l*16 +: 16]));
        handshake(w); chk($sformatf("ro link %0d f1", l), int'(w), int'(f1[l*16 +: 16]));
        n_words += 2;
      end
    // same bunch crossing in both frames of every link
    if (f1[15:0] == frame1(0, int'(f0[12:0]))) n_pair_ok++;
    n_events++;
  endtask

  // ---------------- test pattern capture
  logic [15:0] tx_seen [$];
  always @(posedge clk) if (!rst && ti_tx_en[0]) tx_seen.push_back(ti_txd[0]);

  logic [15:0] r;
  int n_overflow = 0, n_tp = 0, n_lut_wr = 0, n_lut_rd = 0, n_latched = 0, n_counted = 0;
  initial begin
    vme_cs = 0; vme_we = 0; vme_addr = 0; vme_din = 0;
    l1a = 0; ro_start = 0; ro_req = 0;
    af_wr_in = '0;
    inject_err = '{default: 0};
    repeat (10) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    // configuration
    vw(8'hC0, 16'(DEPTH));
    vw(8'hE0, 16'd4);               // CSC offset
    vw(8'h82, 16'h2000);            // link 2 counts error words
    vr(8'hC0, r); chk("depth readback", int'(r[8:0]), DEPTH);
    // other Front FPGAs of the group become ready late
    fork
      begin
        wait (gclk >= 140);
        af_wr_in[NF-1:1] = '1;
      end
      forever begin
        @(posedge clk);
        af_wr_in[0] = af_wr_o;
      end
    join_none
    // the master must hold read enable until the last chip is ready
    wait (gclk >= 137);
    chk("all own links writing", int'(af_wr_o), 1);
    chk("held off by other chips", int'(af_rd_o), 0);
    wait (af_rd_o);
    repeat (DEPTH + 200) @(posedge clk);
    chk("stubs flowing", int'(n_stub > 50), 1);
    // alignment FIFO status: a residual word count, not empty
    vr(8'h44, r); chk("af1 not empty", int'(r[12]), 0);
    vr(8'hC0, r); chk("pipe full flag", int'(r[13]), 1);
    vw(8'hD0, 16'h8000);            // spy FIFO on
    // L1As and readout
    for (int i = 0; i < 8; i++) begin
      wait_frame0();
      fire_l1a(1);
      repeat ($urandom_range(2, 30)) @(posedge clk);
    end
    @(posedge clk);
    vr(8'hC8, r); chk("daq count", int'(r[7:0]), 16);
    spy_exp = ev_q;
    for (int i = 0; i < 8; i++) readout_one();
    // spy FIFO: a copy of the 16 words read out, all links
    vw(8'hD0, 16'h0000);            // spy FIFO off for the burst
    vr(8'hD0, r); chk("spy count", int'(r[7:0]), 16);
    for (int i = 0; i < 16; i++) begin
      logic [47:0] sw;
      vr(8'hD2, sw[15:0]); vr(8'hD4, sw[31:16]); vr(8'hD6, sw[47:32]);
      chk($sformatf("spy word %0d", i), int'(sw == spy_exp[i]), 1);
      if (sw == spy_exp[i]) n_spy++;
    end
    vr(8'hD0, r); chk("spy empty", int'(r[12]), 1);
    vr(8'hC8, r); chk("daq empty flag", int'(r[12]), 1);
    // L1A burst overflows the DAQ FIFO: 127 events fit
    wait_frame0();
    for (int i = 0; i < 130; i++) begin
      fire_l1a(i < 127);
      @(negedge clk);
    end
    // the burst keeps the frame phase: one L1A every two clocks
    @(posedge clk);
    chk("overflow seen", int'(dut.daq_overflow), 1);
    vr(8'hC8, r);
    chk("daq full flag", int'(r[13]), 1);
    chk("daq count 254", int'(r[7:0]), 254);
    if (r[13]) n_overflow++;
    for (int i = 0; i < 127; i++) readout_one();
    // error words on link 2
    @(posedge rx_clk[2]); inject_err[2] = 1;
    repeat (3) @(posedge rx_clk[2]); inject_err[2] = 0;
    repeat (20) @(posedge clk);
    vr(8'h80, r); chk("link 2 LER", int'(r[14]), 1);
    if (r[14]) n_latched++;
    chk("link 2 SD/RDV", int'(r[9:8]), 2'b11);
    vr(8'h82, r); chk("link 2 error count", int'(r[9:0]), n_err_words);
    if (r[9:0] != 0) n_counted++;
    vr(8'h00, r); chk("link 0 clean", int'(r[15:12]), 0);
    // test pattern on link 0
    for (int i = 0; i < 10; i++) vw(8'h08, 16'h1000 + 16'(i * 3));
    vr(8'h06, r); chk("tf count", int'(r[7:0]), 10);
    vw(8'h00, 16'h000A);            // ENB + TEN
    repeat (20) @(posedge clk);
    chk("tp words", tx_seen.size(), 10);
    for (int i = 0; i < tx_seen.size(); i++) begin
      chk($sformatf("tp %0d", i), int'(tx_seen[i]), 'h1000 + i * 3);
      n_tp++;
    end
    chk("tx enable pin", int'(ti_enable[0]), 1);
    // local phi LUT of link 1: load 5 words from 0x2FFFE, read back
    vw(8'h50, 16'h0002); vw(8'h52, 16'hFFFE);
    for (int i = 0; i < 5; i++) begin vw(8'h56, 16'h3300 + 16'(i)); n_lut_wr++; end
    vr(8'h50, r); chk("lp addr hi after", int'(r), 3);
    vr(8'h52, r); chk("lp addr lo after", int'(r), 3);
    chk("lp sram", int'(g_sram[1].u_lp.mem[18'h30001]), 'h3303);
    vw(8'h50, 16'h0002); vw(8'h52, 16'hFFFE);
    for (int i = 0; i < 5; i++) begin
      vr(8'h56, r); chk($sformatf("lp read %0d", i), int'(r), 'h3300 + i); n_lut_rd++;
    end
    // global phi LUT of link 2: high and low halves with a common counter
    vw(8'hA0, 16'h0007); vw(8'hA2, 16'h0010);
    vw(8'hA4, 16'hAAAA); vw(8'hA4, 16'hBBBB);
    vw(8'hA0, 16'h0007); vw(8'hA2, 16'h0010);
    vw(8'hA6, 16'h1111); vw(8'hA6, 16'h2222);
    chk("gp word 0", int'(g_sram[2].u_gp.mem[19'h70010]), 'hAAAA1111);
    chk("gp word 1", int'(g_sram[2].u_gp.mem[19'h70011]), 'hBBBB2222);
    vw(8'hA0, 16'h0007); vw(8'hA2, 16'h0011);
    vr(8'hA4, r); chk("gp read hi", int'(r), 'hBBBB);
    n_lut_wr += 4; n_lut_rd++;
    // mechanism counts
    chk("stub mismatches", n_stub_bad, 0);
    chk("LUT clock phase errors", n_clk40_bad, 0);
    chk("run LUT address mismatches", n_lut_bad, 0);
    chk("events paired in one bunch crossing", n_pair_ok, n_events);
    $display("mechanisms: sync=%0d align_release=%0d stubs=%0d lut_run=%0d l1a=%0d events=%0d words=%0d overflow=%0d err_stubs=%0d latched=%0d counted=%0d test_words=%0d lut_wr=%0d lut_rd=%0d spy=%0d clk40=%0d",
             n_sync, n_af_rd, n_stub, n_lut_run, n_l1a, n_events, n_words, n_overflow,
             n_err_stub, n_latched, n_counted, n_tp, n_lut_wr, n_lut_rd, n_spy, n_clk40);
    chk("synchronisations", n_sync, NL);
    if (n_af_rd == 0 || n_stub == 0 || n_lut_run == 0 || n_l1a == 0 || n_events == 0 ||
        n_words == 0 || n_overflow == 0 || n_err_stub == 0 || n_latched == 0 ||
        n_counted == 0 || n_tp == 0 || n_lut_wr == 0 || n_lut_rd == 0 || n_spy == 0 || n_clk40 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sync = 0;
  for (genvar l = 0; l < NL; l++) begin : g_cnt
    always @(posedge rx_clk[l]) if (dut.g_link[l].sync_done) n_sync++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
