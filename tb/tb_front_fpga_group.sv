// Testbench of a whole alignment group: five Front FPGAs at their default
// size (3 links each, 15 links in all), wired as on the sector processor.
// The middle chip (index 2) is the alignment master; every chip's write
// status goes to its af_wr_in inputs and its read enable goes back to all
// five chips.
//
// Each of the 15 muon-port-card sources has its own receive clock phase,
// start time and synchronisation length, the start times spread over
// 45 clocks.  Frame 0 of every stub carries a valid bit, the global link
// number and the bunch-crossing number; frame 1 a function of both.
// The test checks:
//   - the master waits for the latest chip and releases read enable exactly
//     CSC offset + 3 clocks after the last write status rises;
//   - all five chips strobe their stubs on the same clock, and every stub
//     of all 15 links carries the same bunch crossing, advancing by one;
//   - the CSC offset register reads back on the master and reads 0 on the
//     other chips.
// Counted mechanisms: chips ready, release, aligned bunch crossings; a
// mechanism that never happens is a failure.  Inputs change at the falling
// clock edge.
module tb_front_fpga_group;
  localparam int NL = 3;
  localparam int NF = 5;
  localparam int MASTER = 2;
  localparam int CSC_OFS = 6;

  logic clk = 0, rst = 1;
  logic [NF-1:0] af_wr;
  logic [NF-1:0] af_rd_out;
  logic          af_rd;
  logic [31:0]   stub [NF][NL];
  logic [NF-1:0] stub_vld;
  logic [NF-1:0] vme_cs, vme_ack;
  logic          vme_we;
  logic [7:0]    vme_addr;
  logic [15:0]   vme_din;
  logic [15:0]   vme_dout [NF];

  int checks = 0, failures = 0;

  assign af_rd = af_rd_out[MASTER];

  always #6.25 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] frame0(input int g, input int bx);
    return {1'b1, 4'(g), 11'(bx)};
  endfunction
  function automatic logic [15:0] frame1(input int g, input int bx);
    return 16'(bx * 5 + g * 77);
  endfunction

  for (genvar c = 0; c < NF; c++) begin : g_chip
    logic [NL-1:0] rx_clk = '0;
    logic [NL-1:0] fi_sd, ti_rx_dv, ti_rx_er;
    logic [15:0]   ti_rxd [NL];
    logic [NL-1:0] fi_td, ti_enable, ti_loopen, ti_prbsen, ti_tx_en, ti_tx_er;
    logic [15:0]   ti_txd [NL];
    logic [17:0]   lp_a [NL];
    logic [NL-1:0] lp_ce_n, lp_oe_n, lp_we_n, lp_doe;
    logic [15:0]   lp_dout [NL];
    logic [15:0]   lp_din [NL] = '{default: '0};
    logic [18:0]   gp_run_addr [NL] = '{default: '0};
    logic [18:0]   gp_a [NL];
    logic [NL-1:0] gp_aoe, gp_ce_n, gp_oe_n, gph_we_n, gpl_we_n, gp_doe;
    logic [31:0]   gp_dout [NL];
    logic [31:0]   gp_din [NL] = '{default: '0};
    logic [18:0]   ge_a [NL];
    logic [NL-1:0] ge_ce_n, ge_oe_n, ge_we_n, ge_doe;
    logic [15:0]   ge_dout [NL];
    logic [15:0]   ge_din [NL] = '{default: '0};
    logic          lp_clk40, gp_clk40, ro_ack, ro_busy;
    logic [15:0]   ro_data;
    logic [NL-1:0] valid_pattern;

    front_fpga #(.IS_MASTER(c == MASTER)) u_fpga (
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
      .stub(stub[c]), .stub_vld(stub_vld[c]),
      .af_wr_o(af_wr[c]), .af_wr_in(af_wr), .af_rd_o(af_rd_out[c]), .af_rd_i(af_rd),
      .l1a(1'b0), .ro_start(1'b0), .ro_req(1'b0), .ro_ack(ro_ack),
      .ro_data(ro_data), .valid_pattern(valid_pattern), .ro_busy(ro_busy),
      .vme_cs(vme_cs[c]), .vme_we(vme_we), .vme_addr(vme_addr), .vme_din(vme_din),
      .vme_dout(vme_dout[c]), .vme_ack(vme_ack[c]));

    for (genvar l = 0; l < NL; l++) begin : g_src
      localparam int G = c * NL + l;                  // global link number
      localparam int START = 100 + (G * 7) % 15 * 3;  // spread over 45 clocks
      localparam int IDLE  = 3 + G % 4;
      int t = 0, w = 0;
      initial begin
        #(0.4 + 0.8 * G) forever #6.25 rx_clk[l] = ~rx_clk[l];
      end
      always @(posedge rx_clk[l]) begin
        t <= t + 1;
        if (rst || t < START) begin
          fi_sd[l] <= 0; ti_rx_dv[l] <= 0; ti_rx_er[l] <= 0; ti_rxd[l] <= 16'hDEAD;
        end else if (t < START + IDLE) begin
          fi_sd[l] <= 1; ti_rx_dv[l] <= 0; ti_rx_er[l] <= 0; ti_rxd[l] <= 16'hBC50;
        end else begin
          fi_sd[l] <= 1; ti_rx_dv[l] <= 1; ti_rx_er[l] <= 0;
          ti_rxd[l] <= (w % 2 == 0) ? frame0(G, w / 2) : frame1(G, w / 2);
          w <= w + 1;
        end
      end
    end
  end

  // ---------------- observation
  int gclk = 0, last_wr_clk = -1, rd_clk = -1;
  int n_ready = 0, n_release = 0, n_aligned = 0, n_bad = 0, last_bx = -1;
  logic [NF-1:0] af_wr_q = '0;
  always @(posedge clk) begin
    gclk <= gclk + 1;
    if (!rst) begin
      for (int c = 0; c < NF; c++)
        if (af_wr[c] && !af_wr_q[c]) begin n_ready++; last_wr_clk = gclk; end
      af_wr_q = af_wr;
      if (af_rd && rd_clk < 0) begin
        rd_clk = gclk;
        n_release++;
      end
      if (|stub_vld) begin
        int bx;
        bit ok;
        ok = (&stub_vld);
        bx = int'(stub[0][0][10:0]);
        for (int c = 0; c < NF; c++)
          for (int l = 0; l < NL; l++)
            if (stub[c][l][15:0] != frame0(c * NL + l, bx) ||
                stub[c][l][31:16] != frame1(c * NL + l, bx)) ok = 0;
        if (last_bx >= 0 && bx != last_bx + 1) ok = 0;
        last_bx = bx;
        if (ok) n_aligned++;
        else begin
          n_bad++;
          if (n_bad < 5) $display("misaligned stubs at clock %0d: vld %b bx %0d", gclk, stub_vld, bx);
        end
      end
    end
  end

  // ---------------- VME
  task automatic vme(input int c, input logic we, input logic [7:0] a, input logic [15:0] d,
                     output logic [15:0] r);
    int guard = 0;
    @(negedge clk);
    vme_cs = '0; vme_cs[c] = 1'b1; vme_we = we; vme_addr = a; vme_din = d;
    @(negedge clk);
    vme_cs = '0;
    while (!vme_ack[c] && guard < 20) begin
      @(negedge clk);
      guard++;
    end
    r = vme_dout[c];
  endtask

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [15:0] r;
  initial begin
    vme_cs = '0; vme_we = 0; vme_addr = 0; vme_din = 0;
    repeat (10) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    vme(MASTER, 1, 8'hE0, 16'(CSC_OFS), r);
    vme(MASTER, 0, 8'hE0, 0, r);
    chk("master CSC offset", int'(r), CSC_OFS);
    vme(0, 1, 8'hE0, 16'h001F, r);
    vme(0, 0, 8'hE0, 0, r);
    chk("non-master CSC offset", int'(r), 0);
    wait (af_rd);
    repeat (400) @(posedge clk);
    chk("chips ready", n_ready, NF);
    chk("release after last chip", rd_clk - last_wr_clk, CSC_OFS + 3);
    chk("misaligned bunch crossings", n_bad, 0);
    chk("aligned bunch crossings", int'(n_aligned > 150), 1);
    $display("mechanisms: ready=%0d release=%0d aligned=%0d", n_ready, n_release, n_aligned);
    if (n_ready == 0 || n_release == 0 || n_aligned == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
