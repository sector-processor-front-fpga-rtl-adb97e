// Testbench for link_monitor: drives SD / RX_DV / RX_ER sequences and checks
// the synchronisation detection, the four latched statuses, the error
// counter with each count mode, its saturation-free range and the Gray copy,
// against counts kept by the testbench itself.  A final random phase sends
// 3000 words of random status combinations (idle runs of random length
// included) and compares latches, counter and synchronisations with a
// word-level model after every 50 words.
module tb_link_monitor;
  logic clk = 0, rst = 1;
  logic sd, dv, er, cce, cer;
  logic [15:0] rxd;
  logic sd_q, dv_q, er_q, word_ok, sync_done, synced;
  logic [15:0] rxd_q;
  fp_pkg::link_latch_t latched;
  logic [9:0] err_cnt, err_gray;
  int checks = 0, failures = 0, n_sync = 0;

  link_monitor dut (.rx_clk(clk), .rst(rst), .sd(sd), .rx_dv(dv), .rx_er(er), .rxd(rxd),
    .cce(cce), .cer(cer), .sd_q(sd_q), .dv_q(dv_q), .er_q(er_q), .rxd_q(rxd_q),
    .word_ok(word_ok), .sync_done(sync_done), .synced(synced), .latched(latched),
    .err_cnt(err_cnt), .err_cnt_gray(err_gray));

  always #5 clk = ~clk;
  always @(posedge clk) if (sync_done) n_sync++;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one receive clock with the given status and data
  task automatic word(input logic s, input logic v, input logic e, input logic [15:0] d = 16'h0);
    sd <= s; dv <= v; er <= e; rxd <= d;
    @(posedge clk);
  endtask

  task automatic settle();
    repeat (4) word(1, 1, 0, 16'h1234);
  endtask

  initial begin
    sd = 0; dv = 0; er = 0; rxd = 0; cce = 0; cer = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    // before any sync: loss of signal and an error word latch
    word(0, 0, 0); word(1, 1, 1); settle();
    chk("lsd before sync", latched.lsd, 1);
    chk("ler before sync", latched.ler, 1);
    chk("no sync yet", synced, 0);
    // two idles only: not a synchronisation
    word(1, 0, 0); word(1, 0, 0); settle();
    chk("2 idles no sync", n_sync, 0);
    chk("lid latched", latched.lid, 1);
    // three idles then data: synchronisation clears everything
    word(1, 0, 0); word(1, 0, 0); word(1, 0, 0); settle();
    chk("sync seen", n_sync, 1);
    chk("synced", synced, 1);
    chk("latches cleared", latched, 4'b0000);
    chk("counter cleared", err_cnt, 0);
    // data path alignment
    word(1, 1, 0, 16'hBEEF);
    @(posedge clk); #1;
    chk("rxd aligned", rxd_q, 16'hBEEF);
    chk("word_ok", word_ok, 1);
    // count errors only (cce/cer pass a 2-flop synchroniser)
    cer = 1; settle();
    repeat (7) word(1, 1, 1);
    repeat (5) word(1, 0, 1);
    settle();
    chk("cer count", err_cnt, 7);
    chk("lce", latched.lce, 1);
    chk("ler", latched.ler, 1);
    chk("lid stays clear", latched.lid, 0);
    chk("lsd stays clear", latched.lsd, 0);
    // count carrier extend only
    cer = 0; cce = 1; settle();
    repeat (4) word(1, 1, 1);
    repeat (9) word(1, 0, 1);
    settle();
    chk("cce count", err_cnt, 16);
    // both
    cer = 1; settle();
    repeat (3) word(1, 1, 1);
    repeat (3) word(1, 0, 1);
    settle();
    chk("both count", err_cnt, 22);
    chk("gray", err_gray, 22 ^ (22 >> 1));
    // many errors: counter saturates at 1023
    repeat (1100) word(1, 1, 1);
    settle();
    chk("saturate", err_cnt, 1023);
    // an interrupted idle run does not sync
    word(1, 0, 0); word(1, 0, 0); word(1, 0, 1); word(1, 0, 0); settle();
    chk("interrupted idle", n_sync, 1);
    // a new sync clears again
    repeat (5) word(1, 0, 0); settle();
    chk("second sync", n_sync, 2);
    chk("cleared again", err_cnt, 0);
    // random phase against a word-level model
    cce = 1; cer = 1; settle();
    repeat (5) word(1, 0, 0); settle();
    m_lat = '0; m_cnt = 0; m_idle = 0; m_sync = n_sync;
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 99);
      if (k < 70)      mword(1, 1, 0);
      else if (k < 85) mword(1, 0, 0);
      else if (k < 90) mword(1, 0, 1);
      else if (k < 95) mword(1, 1, 1);
      else             mword(0, $urandom_range(0, 1), $urandom_range(0, 1));
      if (i % 50 == 49) begin
        // flush the input pipeline with normal words, modelled as well
        repeat (4) mword(1, 1, 0);
        #1;
        chk("rand sync count", n_sync, m_sync);
        chk("rand latched", latched, m_lat);
        chk("rand counter", err_cnt, m_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word-level model: {lid, ler, lce, lsd}
  logic [3:0] m_lat;
  int m_cnt, m_idle, m_sync;
  task automatic mword(input logic s, input logic v, input logic e);
    word(s, v, e, 16'(v ? 16'h5555 : 16'h0));
    if (s && v && !e) begin
      if (m_idle >= 3) begin m_lat = '0; m_cnt = 0; m_sync++; end
    end else if (!s) m_lat[0] = 1'b1;
    else if (!v && !e) m_lat[3] = 1'b1;
    else if (!v && e) begin m_lat[1] = 1'b1; if (m_cnt < 1023) m_cnt++; end
    else begin m_lat[2] = 1'b1; if (m_cnt < 1023) m_cnt++; end
    m_idle = (s && !v && !e) ? m_idle + 1 : 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
