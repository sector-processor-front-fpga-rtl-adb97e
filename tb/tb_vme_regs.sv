// Testbench for vme_regs: three links with known statuses.  Checks the
// register map offsets and bit packing of every status word, write/read of
// link controls, count controls, pipeline depth and CSC offset, the strobes
// sent to the test FIFOs and LUT ports, the waits for test FIFO and LUT data
// (acknowledge only after the data arrives), unmapped offsets, and the spy
// FIFO registers (enable bit, status packing, lane reads, and the advance
// strobe given only when the last link's lane is read).
module tb_vme_regs;
  import fp_pkg::*;
  localparam int NL = 3;
  logic clk = 0, rst = 1;
  logic vme_cs, vme_we, vme_ack;
  logic [7:0] vme_addr;
  logic [15:0] vme_din, vme_dout;
  link_ctrl_t link_ctrl [NL];
  logic [NL-1:0] link_cce, link_cer, tf_wr, tf_rd, tf_rvalid;
  link_stat_t link_stat [NL];
  logic [15:0] tf_rdata [NL];
  logic lut_ahi_wr [NL][NLUT], lut_alo_wr [NL][NLUT], lut_hi [NL][NLUT], lut_done [NL][NLUT];
  lut_op_e lut_op [NL][NLUT];
  logic [LUT_AWM-1:0] lut_addr [NL][NLUT];
  logic [15:0] lut_rdata [NL][NLUT];
  logic [8:0] pipe_depth;
  logic [4:0] csc_offset;
  logic [7:0] daq_count;
  int checks = 0, failures = 0;

  vme_regs dut (.clk(clk), .rst(rst),
    .vme_cs(vme_cs), .vme_we(vme_we), .vme_addr(vme_addr), .vme_din(vme_din),
    .vme_dout(vme_dout), .vme_ack(vme_ack), .link_ctrl(link_ctrl), .link_cce(link_cce),
    .link_cer(link_cer), .link_stat(link_stat), .tf_wr(tf_wr), .tf_rd(tf_rd),
    .tf_rdata(tf_rdata), .tf_rvalid(tf_rvalid), .lut_ahi_wr(lut_ahi_wr),
    .lut_alo_wr(lut_alo_wr), .lut_op(lut_op), .lut_hi(lut_hi), .lut_addr(lut_addr),
    .lut_rdata(lut_rdata), .lut_done(lut_done), .pipe_depth(pipe_depth),
    .pipe_empty(1'b0), .pipe_full(1'b1), .daq_empty(1'b1), .daq_full(1'b0),
    .daq_count(daq_count), .csc_offset(csc_offset),
    .spy_en(spy_en), .spy_rd_last(spy_rd_last), .spy_head(48'h3333_2222_1111),
    .spy_empty(spy_empty), .spy_full(1'b1), .spy_count(8'h2A));
  logic spy_en, spy_rd_last, spy_empty = 1'b0;
  int n_spy_adv = 0;
  always @(posedge clk) if (spy_rd_last) n_spy_adv++;

  always #5 clk = ~clk;

  // responders: test FIFO data one clock after the pop; LUT done 3 clocks
  // after a data access, read data = 0xA000 + link*16 + lut*2 + hi
  int n_tf_wr [NL], n_ahi [NL][NLUT], n_alo [NL][NLUT];
  logic [3:0] lut_cnt [NL][NLUT];
  logic lut_was_hi [NL][NLUT];
  always @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      tf_rvalid[l] <= tf_rd[l];
      tf_rdata[l]  <= 16'h7000 + 16'(l);
      if (tf_wr[l]) n_tf_wr[l]++;
      for (int u = 0; u < NLUT; u++) begin
        if (lut_ahi_wr[l][u]) n_ahi[l][u]++;
        if (lut_alo_wr[l][u]) n_alo[l][u]++;
        lut_done[l][u] <= (lut_cnt[l][u] == 1);
        if (lut_op[l][u] != LUT_NONE) begin
          lut_cnt[l][u] <= 3;
          lut_was_hi[l][u] <= lut_hi[l][u];
        end else if (lut_cnt[l][u] != 0) lut_cnt[l][u] <= lut_cnt[l][u] - 1;
        lut_rdata[l][u] <= 16'hA000 + 16'(l * 16 + u * 2) + 16'(lut_was_hi[l][u]);
      end
    end
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic cycle(input logic we, input logic [7:0] a, input logic [15:0] d,
                       output logic [15:0] r, output int lat);
    @(negedge clk);
    vme_cs = 1; vme_we = we; vme_addr = a; vme_din = d;
    @(negedge clk);
    vme_cs = 0;
    lat = 1;
    while (!vme_ack && lat < 20) begin @(negedge clk); lat++; end
    r = vme_dout;
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] r; int lat;
    cycle(1, a, d, r, lat);
  endtask

  task automatic rd_chk(input string what, input logic [7:0] a, input int exp);
    logic [15:0] r; int lat;
    cycle(0, a, 0, r, lat);
    chk(what, int'(r), exp);
  endtask

  logic [15:0] r;
  int lat;
  initial begin
    vme_cs = 0; vme_we = 0; vme_addr = 0; vme_din = 0; daq_count = 8'd77;
    for (int l = 0; l < NL; l++) begin
      for (int u = 0; u < NLUT; u++) begin
        lut_addr[l][u] = 19'h40000 + 19'(l * 4096 + u * 256);
        lut_cnt[l][u] = 0;
      end
      link_stat[l] = '0;
    end
    // link 1: SD=1 RDV=1 RER=0, latched LID+LCE, count 0x155, AF 40 words full,
    // TF 200 words, empty clear
    link_stat[1] = '{sd: 1, rdv: 1, rer: 0, latched: '{lid: 1, ler: 0, lce: 1, lsd: 0},
                     err_cnt: 10'h155, af_full: 1, af_empty: 0, af_count: 6'd40,
                     tf_full: 0, tf_empty: 0, tf_count: 8'd200};
    link_stat[2] = '{sd: 0, rdv: 0, rer: 1, latched: '{lid: 0, ler: 1, lce: 0, lsd: 1},
                     err_cnt: 10'h3FF, af_full: 0, af_empty: 1, af_count: 6'd0,
                     tf_full: 1, tf_empty: 0, tf_count: 8'd255};
    link_stat[0].tf_empty = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // reset values: transceiver enabled, everything else off
    rd_chk("csr0 reset", 8'h00, 16'h0008);
    chk("enb reset", int'(link_ctrl[0].enb), 1);
    // link controls
    wr(8'h40, 16'hFFFF);
    rd_chk("csr1", 8'h40, 16'b1010_0011_0011_1111);
    chk("ctrl1 bits", int'(link_ctrl[1]), 6'h3F);
    chk("ctrl0 untouched", int'(link_ctrl[0]), 6'h08);
    wr(8'h80, 16'h0015);
    rd_chk("csr2", 8'h80, 16'b0101_0100_0001_0101);
    chk("td2", int'(link_ctrl[2].td), 1);
    chk("len2", int'(link_ctrl[2].len), 1);
    chk("ter2", int'(link_ctrl[2].ter), 1);
    // error counter register and count controls
    wr(8'h42, 16'h2000);
    rd_chk("err1", 8'h42, 16'h2155);
    chk("cer1", int'(link_cer[1]), 1);
    chk("cce1", int'(link_cce[1]), 0);
    wr(8'h82, 16'h1000);
    rd_chk("err2", 8'h82, 16'h13FF);
    // FIFO statuses
    rd_chk("af1", 8'h44, 16'h2028);
    rd_chk("af2", 8'h84, 16'h1000);
    rd_chk("tf1", 8'h46, 16'h00C8);
    rd_chk("tf2", 8'h86, 16'h20FF);
    // chip-wide registers
    wr(8'hC0, 16'h01A5);
    chk("pipe depth", int'(pipe_depth), 9'h1A5);
    rd_chk("pipe", 8'hC0, 16'h21A5);
    rd_chk("daq", 8'hC8, 16'h104D);
    wr(8'hE0, 16'hFFF3);
    chk("csc offset", int'(csc_offset), 5'h13);
    rd_chk("csc", 8'hE0, 16'h0013);
    rd_chk("unmapped", 8'hEE, 0);
    rd_chk("unmapped link", 8'h4E, 0);
    // LUT address registers read back from the ports
    rd_chk("lp ahi 2", 8'h90, 16'h0004);
    rd_chk("gp alo 1", 8'h62, 16'h1100);
    rd_chk("ge alo 0", 8'h32, 16'h0200);
    wr(8'h50, 16'h0001); wr(8'h52, 16'h1234);
    wr(8'hA0, 16'h0001); wr(8'hB2, 16'h1234);
    chk("lp ahi strobe", n_ahi[1][LUT_LP], 1);
    chk("lp alo strobe", n_alo[1][LUT_LP], 1);
    chk("gp ahi strobe", n_ahi[2][LUT_GP], 1);
    chk("ge alo strobe", n_alo[2][LUT_GE], 1);
    chk("no stray strobe", n_ahi[0][LUT_LP] + n_alo[0][LUT_GE], 0);
    // LUT data: acknowledge waits for the port
    cycle(0, 8'h64, 0, r, lat);
    chk("gp hi read", int'(r), 16'hA000 + 16 + 2 + 1);
    chk("gp read waited", int'(lat >= 3), 1);
    cycle(0, 8'hA6, 0, r, lat);
    chk("gp lo read", int'(r), 16'hA000 + 32 + 2);
    cycle(0, 8'h36, 0, r, lat);
    chk("ge read", int'(r), 16'hA000 + 4);
    cycle(0, 8'h56, 0, r, lat);
    chk("lp read", int'(r), 16'hA000 + 16);
    cycle(1, 8'h16, 16'h5555, r, lat);
    chk("lp write waited", int'(lat >= 3), 1);
    // test FIFO data: writes strobe, reads wait for the data
    wr(8'h48, 16'h1111); wr(8'h48, 16'h2222);
    chk("tf writes", n_tf_wr[1], 2);
    chk("tf no stray", n_tf_wr[0] + n_tf_wr[2], 0);
    cycle(0, 8'h88, 0, r, lat);
    chk("tf read", int'(r), 16'h7002);
    chk("tf read latency", lat, 2);
    // test FIFO empty: read returns zero at once
    cycle(0, 8'h08, 0, r, lat);
    chk("tf empty read", int'(r), 0);
    chk("tf empty latency", lat, 1);
    // plain register ack latency
    cycle(0, 8'h00, 0, r, lat);
    chk("reg latency", lat, 1);
    // spy FIFO
    chk("spy en reset", int'(spy_en), 0);
    wr(8'hD0, 16'h8000);
    chk("spy en set", int'(spy_en), 1);
    rd_chk("spy status", 8'hD0, 16'hA02A);
    rd_chk("spy lane0", 8'hD2, 16'h1111);
    rd_chk("spy lane1", 8'hD4, 16'h2222);
    chk("spy no early advance", n_spy_adv, 0);
    rd_chk("spy lane2", 8'hD6, 16'h3333);
    chk("spy advance", n_spy_adv, 1);
    wr(8'hD6, 16'h0);
    chk("spy write no advance", n_spy_adv, 1);
    spy_empty = 1'b1;
    rd_chk("spy empty lane", 8'hD6, 0);
    chk("spy empty no advance", n_spy_adv, 1);
    rd_chk("spy status empty", 8'hD0, 16'hB02A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
