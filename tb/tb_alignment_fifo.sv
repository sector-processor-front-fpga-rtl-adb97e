// Testbench for alignment_fifo: two links with different receive clocks and
// different start times write their FIFOs; read enable is raised for both
// together only after both have started.  Checks that both deliver the same
// sequence numbers in step (alignment to the latest link), the word count,
// the flags, zero words for non-data clocks, and overflow when never read.
module tb_alignment_fifo;
  logic clk = 0, rst = 1;
  logic wclk0 = 0, wclk1 = 0;
  logic start0, start1, ok0, ok1;
  logic [15:0] d0, d1;
  logic af_wr0, af_wr1, ovf0, ovf1, af_rd;
  logic [15:0] q0, q1;
  logic v0, v1, e0, e1, f0, f1;
  logic [5:0] c0, c1;
  int checks = 0, failures = 0;

  alignment_fifo u0 (.wclk(wclk0), .wrst(rst), .start(start0), .word_ok(ok0), .din(d0),
    .af_wr(af_wr0), .overflow(ovf0), .rclk(clk), .rrst(rst), .af_rd(af_rd),
    .dout(q0), .dout_vld(v0), .empty(e0), .full(f0), .count(c0));
  alignment_fifo u1 (.wclk(wclk1), .wrst(rst), .start(start1), .word_ok(ok1), .din(d1),
    .af_wr(af_wr1), .overflow(ovf1), .rclk(clk), .rrst(rst), .af_rd(af_rd),
    .dout(q1), .dout_vld(v1), .empty(e1), .full(f1), .count(c1));

  // global 80 MHz and two receive clocks with slightly different periods
  always #6.25 clk = ~clk;
  always #6.2 wclk0 = ~wclk0;
  always #6.3 wclk1 = ~wclk1;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // link sources: word n carries n (sequence number); link starts at word S
  int n0 = 0, n1 = 0;
  logic go0 = 0, go1 = 0, gap1 = 0;
  always @(posedge wclk0) begin
    start0 <= 0; ok0 <= 1;
    if (go0) begin
      d0 <= 16'(n0); n0 <= n0 + 1;
      start0 <= (n0 == 0);
    end else d0 <= 0;
  end
  always @(posedge wclk1) begin
    start1 <= 0; ok1 <= !gap1;
    if (go1) begin
      d1 <= 16'(n1); n1 <= n1 + 1;
      start1 <= (n1 == 0);
    end else d1 <= 0;
  end

  int got0 [$], got1 [$];
  always @(posedge clk) begin
    if (!rst && v0) got0.push_back(int'(q0));
    if (!rst && v1) got1.push_back(int'(q1));
  end

  initial begin
    af_rd = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    chk("empty at start", e0, 1);
    chk("no af_wr yet", af_wr0, 0);
    go0 = 1;                     // link 0 starts first
    repeat (10) @(posedge wclk0);
    chk("af_wr0", af_wr0, 1);
    chk("af_wr1 not yet", af_wr1, 0);
    // link 1 starts 10 clocks later, with 10 clocks of advance already in link 0
    go1 = 1;
    // wait until both written; master releases read after both started
    repeat (6) @(posedge clk);
    chk("af_wr1", af_wr1, 1);
    chk("count0 > count1", int'(c0 > c1), 1);
    // align: both FIFO outputs must deliver equal "time"; link 0 started
    // earlier, so its stream leads by the start difference
    af_rd <= 1;
    repeat (30) @(posedge clk);
    // same number of words read from both
    chk("same number read", got0.size(), got1.size());
    // link 0's first word is older: difference of first sequence numbers is 0
    // because each FIFO starts at its own word 0; both deliver word k together
    for (int k = 0; k < 20 && k < got0.size(); k++)
      chk($sformatf("word %0d in step", k), got0[k], got1[k]);
    chk("first word 0", got0[0], 0);
    // a non-data clock is written as zero
    gap1 = 1; @(posedge wclk1); @(posedge wclk1); gap1 = 0;
    repeat (20) @(posedge clk);
    begin
      int zeros = 0;
      foreach (got1[i]) if (got1[i] == 0 && i > 0) zeros++;
      chk("gap written as zero", int'(zeros >= 1), 1);
    end
    // stop reading: FIFO fills to 63 and then overflows
    af_rd <= 0;
    repeat (100) @(posedge clk);
    chk("full", f0, 1);
    chk("count 63", c0, 63);
    chk("overflow", ovf0, 1);
    chk("not empty", e0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
