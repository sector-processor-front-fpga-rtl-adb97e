// Testbench for align_master: raises the five write statuses at different
// times and checks that read enable rises exactly csc_offset + 3 clocks after
// the last one (two synchroniser clocks plus the offset count), for several
// offsets, and never before all statuses are high.  Every offset 0..31 is
// run, with each of the five statuses in turn being the latest.
module tb_align_master;
  logic clk = 0, rst = 1;
  logic [4:0] af_wr_in, csc_offset;
  logic af_rd;
  int checks = 0, failures = 0;

  align_master dut (.clk(clk), .rst(rst), .af_wr_in(af_wr_in),
    .csc_offset(csc_offset), .af_rd(af_rd));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int offs, input int last);
    int t_last, early;
    rst <= 1; af_wr_in <= '0; csc_offset <= 5'(offs);
    repeat (3) @(posedge clk);
    rst <= 0;
    early = 0;
    for (int i = 0; i < 5; i++) begin
      af_wr_in[(i * 3) % 5] <= 1'b1;
      repeat (2 + i) begin
        @(posedge clk);
        if (af_rd && i < 4) early++;
      end
    end
    // the last status went high at the first of those clocks; count from it
    rst <= 0;
    chk($sformatf("no early read offs=%0d", offs), early, 0);
    t_last = 0;
    // re-measure cleanly: drop one status and raise it again
    rst <= 1; af_wr_in <= ~(5'b1 << last);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    chk("held off by one missing status", int'(af_rd), 0);
    af_wr_in[last] <= 1'b1;
    @(posedge clk);            // status visible to the DUT from this edge
    while (!af_rd && t_last < 100) begin
      @(posedge clk);
      t_last++;
    end
    chk($sformatf("latency offs=%0d", offs), t_last, offs + 3);
    repeat (5) @(posedge clk);
    chk("stays high", int'(af_rd), 1);
  endtask

  initial begin
    for (int o = 0; o < 32; o++) run(o, o % 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
