// Testbench for sync_fifo: random pushes and pops against a queue model,
// checking data order, the word count, the empty and full flags (capacity
// 255), writes ignored when full and reads ignored when empty.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  logic wr, rd, rvalid, empty, full;
  logic [15:0] wdata, rdata;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  int hit_full = 0, hit_empty = 0;

  sync_fifo dut (.clk(clk), .rst(rst), .wr(wr), .wdata(wdata), .rd(rd), .rdata(rdata),
    .rvalid(rvalid), .empty(empty), .full(full), .count(count));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [15:0] exp_rd;
  logic exp_vld;
  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    exp_vld = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int phase_bias;
      phase_bias = (cyc / 1000) % 2;     // alternately fill and drain
      wr <= ($urandom_range(0, 9) < (phase_bias ? 8 : 3));
      rd <= ($urandom_range(0, 9) < (phase_bias ? 3 : 8));
      wdata <= 16'($urandom);
      @(posedge clk);
      #1;
      // model update for the access just clocked
      exp_vld = 0;
      begin
        bit do_rd, do_wr;
        do_rd = rd && model.size() > 0;
        do_wr = wr && model.size() < 255;
        if (do_rd) begin exp_rd = model.pop_front(); exp_vld = 1; end
        if (do_wr) model.push_back(wdata);
      end
      if (exp_vld) begin
        chk("rvalid", int'(rvalid), 1);
        chk("rdata", int'(rdata), int'(exp_rd));
      end else chk("no rvalid", int'(rvalid), 0);
      chk("count", int'(count), model.size());
      chk("empty", int'(empty), int'(model.size() == 0));
      chk("full", int'(full), int'(model.size() == 255));
      if (full) hit_full++;
      if (empty) hit_empty++;
    end
    chk("reached full", int'(hit_full > 0), 1);
    chk("reached empty", int'(hit_empty > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
