// Testbench for spy_fifo: random enabled/disabled writes and random head
// reads against a queue model.  Checks that only enabled words are kept,
// that the head always shows the oldest word in order, that count and the
// empty flag settle to the model after idle clocks, and that with no reads
// exactly the first 256 words (255 stored plus the head) survive an
// overflow while the count saturates at 255 and the full flag is set.
// Inputs are driven at the falling edge.
module tb_spy_fifo;
  localparam int NL = 3;
  logic clk = 0, rst = 1;
  logic en, wr, rd_last, empty, full;
  logic [NL*16-1:0] wdata, head;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [NL*16-1:0] model [$];

  spy_fifo dut (.clk(clk), .rst(rst), .en(en), .wr(wr), .wdata(wdata),
    .rd_last(rd_last), .head(head), .empty(empty), .full(full), .count(count));

  always #5 clk = ~clk;
  initial begin #2_000_000; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic settle();
    wr = 0; rd_last = 0;
    repeat (4) @(negedge clk);
    chk("empty settled", empty, model.size() == 0);
    chk("count settled", count, model.size() > 255 ? 255 : model.size());
  endtask

  initial begin
    en = 0; wr = 0; rd_last = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // random traffic, never near the capacity
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if (cyc % 200 == 0) en = (cyc / 200) % 4 != 3;
      wr = $urandom_range(0, 9) < 3;
      wdata = {$urandom, $urandom};
      rd_last = !empty && $urandom_range(0, 9) < 4;
      if (rd_last) begin
        chk("head", head, model.size() ? model[0] : 0);
        if (model.size()) void'(model.pop_front());
      end
      if (wr && en) model.push_back(wdata);
      @(negedge clk);
      if (cyc % 500 == 499) settle();
    end
    // drain
    settle();
    while (!empty) begin
      rd_last = 1;
      chk("drain head", head, model.pop_front());
      @(negedge clk);
      rd_last = 0;
      @(negedge clk);
    end
    settle();
    // overflow: 300 words, no reads
    en = 1;
    for (int i = 0; i < 300; i++) begin
      wr = 1; wdata = 48'(i * 1000 + 7);
      if (i < 256) model.push_back(wdata);
      @(negedge clk);
    end
    wr = 0;
    repeat (4) @(negedge clk);
    chk("full", full, 1);
    chk("count sat", count, 255);
    while (!empty) begin
      rd_last = 1;
      chk("ovf head", head, model.size() ? model.pop_front() : 48'hdead);
      @(negedge clk);
      rd_last = 0;
      @(negedge clk);
    end
    chk("all 256 kept", model.size(), 0);
    chk("full cleared", full, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
