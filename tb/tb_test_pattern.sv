// Testbench for test_pattern: loads words over the VME strobe, reads some
// back with TEN clear, then sets TEN and checks that the rest appear on TXD
// one per clock with TX_EN high, in order, followed by idle (TX_EN low), and
// that TX_ER follows TER.  Checks the word count and flags, and that the FIFO
// holds 255 words.
module tb_test_pattern;
  logic clk = 0, rst = 1;
  logic ten, ter, vme_wr, vme_rd, vme_rvalid, empty, full, tx_en, tx_er;
  logic [15:0] vme_wdata, vme_rdata, txd;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  logic [15:0] sent [$];

  test_pattern dut (.clk(clk), .rst(rst), .ten(ten), .ter(ter), .vme_wr(vme_wr),
    .vme_rd(vme_rd), .vme_wdata(vme_wdata), .vme_rdata(vme_rdata), .vme_rvalid(vme_rvalid),
    .empty(empty), .full(full), .count(count), .txd(txd), .tx_en(tx_en), .tx_er(tx_er));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && tx_en) sent.push_back(txd);

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic push(input logic [15:0] w);
    @(negedge clk);
    vme_wr = 1; vme_wdata = w;
    @(negedge clk);
    vme_wr = 0;
    model.push_back(w);
  endtask

  initial begin
    ten = 0; ter = 0; vme_wr = 0; vme_rd = 0; vme_wdata = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk("empty", int'(empty), 1);
    for (int i = 0; i < 20; i++) push(16'($urandom));
    @(posedge clk);
    chk("count 20", int'(count), 20);
    // read back three words
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); vme_rd = 1; @(posedge clk); #1; vme_rd = 0;
      chk("readback valid", int'(vme_rvalid), 1);
      chk("readback", int'(vme_rdata), int'(model.pop_front()));
    end
    chk("no tx while TEN clear", sent.size(), 0);
    // play out
    ter <= 1;
    ten <= 1;
    @(posedge clk); #1;
    chk("tx_er follows ter", int'(tx_er), 1);
    repeat (30) @(posedge clk);
    chk("sent all", sent.size(), 17);
    for (int i = 0; i < 17 && i < sent.size(); i++)
      chk($sformatf("word %0d", i), int'(sent[i]), int'(model[i]));
    chk("idle after", int'(tx_en), 0);
    chk("empty after", int'(empty), 1);
    // back-to-back: TX_EN stays high for a consecutive run
    ten <= 0; ter <= 0;
    model.delete(); sent.delete();
    for (int i = 0; i < 255; i++) push(16'(i * 7));
    push(16'hFFFF);        // dropped: FIFO full
    void'(model.pop_back());
    @(posedge clk);
    chk("full", int'(full), 1);
    chk("count 255", int'(count), 255);
    ten <= 1;
    repeat (270) @(posedge clk);
    chk("sent 255", sent.size(), 255);
    for (int i = 0; i < 255 && i < sent.size(); i++)
      if (sent[i] !== model[i]) begin
        failures++;
        $display("FAIL long pattern word %0d", i);
        break;
      end
    checks++;
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
