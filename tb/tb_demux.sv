// Testbench for demux: feeds a stream of 16-bit words in bursts and checks
// that each pair comes out as one 32-bit stub {frame1, frame0}, one clock
// after frame 1, at one stub per two clocks, and that the frame phase
// restarts after a gap.
module tb_demux;
  logic clk = 0, rst = 1;
  logic [15:0] din;
  logic din_vld;
  logic [31:0] dout;
  logic dout_vld;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  int n_out = 0, last_t = -1, t = 0, gap_bad = 0;

  demux dut (.clk(clk), .rst(rst), .din(din), .din_vld(din_vld), .dout(dout), .dout_vld(dout_vld));

  always #5 clk = ~clk;
  always @(posedge clk) t++;

  always @(posedge clk) if (!rst && dout_vld) begin
    checks++;
    if (exp_q.size() == 0 || dout !== exp_q[0]) begin
      failures++;
      $display("FAIL stub: got %h expected %h", dout, exp_q.size() ? exp_q[0] : 0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    if (last_t >= 0 && t - last_t < 2) gap_bad++;
    last_t = t;
    n_out++;
  end

  task automatic burst(input int nwords);
    logic [15:0] f0;
    for (int i = 0; i < nwords; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      din <= w; din_vld <= 1;
      if (i % 2 == 0) f0 = w;
      else exp_q.push_back({w, f0});
      @(posedge clk);
    end
    din_vld <= 0;
    @(posedge clk);
  endtask

  initial begin
    din = 0; din_vld = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    burst(20);
    burst(7);      // odd burst: last word has no partner and is dropped
    burst(40);
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 10 + 3 + 20) begin
      failures++;
      $display("FAIL count: %0d stubs", n_out);
    end
    checks++;
    if (gap_bad != 0) begin
      failures++;
      $display("FAIL rate: stubs closer than two clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
