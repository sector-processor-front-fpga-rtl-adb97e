// Testbench for pipeline_fifo: writes a numbered word stream (a different
// number on each link lane) and checks, for several depths including the
// largest (511), that the output is the word written `depth` clocks earlier
// (latency depth+1 clocks), that dout_vld rises exactly after `depth`
// writes, and the empty/full flags.
module tb_pipeline_fifo;
  logic clk = 0, rst = 1;
  logic [47:0] din, dout;
  logic din_vld, dout_vld, empty, full;
  logic [8:0] depth;
  int checks = 0, failures = 0;

  pipeline_fifo dut (.clk(clk), .rst(rst), .din(din), .din_vld(din_vld), .depth(depth),
    .dout(dout), .dout_vld(dout_vld), .empty(empty), .full(full));

  always #5 clk = ~clk;

  function automatic logic [47:0] word(input int n);
    return {16'(n * 3 + 2), 16'(n * 5 + 1), 16'(n)};
  endfunction

  task automatic chk(input string what, input logic [47:0] got, input logic [47:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input int d, input int nwr);
    int first_vld;
    rst <= 1; din_vld <= 0; depth <= 9'(d);
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk("empty after reset", empty, 1);
    first_vld = -1;
    for (int k = 0; k < nwr; k++) begin
      din <= word(k); din_vld <= 1;
      @(posedge clk);
      #1;
      // after write k, the output holds word k-d once k >= d
      if (dout_vld && first_vld < 0) first_vld = k;
      if (k >= d) chk($sformatf("d=%0d k=%0d", d, k), dout, word(k - d));
      chk("vld", dout_vld, k >= d);
    end
    chk($sformatf("first valid d=%0d", d), 48'(first_vld), 48'(d));
    chk("full", full, 1);
    chk("not empty", empty, 0);
    din_vld <= 0;
    @(posedge clk);
  endtask

  initial begin
    din = 0; din_vld = 0; depth = 0;
    run(1, 20);
    run(5, 40);
    run(128, 400);
    run(511, 1100);
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
