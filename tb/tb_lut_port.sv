// Testbench for lut_port in its global phi form (19-bit address, 32-bit data,
// two write strobes) attached to a behavioural pipelined SRAM.  Loads the
// address register (high then low), writes high halves and low halves over
// independent passes with the common auto-incrementing address, reads them
// back (2-clock latency), and checks run-mode addressing and strobes.
// A second port at the default (local phi) size, 18-bit address and 16-bit
// data with one write strobe, is loaded with 200 words from a random start
// address and read back while its run address keeps changing; every VME
// write must hold WE low for exactly one clock at the register address, and
// the SRAM must return to the run address after each access.
module tb_lut_port;
  import fp_pkg::*;
  logic clk = 0, rst = 1;
  logic [18:0] run_addr, addr_reg, lut_a;
  logic ahi_wr, alo_wr, hi, done, busy, acc, ce_n, oe_n, doe;
  lut_op_e op;
  logic [15:0] wdata, rdata;
  logic [1:0] we_n;
  logic [31:0] dout, din;
  int checks = 0, failures = 0;

  lut_port #(.AW(19), .LDW(32), .NWE(2), .LAT(2)) dut (
    .clk(clk), .rst(rst), .run_addr(run_addr), .ahi_wr(ahi_wr), .alo_wr(alo_wr),
    .op(op), .hi(hi), .wdata(wdata), .addr_reg(addr_reg), .rdata(rdata), .done(done),
    .busy(busy), .acc(acc), .lut_a(lut_a), .lut_ce_n(ce_n), .lut_oe_n(oe_n),
    .lut_we_n(we_n), .lut_dout(dout), .lut_doe(doe), .lut_din(din));

  lut_sram #(.AW(19), .DW(32), .NWE(2), .LAT(2)) u_sram (
    .clk(clk), .a(lut_a), .ce_n(ce_n), .oe_n(oe_n), .we_n(we_n), .d(dout), .q(din));

  // local phi form, default parameters
  logic [17:0] run2, areg2, a2;
  logic ahi2 = 0, alo2 = 0, done2, busy2, acc2, ce2_n, oe2_n, doe2;
  lut_op_e op2 = LUT_NONE;
  logic [15:0] wdata2 = '0, rdata2, dout2, din2;
  logic [0:0] we2_n;
  lut_port dut2 (
    .clk(clk), .rst(rst), .run_addr(run2), .ahi_wr(ahi2), .alo_wr(alo2),
    .op(op2), .hi(1'b0), .wdata(wdata2), .addr_reg(areg2), .rdata(rdata2), .done(done2),
    .busy(busy2), .acc(acc2), .lut_a(a2), .lut_ce_n(ce2_n), .lut_oe_n(oe2_n),
    .lut_we_n(we2_n), .lut_dout(dout2), .lut_doe(doe2), .lut_din(din2));
  lut_sram #(.AW(18), .DW(16), .NWE(1), .LAT(2)) u_sram2 (
    .clk(clk), .a(a2), .ce_n(ce2_n), .oe_n(oe2_n), .we_n(we2_n), .d(dout2), .q(din2));

  // strobe monitor of the second port
  int n_we2 = 0, n_we2_bad = 0, n_run2_bad = 0;
  logic [17:0] exp_wa;
  always @(posedge clk) if (!rst) begin
    if (!we2_n[0]) begin
      n_we2++;
      if (a2 != exp_wa || !doe2) n_we2_bad++;
    end
    if (!acc2 && !busy2 && a2 != run2) n_run2_bad++;
  end

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic strobe_addr(input logic h, input logic [15:0] v);
    @(negedge clk);
    if (h) ahi_wr = 1; else alo_wr = 1;
    wdata = v;
    @(negedge clk);
    ahi_wr = 0; alo_wr = 0;
  endtask

  task automatic access(input lut_op_e o, input logic h, input logic [15:0] v,
                        output logic [15:0] r);
    int guard = 0;
    @(negedge clk);
    op = o; hi = h; wdata = v;
    @(negedge clk);
    op = LUT_NONE;
    while (!done && guard < 10) begin
      @(posedge clk); #1; guard++;
    end
    if (guard >= 10) begin failures++; $display("FAIL no done"); end
    r = rdata;
  endtask

  function automatic logic [15:0] pat(input int a, input int h);
    return 16'(a * 37 + h * 1000 + 5);
  endfunction

  task automatic access2(input lut_op_e o, input logic [15:0] v, output logic [15:0] r);
    int guard = 0;
    @(negedge clk);
    op2 = o; wdata2 = v; exp_wa = areg2;
    @(negedge clk);
    op2 = LUT_NONE;
    run2 = 18'($urandom);
    while (!done2 && guard < 10) begin
      @(posedge clk); #1; guard++;
    end
    if (guard >= 10) begin failures++; $display("FAIL no done (port 2)"); end
    r = rdata2;
  endtask

  task automatic addr2(input logic [17:0] a);
    @(negedge clk); ahi2 = 1; wdata2 = 16'(a[17:16]);
    @(negedge clk); ahi2 = 0; alo2 = 1; wdata2 = a[15:0];
    @(negedge clk); alo2 = 0;
  endtask

  function automatic logic [15:0] pat2(input logic [17:0] a);
    return 16'(a * 11 + 16'h3C00);
  endfunction

  logic [15:0] r;
  initial begin
    ahi_wr = 0; alo_wr = 0; op = LUT_NONE; hi = 0; wdata = 0; run_addr = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // run mode: address follows run_addr, outputs enabled, no write
    @(negedge clk); run_addr = 19'h5A5A5; #1;
    chk("run addr", int'(lut_a), 'h5A5A5);
    chk("run ce", int'(ce_n), 0);
    chk("run oe", int'(oe_n), 0);
    chk("run we", int'(we_n), 3);
    // address register
    strobe_addr(1, 16'h0005);
    strobe_addr(0, 16'hFFFE);
    chk("addr reg", int'(addr_reg), 'h5FFFE);
    // high halves of 4 words, crossing the 16-bit boundary
    for (int i = 0; i < 4; i++) access(LUT_WRITE, 1, pat(i, 1), r);
    chk("addr incremented", int'(addr_reg), 'h60002);
    // low halves over a second pass
    strobe_addr(1, 16'h0005);
    strobe_addr(0, 16'hFFFE);
    for (int i = 0; i < 4; i++) access(LUT_WRITE, 0, pat(i, 0), r);
    // read back both halves
    for (int h = 0; h < 2; h++) begin
      strobe_addr(1, 16'h0005);
      strobe_addr(0, 16'hFFFE);
      for (int i = 0; i < 4; i++) begin
        access(LUT_READ, h[0], 0, r);
        chk($sformatf("read %0d half %0d", i, h), int'(r), int'(pat(i, h)));
      end
    end
    chk("sram word", int'(u_sram.mem['h5FFFF]), int'({pat(1, 1), pat(1, 0)}));
    // run mode reads the SRAM contents with its latency
    @(negedge clk); run_addr = 19'h60000;
    repeat (3) @(posedge clk); #1;
    chk("run read", int'(din), int'({pat(2, 1), pat(2, 0)}));
    // second port: 200 words from a random start, wrapping past bit 16
    begin
      logic [17:0] base;
      int n0;
      base = 18'h0FFA0 + 18'($urandom_range(0, 15));
      addr2(base);
      chk("port2 addr reg", int'(areg2), int'(base));
      n0 = n_we2;
      for (int i = 0; i < 200; i++) access2(LUT_WRITE, pat2(base + 18'(i)), r);
      chk("port2 addr after load", int'(areg2), int'(base + 18'd200));
      chk("port2 one WE clock per write", n_we2 - n0, 200);
      addr2(base);
      for (int i = 0; i < 200; i++) begin
        access2(LUT_READ, 0, r);
        chk($sformatf("port2 read %0d", i), int'(r), int'(pat2(base + 18'(i))));
      end
      chk("port2 WE address/enable errors", n_we2_bad, 0);
      chk("port2 run address restored", n_run2_bad, 0);
    end
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
