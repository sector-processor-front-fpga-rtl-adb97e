// Testbench for daq_readout: a random word stream stands for the pipeline
// output.  L1As capture events, which are checked on readout through the
// four-phase Readout Request / Request Acknowledge handshake: the valid
// pattern (bit 15 of each link's frame 0) and the words of valid links in
// link order, frame 0 then frame 1.  Also checks the DAQ FIFO count, that an
// L1A finding no room drops the whole event and sets overflow, and a
// readout with an empty FIFO.
module tb_daq_readout;
  logic clk = 0, rst = 1;
  logic [47:0] pipe_dout;
  logic l1a, ro_start, ro_req, ro_ack, ro_busy, daq_empty, daq_full, overflow;
  logic [15:0] ro_data;
  logic [2:0] valid_pattern;
  logic [7:0] daq_count;
  int checks = 0, failures = 0;
  logic [47:0] ev_q [$];           // frame 0, frame 1 of each captured event

  daq_readout dut (.clk(clk), .rst(rst), .pipe_dout(pipe_dout), .l1a(l1a),
    .ro_start(ro_start), .ro_req(ro_req), .ro_ack(ro_ack), .ro_data(ro_data),
    .valid_pattern(valid_pattern), .ro_busy(ro_busy), .daq_empty(daq_empty),
    .daq_full(daq_full), .daq_count(daq_count), .overflow(overflow));

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // new random pipeline word every clock
  always @(posedge clk) pipe_dout <= {$urandom, $urandom};

  task automatic trigger();
    l1a <= 1;
    @(posedge clk);
    ev_q.push_back(pipe_dout);      // value the DUT sampled at this edge
    l1a <= 0;
    @(posedge clk);
    ev_q.push_back(pipe_dout);
  endtask

  task automatic handshake(output logic [15:0] w);
    int guard = 0;
    ro_req <= 1;
    while (!ro_ack && guard < 50) begin @(posedge clk); guard++; end
    #1 w = ro_data;
    ro_req <= 0;
    @(posedge clk);
    while (ro_ack && guard < 100) begin @(posedge clk); guard++; end
    if (guard >= 50) begin failures++; $display("FAIL handshake timeout"); end
  endtask

  task automatic readout_one();
    logic [47:0] f0, f1;
    logic [2:0] vp;
    logic [15:0] w;
    int guard = 0;
    f0 = ev_q.pop_front(); f1 = ev_q.pop_front();
    vp = {f0[47], f0[31], f0[15]};
    ro_start <= 1;
    @(posedge clk);
    ro_start <= 0;
    @(posedge clk);
    while (ro_busy && guard < 20) begin @(posedge clk); guard++; end
    chk("valid pattern", int'(valid_pattern), int'(vp));
    for (int l = 0; l < 3; l++)
      if (vp[l]) begin
        handshake(w); chk($sformatf("link %0d frame 0", l), int'(w), int'(f0[l*16 +: 16]));
        handshake(w); chk($sformatf("link %0d frame 1", l), int'(w), int'(f1[l*16 +: 16]));
      end
    handshake(w); chk("extra request gives zero", int'(w), 0);
  endtask

  initial begin
    l1a = 0; ro_start = 0; ro_req = 0; pipe_dout = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // a few events, read back in order
    for (int i = 0; i < 6; i++) begin
      trigger();
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    @(posedge clk);
    chk("count 12", int'(daq_count), 12);
    chk("not full", int'(daq_full), 0);
    for (int i = 0; i < 6; i++) readout_one();
    repeat (3) @(posedge clk);
    chk("empty", int'(daq_empty), 1);
    // empty FIFO: zero valid pattern
    ro_start <= 1; @(posedge clk); ro_start <= 0;
    repeat (5) @(posedge clk);
    chk("empty readout pattern", int'(valid_pattern), 0);
    // fill: 127 events fit (254 words), the 128th is dropped
    for (int i = 0; i < 128; i++) trigger();
    @(posedge clk);
    chk("count 254", int'(daq_count), 254);
    chk("overflow", int'(overflow), 1);
    chk("full flag", int'(daq_full), 1);
    void'(ev_q.pop_back()); void'(ev_q.pop_back());   // the dropped event
    for (int i = 0; i < 127; i++) readout_one();
    repeat (3) @(posedge clk);
    chk("drained", int'(daq_empty), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
