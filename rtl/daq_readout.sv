// L1A DAQ FIFO and readout to the DDU.
//
// Capture: on an L1A strobe the two 16-bit frames of the triggered bunch
// crossing are taken from the pipeline FIFO output, the word at the L1A
// clock and the word after it, for all NLINKS links side by side, and pushed
// into the L1A DAQ FIFO (NLINKS*16 bits wide, 2**AW deep).  An L1A that finds
// fewer than two free entries drops the whole event and sets the sticky
// `overflow` bit; the DAQ FIFO never holds half an event.  L1As must be at
// least two clocks apart (one per 40 MHz bunch crossing), which an assertion
// checks.  The full flag (DFF) means the FIFO has no room for another
// event.
//
// Readout: a `ro_start` pulse loads the oldest event from the DAQ FIFO into
// an output buffer (3 clocks) and sets `valid_pattern`, one bit per link,
// taken from bit 15 of the link's frame 0 (the stub's valid flag; the bit
// position is this design's choice).  The DDU logic then exchanges a
// four-phase Readout Request / Request Acknowledge handshake: for each
// request the chip drives the next word on `ro_data` and raises `ro_ack`;
// the DDU drops `ro_req`, then the chip drops `ro_ack`.  Words come out for
// valid links only, in link order, frame 0 then frame 1, so the DDU expects
// 2 x popcount(valid_pattern) words.  Extra requests return zero words.  A
// `ro_start` with no complete event in the FIFO gives a zero valid pattern.
// `ro_busy` is high while an event is being loaded.
module daq_readout #(
  parameter int NLINKS = 3,
  parameter int DW     = 16,
  parameter int AW     = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  // from the pipeline FIFO
  input  logic [NLINKS*DW-1:0] pipe_dout,
  input  logic                 l1a,
  // DDU interface
  input  logic                 ro_start,
  input  logic                 ro_req,
  output logic                 ro_ack,
  output logic [DW-1:0]        ro_data,
  output logic [NLINKS-1:0]    valid_pattern,
  output logic                 ro_busy,
  // status (L1A DAQ FIFO status word)
  output logic                 daq_empty,    // DEF
  output logic                 daq_full,     // DFF: no room for another event
  output logic [AW-1:0]        daq_count,    // DC
  output logic                 overflow,
  // copy of every event word loaded for readout (for the spy FIFO)
  output logic                 ev_word_vld,
  output logic [NLINKS*DW-1:0] ev_word_data
);
  localparam int NW = 2 * NLINKS;           // words per event

  typedef enum logic [1:0] {RO_IDLE, RO_POP0, RO_POP1, RO_READY} ro_state_e;

  logic                 cap_second;
  logic                 fifo_wr, fifo_rd, fifo_rvalid;
  logic [NLINKS*DW-1:0] fifo_rdata;
  logic [NLINKS*DW-1:0] ev [2];
  logic                 ev_word;             // which event word arrives next
  ro_state_e            state;
  logic [$clog2(NW+1)-1:0] word_idx;         // next word slot 0..NW-1
  logic                 space_for_event;

  // ---------------- capture on L1A
  assign space_for_event = (daq_count <= AW'(2**AW - 3));
  always_ff @(posedge clk) begin
    if (rst) begin
      cap_second <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      cap_second <= l1a && space_for_event;
      if (l1a && !space_for_event) overflow <= 1'b1;
    end
  end
  assign fifo_wr = (l1a && space_for_event) || cap_second;

  sync_fifo #(.DW(NLINKS*DW), .AW(AW)) u_daq_fifo (
    .clk(clk), .rst(rst), .wr(fifo_wr), .wdata(pipe_dout),
    .rd(fifo_rd), .rdata(fifo_rdata), .rvalid(fifo_rvalid),
    .empty(daq_empty), .full(), .count(daq_count)
  );
  assign daq_full = !space_for_event;
  assign ev_word_vld  = fifo_rvalid;
  assign ev_word_data = fifo_rdata;

  // ---------------- event load
  assign fifo_rd = (state == RO_POP0) || (state == RO_POP1);
  assign ro_busy = (state == RO_POP0) || (state == RO_POP1) ||
                   (state == RO_READY && fifo_rvalid);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= RO_IDLE;
      ev_word       <= 1'b0;
      valid_pattern <= '0;
      ev[0]         <= '0;
      ev[1]         <= '0;
    end else begin
      case (state)
        RO_IDLE, RO_READY: begin
          if (ro_start && !ro_ack) begin
            if (daq_count >= AW'(2)) begin
              state   <= RO_POP0;
              ev[0]   <= '0;
              ev[1]   <= '0;
            end else begin
              state   <= RO_READY;
              ev[0]   <= '0;
              ev[1]   <= '0;
            end
            valid_pattern <= '0;
          end
        end
        RO_POP0: state <= RO_POP1;
        RO_POP1: state <= RO_READY;
        default: state <= RO_IDLE;
      endcase
      if (state == RO_POP0) ev_word <= 1'b0;
      if (fifo_rvalid) begin
        ev[ev_word] <= fifo_rdata;
        ev_word     <= 1'b1;
        if (!ev_word)
          for (int l = 0; l < NLINKS; l++)
            valid_pattern[l] <= fifo_rdata[l*DW + DW-1];
      end
    end
  end

  // ---------------- word-by-word handshake
  // slot s = 2*link + frame; skip slots of links without a valid stub
  function automatic logic [$clog2(NW+1)-1:0] next_slot(
      input logic [$clog2(NW+1)-1:0] from, input logic [NLINKS-1:0] vp);
    next_slot = NW[$clog2(NW+1)-1:0];
    for (int s = NW - 1; s >= 0; s--)
      if (s >= int'(from) && vp[s/2]) next_slot = s[$clog2(NW+1)-1:0];
  endfunction

  logic ready_q;   // event buffer loaded and handshake may start
  always_ff @(posedge clk) begin
    if (rst) begin
      ro_ack   <= 1'b0;
      ro_data  <= '0;
      word_idx <= '0;
      ready_q  <= 1'b0;
    end else begin
      ready_q <= (state == RO_READY) && !fifo_rvalid;
      if (state != RO_READY) begin
        word_idx <= '0;
        ro_ack   <= 1'b0;
      end else if (ready_q) begin
        if (ro_req && !ro_ack) begin
          logic [$clog2(NW+1)-1:0] s;
          s = next_slot(word_idx, valid_pattern);
          if (s < NW[$clog2(NW+1)-1:0]) begin
            ro_data  <= ev[s[0]][(int'(s) / 2)*DW +: DW];
            word_idx <= s + 1'b1;
          end else begin
            ro_data  <= '0;
          end
          ro_ack <= 1'b1;
        end else if (!ro_req && ro_ack) begin
          ro_ack <= 1'b0;
        end
      end
    end
  end

  // L1A arrives at most once per bunch crossing (two global clocks)
  assert property (@(posedge clk) disable iff (rst) l1a |=> !l1a);

endmodule
