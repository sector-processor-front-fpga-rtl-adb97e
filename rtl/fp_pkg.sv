// Front FPGA shared definitions.
//
// Holds the VME register offsets of one Front FPGA (a 256-byte window, D16
// accesses, so bit 0 of the byte offset is ignored), the bit positions of the
// link control/status word, and the small types shared by several blocks.
// Per-link registers repeat every 0x40 bytes (link 0 at 0x00, link 1 at 0x40,
// link 2 at 0x80); chip-wide registers sit at 0xC0 and above.  The offsets
// and bit assignments follow the Front FPGA register map; the packing of
// fields whose bit columns were ambiguous is noted where it is used.
package fp_pkg;

  // ---- per-link register offsets (byte offset inside a 0x40 link slot)
  localparam logic [5:0] OFS_LINK_CSR  = 6'h00;  // link control/status
  localparam logic [5:0] OFS_LINK_ERR  = 6'h02;  // link error counter
  localparam logic [5:0] OFS_AF_STAT   = 6'h04;  // alignment FIFO status
  localparam logic [5:0] OFS_TF_STAT   = 6'h06;  // test pattern FIFO status
  localparam logic [5:0] OFS_TF_DATA   = 6'h08;  // test pattern FIFO data
  localparam logic [5:0] OFS_LP_AHI    = 6'h10;  // local phi LUT address high
  localparam logic [5:0] OFS_LP_ALO    = 6'h12;  // local phi LUT address low
  localparam logic [5:0] OFS_LP_DATA   = 6'h16;  // local phi LUT data
  localparam logic [5:0] OFS_GP_AHI    = 6'h20;  // global phi LUT address high
  localparam logic [5:0] OFS_GP_ALO    = 6'h22;  // global phi LUT address low
  localparam logic [5:0] OFS_GP_DHI    = 6'h24;  // global phi LUT data high half
  localparam logic [5:0] OFS_GP_DLO    = 6'h26;  // global phi LUT data low half
  localparam logic [5:0] OFS_GE_AHI    = 6'h30;  // global eta LUT address high
  localparam logic [5:0] OFS_GE_ALO    = 6'h32;  // global eta LUT address low
  localparam logic [5:0] OFS_GE_DATA   = 6'h36;  // global eta LUT data

  // ---- chip-wide register offsets (full byte offset)
  localparam logic [7:0] OFS_PIPE      = 8'hC0;  // pipeline FIFO depth/status
  localparam logic [7:0] OFS_DAQ_STAT  = 8'hC8;  // L1A DAQ FIFO status
  localparam logic [7:0] OFS_CSC_OFS   = 8'hE0;  // alignment (CSC) offset, master only
  localparam logic [7:0] OFS_SPY_STAT  = 8'hD0;  // spy FIFO enable/status
  localparam logic [7:0] OFS_SPY_DATA  = 8'hD2;  // spy FIFO data, link n at D2+2n

  // ---- link control bits (W/R), bits 5..0 of the link control/status word
  typedef struct packed {
    logic pen;   // bit 5: TLK2501 PRBSEN
    logic len;   // bit 4: TLK2501 LOOPEN
    logic enb;   // bit 3: TLK2501 ENABLE
    logic ter;   // bit 2: TLK2501 TX_ER
    logic ten;   // bit 1: TLK2501 TX_EN (test pattern transmission)
    logic td;    // bit 0: Finisar TDIS
  } link_ctrl_t;

  // ---- latched link statuses, bits 15..12 of the link control/status word
  typedef struct packed {
    logic lid;   // bit 15: latched IDLE
    logic ler;   // bit 14: latched error propagation
    logic lce;   // bit 13: latched carrier extend
    logic lsd;   // bit 12: latched loss of signal detect
  } link_latch_t;

  // ---- VME access kinds that the LUT ports see
  typedef enum logic [1:0] {
    LUT_NONE  = 2'd0,
    LUT_WRITE = 2'd1,
    LUT_READ  = 2'd2
  } lut_op_e;

  // ---- status of one link as the VME registers see it (global clock)
  typedef struct packed {
    logic        sd;        // SD, current
    logic        rdv;       // RX_DV, current
    logic        rer;       // RX_ER, current
    link_latch_t latched;   // LID, LER, LCE, LSD
    logic [9:0]  err_cnt;   // EC9..EC0
    logic        af_full;   // AFF
    logic        af_empty;  // AEF
    logic [5:0]  af_count;  // AC5..AC0
    logic        tf_full;   // TFF
    logic        tf_empty;  // TEF
    logic [7:0]  tf_count;  // TC7..TC0
  } link_stat_t;

  // ---- the three external lookup memories of one link
  typedef enum logic [1:0] {
    LUT_LP = 2'd0,   // local phi, 256K x 18
    LUT_GP = 2'd1,   // global phi, 512K x 36 (two 16-bit halves)
    LUT_GE = 2'd2    // global eta, 512K x 18
  } lut_id_e;
  localparam int NLUT    = 3;
  localparam int LUT_AWM = 19;   // widest LUT address

endpackage
