// scrub_pkg: types and constants shared by the scrubbing test platform.
//
// Holds the payload TMR variant and scrubbing-mode encodings, the simplified
// ICAP request/response bundle, and the configuration packet words the
// Reconfiguration Manager sends through ICAP.  The four TMR variants (minus the
// tool-generated one) and the four scrubbing methods follow the document; the
// numeric encodings, the 41-word Virtex-5 frame and the packet words are this
// design's choices, taken from the Virtex-5 configuration format.
package scrub_pkg;

  // Payload variants.  The document also evaluates a TMR variant produced by a
  // synthesis tool; that one is a netlist transformation, not RTL.
  typedef enum logic [1:0] {
    TMR_REFERENCE     = 2'd0,   // no redundancy
    TMR_SINGLE_VOTER  = 2'd1,   // three modules, one voter
    TMR_TRIPLE_VOTER  = 2'd2    // three modules, three voters
  } tmr_variant_e;

  // Scrubbing methods of the Reconfiguration Manager.
  typedef enum logic [2:0] {
    SCRUB_OFF       = 3'd0,
    SCRUB_BLIND     = 3'd1,     // periodic full reconfiguration from a counter
    SCRUB_CRC       = 3'd2,     // full reconfiguration on a CRC error
    SCRUB_FRAME_ECC = 3'd3,     // rewrite the one frame flagged by frame ECC
    SCRUB_SECDED    = 3'd4      // SEU Controller corrects; full reconfig on uncorrectable
  } scrub_mode_e;

  // One ICAP access: active-low chip select, write when rdwrb = 0.
  typedef struct packed {
    logic        csb;
    logic        rdwrb;
    logic [31:0] wdata;
  } icap_req_t;

  localparam icap_req_t ICAP_IDLE = '{csb: 1'b1, rdwrb: 1'b1, wdata: 32'h0};

  // Virtex-5 configuration frame length in 32-bit words.
  localparam int unsigned FRAME_WORDS = 41;

  // Configuration packet words (Virtex-5 type-1/type-2 packets).
  localparam logic [31:0] CFG_DUMMY      = 32'hFFFF_FFFF;
  localparam logic [31:0] CFG_SYNC       = 32'hAA99_5566;
  localparam logic [31:0] CFG_NOOP       = 32'h2000_0000;
  localparam logic [31:0] CFG_WR_FAR     = 32'h3000_2001;  // type 1 write FAR, 1 word
  localparam logic [31:0] CFG_WR_CMD     = 32'h3000_8001;  // type 1 write CMD, 1 word
  localparam logic [31:0] CFG_WR_FDRI    = 32'h3000_4000;  // type 1 write FDRI, count in type 2
  localparam logic [31:0] CFG_TYPE2_WR   = 32'h5000_0000;  // type 2 write, low 27 bits = count
  localparam logic [31:0] CMD_WCFG       = 32'h0000_0001;
  localparam logic [31:0] CMD_DESYNC     = 32'h0000_000D;

endpackage
