// reconfig_manager: configuration-memory scrubber.
//
// Repairs the payload's configuration frames by rewriting them through ICAP
// from a reference bitstream held in an external EEPROM/platform flash.
// Four scrubbing methods, chosen at run time by `mode`:
//   SCRUB_BLIND      every `blind_period` clocks a full reconfiguration,
//                    from an internal counter, whether or not anything is
//                    wrong;
//   SCRUB_CRC        a full reconfiguration when the SEU Controller's
//                    background CRC check raises `crc_error` (rising edge);
//   SCRUB_FRAME_ECC  when frame ECC flags frame `ecc_frame` (`ecc_error`
//                    pulse), only that frame is rewritten (partial
//                    reconfiguration);
//   SCRUB_SECDED     single-bit errors are corrected by the SEU Controller
//                    itself; an uncorrectable error (`uncorrectable` pulse)
//                    triggers a full reconfiguration.
// "Full" rewrites all NUM_FRAMES frames of the payload's frame interval,
// starting at configuration frame address FRAME_BASE.  One repair is queued
// while another runs; a second different frame request while one is queued
// is turned into a full reconfiguration rather than lost.
//
// A repair: request the ICAP Manager, wait for the grant, then write one word
// per granted cycle: dummy, sync word, NOOP, write FAR, the frame address,
// write CMD = WCFG, NOOP, write FDRI with a type-2 word count of
// (frames + 1) * FRAME_WORDS, the frame data, one pad frame of zeros,
// write CMD = DESYNC and two NOOPs.  Every data word is fetched from the
// reference memory (`bs_rd`/`bs_addr`, answer on `bs_rvalid`/`bs_rdata`);
// frame i of the interval is stored at word i * FRAME_WORDS.  `busy` is high
// from the cycle after the trigger until the last word is written; `full_scrubs` and
// `frame_scrubs` count completed repairs.
//
// The four methods and the reference-bitstream path follow the document; the
// packet sequence follows the Virtex-5 configuration format, and the
// linear frame addressing, the memory handshake and the queueing rule are
// this design's choices.
module reconfig_manager
  import scrub_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 1024,
  parameter int unsigned FRAME_BASE = 0,
  parameter int unsigned BS_AW      = $clog2(NUM_FRAMES * FRAME_WORDS),
  parameter int unsigned FRAME_AW   = $clog2(NUM_FRAMES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  scrub_mode_e          mode,
  input  logic [47:0]          blind_period,
  // error reports (from the SEU Controller / frame ECC)
  input  logic                 crc_error,
  input  logic                 ecc_error,
  input  logic [FRAME_AW-1:0]  ecc_frame,
  input  logic                 uncorrectable,
  // ICAP Manager
  output logic                 icap_req,
  input  logic                 icap_gnt,
  output icap_req_t            icap,
  // reference bitstream memory
  output logic                 bs_rd,
  output logic [BS_AW-1:0]     bs_addr,
  input  logic                 bs_rvalid,
  input  logic [31:0]          bs_rdata,
  // status
  output logic                 busy,
  output logic [15:0]          full_scrubs,
  output logic [15:0]          frame_scrubs
);

  localparam int unsigned HDR_WORDS  = 10;
  localparam int unsigned TAIL_WORDS = 4;

  typedef enum logic [2:0] {R_IDLE, R_GRANT, R_HDR, R_FETCH, R_WAIT, R_PAD, R_TAIL} rm_state_e;

  rm_state_e             state;
  logic                  pend_full, pend_frame;
  logic [FRAME_AW-1:0]   pend_addr;
  logic                  cur_full;
  logic [FRAME_AW-1:0]   cur_first;
  logic [31:0]           nwords;          // data words of the current repair
  logic [31:0]           widx;            // word index within the current phase
  logic [47:0]           blind_cnt;
  logic                  crc_q;

  // Header words of a repair.
  function automatic logic [31:0] hdr_word(input logic [3:0] i, input logic [31:0] far,
                                           input logic [31:0] cnt);
    unique case (i)
      4'd0:    return CFG_DUMMY;
      4'd1:    return CFG_SYNC;
      4'd2:    return CFG_NOOP;
      4'd3:    return CFG_WR_FAR;
      4'd4:    return far;
      4'd5:    return CFG_WR_CMD;
      4'd6:    return CMD_WCFG;
      4'd7:    return CFG_NOOP;
      4'd8:    return CFG_WR_FDRI;
      default: return CFG_TYPE2_WR | (cnt & 32'h07FF_FFFF);
    endcase
  endfunction

  function automatic logic [31:0] tail_word(input logic [1:0] i);
    unique case (i)
      2'd0:    return CFG_WR_CMD;
      2'd1:    return CMD_DESYNC;
      default: return CFG_NOOP;
    endcase
  endfunction

  // Triggers.
  logic trig_full, trig_frame;
  always_comb begin
    trig_full  = 1'b0;
    trig_frame = 1'b0;
    unique case (mode)
      SCRUB_BLIND:     trig_full  = (blind_period != 0) && (blind_cnt >= blind_period - 1);
      SCRUB_CRC:       trig_full  = crc_error && !crc_q;
      SCRUB_FRAME_ECC: trig_frame = ecc_error;
      SCRUB_SECDED:    trig_full  = uncorrectable;
      default: ;
    endcase
  end

  assign busy = (state != R_IDLE) || pend_full || pend_frame;

  logic [31:0] far_word, fdri_count;
  assign far_word   = 32'(FRAME_BASE) + 32'(cur_first);
  assign fdri_count = nwords + FRAME_WORDS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      pend_full    <= 1'b0;
      pend_frame   <= 1'b0;
      pend_addr    <= '0;
      cur_full     <= 1'b0;
      cur_first    <= '0;
      nwords       <= '0;
      widx         <= '0;
      blind_cnt    <= '0;
      crc_q        <= 1'b0;
      icap_req     <= 1'b0;
      icap         <= ICAP_IDLE;
      bs_rd        <= 1'b0;
      bs_addr      <= '0;
      full_scrubs  <= '0;
      frame_scrubs <= '0;
    end else begin
      crc_q <= crc_error;
      bs_rd <= 1'b0;
      icap  <= ICAP_IDLE;

      // blind-scrub period counter
      if (mode != SCRUB_BLIND || trig_full) blind_cnt <= '0;
      else                                  blind_cnt <= blind_cnt + 1'b1;

      // queue requests
      if (trig_full) pend_full <= 1'b1;
      if (trig_frame) begin
        if (pend_frame && pend_addr != ecc_frame) begin
          pend_full  <= 1'b1;
          pend_frame <= 1'b0;
        end else begin
          pend_frame <= 1'b1;
          pend_addr  <= ecc_frame;
        end
      end

      unique case (state)
        R_IDLE: begin
          if (pend_full || trig_full) begin
            pend_full  <= 1'b0;
            pend_frame <= 1'b0;
            cur_full   <= 1'b1;
            cur_first  <= '0;
            nwords     <= NUM_FRAMES * FRAME_WORDS;
            icap_req   <= 1'b1;
            state      <= R_GRANT;
          end else if (pend_frame) begin
            // a different frame flagged now is queued, not escalated
            pend_full  <= 1'b0;
            pend_frame <= trig_frame && ecc_frame != pend_addr;
            pend_addr  <= trig_frame ? ecc_frame : pend_addr;
            cur_full   <= 1'b0;
            cur_first  <= pend_addr;
            nwords     <= FRAME_WORDS;
            icap_req   <= 1'b1;
            state      <= R_GRANT;
          end
        end

        R_GRANT: if (icap_gnt) begin
          widx  <= '0;
          state <= R_HDR;
        end

        R_HDR: begin
          icap <= '{csb: 1'b0, rdwrb: 1'b0, wdata: hdr_word(widx[3:0], far_word, fdri_count)};
          if (widx == HDR_WORDS - 1) begin
            widx  <= '0;
            state <= R_FETCH;
          end else widx <= widx + 1'b1;
        end

        R_FETCH: begin
          bs_rd   <= 1'b1;
          bs_addr <= BS_AW'(32'(cur_first) * FRAME_WORDS + widx);
          state   <= R_WAIT;
        end

        R_WAIT: if (bs_rvalid) begin
          icap <= '{csb: 1'b0, rdwrb: 1'b0, wdata: bs_rdata};
          if (widx == nwords - 1) begin
            widx  <= '0;
            state <= R_PAD;
          end else begin
            widx  <= widx + 1'b1;
            state <= R_FETCH;
          end
        end

        R_PAD: begin
          icap <= '{csb: 1'b0, rdwrb: 1'b0, wdata: 32'h0};
          if (widx == FRAME_WORDS - 1) begin
            widx  <= '0;
            state <= R_TAIL;
          end else widx <= widx + 1'b1;
        end

        R_TAIL: begin
          icap <= '{csb: 1'b0, rdwrb: 1'b0, wdata: tail_word(widx[1:0])};
          if (widx == TAIL_WORDS - 1) begin
            icap_req <= 1'b0;
            if (cur_full) full_scrubs  <= full_scrubs + 1'b1;
            else          frame_scrubs <= frame_scrubs + 1'b1;
            state    <= R_IDLE;
          end else widx <= widx + 1'b1;
        end

        default: state <= R_IDLE;
      endcase
    end
  end

  a_write_granted: assert property (@(posedge clk) disable iff (!rst_n) !icap.csb |-> icap_gnt);

endmodule
