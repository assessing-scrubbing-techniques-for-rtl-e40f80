// icap_config_model: behavioural model of the ICAP port and the payload's
// configuration frames, for testbenches only.
//
// Holds NUM_FRAMES frames of FRAME_WORDS words starting at frame address
// FRAME_BASE, initialised to the reference contents golden_word().  It parses
// the words written through ICAP (csb = 0, rdwrb = 0): after the sync word it
// accepts FAR writes, CMD writes (DESYNC ends the session) and an FDRI write
// whose type-2 count includes one trailing pad frame, which is discarded.
// Tasks let a testbench upset a bit (`flip`) and ask how many words differ
// from the reference.  Counters report words written, frames written and
// the last frame address.
`timescale 1ns/1ps
module icap_config_model
  import scrub_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 8,
  parameter int unsigned FRAME_BASE = 0
) (
  input  logic        clk,
  input  icap_req_t   icap,
  output logic [31:0] rdata
);
  logic [31:0] mem [NUM_FRAMES * FRAME_WORDS];
  int unsigned words_written = 0, frames_written = 0, syncs = 0, last_far = 0;
  int unsigned protocol_errors = 0;

  typedef enum {P_UNSYNC, P_HDR, P_FAR, P_CMD, P_T2, P_DATA} p_e;
  p_e ps = P_UNSYNC;
  int unsigned far = 0, cnt = 0, j = 0;

  function automatic logic [31:0] golden_word(input int unsigned a);
    return (a * 32'h9E37_79B9) ^ 32'h5A5A_0F0F;
  endfunction

  initial for (int a = 0; a < NUM_FRAMES * FRAME_WORDS; a++) mem[a] = golden_word(a);

  assign rdata = '0;

  always @(posedge clk) begin
    if (!icap.csb && !icap.rdwrb) begin
      words_written++;
      case (ps)
        P_UNSYNC: if (icap.wdata == CFG_SYNC) begin ps = P_HDR; syncs++; end
        P_HDR: begin
          if (icap.wdata == CFG_WR_FAR) ps = P_FAR;
          else if (icap.wdata == CFG_WR_CMD) ps = P_CMD;
          else if (icap.wdata == CFG_WR_FDRI) ps = P_T2;
          else if (icap.wdata != CFG_NOOP) protocol_errors++;
        end
        P_FAR: begin far = icap.wdata; last_far = far; ps = P_HDR; end
        P_CMD: begin
          ps = (icap.wdata == CMD_DESYNC) ? P_UNSYNC : P_HDR;
          if (icap.wdata != CMD_DESYNC && icap.wdata != CMD_WCFG) protocol_errors++;
        end
        P_T2: begin
          if (icap.wdata[31:27] != CFG_TYPE2_WR[31:27]) protocol_errors++;
          cnt = icap.wdata[26:0]; j = 0;
          ps = (cnt == 0) ? P_HDR : P_DATA;
        end
        P_DATA: begin
          if (j + FRAME_WORDS < cnt) begin
            int unsigned fr;
            fr = far - FRAME_BASE + j / FRAME_WORDS;
            if (fr < NUM_FRAMES) mem[fr * FRAME_WORDS + j % FRAME_WORDS] = icap.wdata;
            else protocol_errors++;
            if (j % FRAME_WORDS == FRAME_WORDS - 1) frames_written++;
          end
          j++;
          if (j == cnt) ps = P_HDR;
        end
        default: ps = P_UNSYNC;
      endcase
    end
  end

  // Reference contents everywhere and the packet parser back to unsynchronised
  // (as after a device reset).
  task automatic restore_all();
    ps = P_UNSYNC;
    for (int a = 0; a < NUM_FRAMES * FRAME_WORDS; a++) mem[a] = golden_word(a);
  endtask

  task automatic flip(input int unsigned frame, input int unsigned word, input int unsigned b);
    mem[frame * FRAME_WORDS + word][b] = ~mem[frame * FRAME_WORDS + word][b];
  endtask

  function automatic int unsigned bad_words_in(input int unsigned frame);
    int unsigned n = 0;
    for (int w = 0; w < FRAME_WORDS; w++)
      if (mem[frame * FRAME_WORDS + w] != golden_word(frame * FRAME_WORDS + w)) n++;
    return n;
  endfunction

  function automatic int unsigned bad_bits_in(input int unsigned frame);
    int unsigned n = 0;
    for (int w = 0; w < FRAME_WORDS; w++)
      n += $countones(mem[frame * FRAME_WORDS + w] ^ golden_word(frame * FRAME_WORDS + w));
    return n;
  endfunction

  function automatic int unsigned bad_words();
    int unsigned n = 0;
    for (int f = 0; f < NUM_FRAMES; f++) n += bad_words_in(f);
    return n;
  endfunction
endmodule
