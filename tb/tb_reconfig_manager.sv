// tb_reconfig_manager: checks the four scrubbing methods of the
// Reconfiguration Manager against a model of the configuration frames.
//
// Bits are upset directly in the frame model; the test then raises the
// event each method reacts to and checks that the configuration is restored
// (or, for a frame scrub, that only the flagged frame is), how many ICAP
// words a repair writes (10 header + (frames + 1) * 41 + 4 tail words), the
// frame address written, the blind-scrub period, that a held CRC error
// triggers only one repair, that a second frame request while one is queued
// escalates to a full repair, and that nothing is written without a grant.
`timescale 1ns/1ps
module tb_reconfig_manager;
  import scrub_pkg::*;
  localparam int NF = 8, BASE = 100;
  localparam int FULL_WORDS  = 10 + (NF + 1) * 41 + 4;
  localparam int FRAME_WORDS_W = 10 + 2 * 41 + 4;
  logic clk = 0, rst_n = 1;
  scrub_mode_e mode = SCRUB_OFF;
  logic [47:0] blind_period = 0;
  logic crc_error = 0, ecc_error = 0, uncorrectable = 0;
  logic [2:0] ecc_frame = 0;
  logic icap_req, icap_gnt = 0, hold_gnt = 0;
  icap_req_t icap;
  logic bs_rd, bs_rvalid;
  logic [8:0] bs_addr;
  logic [31:0] bs_rdata, icap_rdata;
  logic busy;
  logic [15:0] full_scrubs, frame_scrubs;
  int checks = 0, failures = 0;

  reconfig_manager #(.NUM_FRAMES(NF), .FRAME_BASE(BASE)) dut (.*);
  icap_config_model #(.NUM_FRAMES(NF), .FRAME_BASE(BASE)) u_cfg (
    .clk, .icap, .rdata(icap_rdata));
  bitstream_rom_model #(.AW(9)) u_rom (
    .clk, .rd(bs_rd), .addr(bs_addr), .rvalid(bs_rvalid), .rdata(bs_rdata));

  always #5 clk = ~clk;
  always_ff @(posedge clk) icap_gnt <= icap_req && !hold_gnt;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    int g = 0;
    @(posedge clk);
    while ((busy || icap_req) && g < 100000) begin @(posedge clk); g++; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w0, t0, t1;
    #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts before the first clock
    repeat (3) @(posedge clk);
    rst_n = 1;
    // --- scrubbing off: an upset stays
    u_cfg.flip(2, 7, 3);
    uncorrectable = 1; crc_error = 1; @(posedge clk); uncorrectable = 0; crc_error = 0;
    repeat (500) @(posedge clk);
    check(u_cfg.bad_words() == 1 && !busy && u_cfg.words_written == 0, "off mode writes nothing");

    // --- blind scrubbing: periodic full reconfiguration
    u_cfg.flip(5, 40, 31);
    blind_period = 3000;
    @(negedge clk); mode = SCRUB_BLIND; t0 = $time / 10;
    wait (busy); t1 = $time / 10;
    check(t1 - t0 >= 2999 && t1 - t0 <= 3003, $sformatf("blind period %0d", t1 - t0));
    w0 = u_cfg.words_written;
    wait_idle();
    check(u_cfg.bad_words() == 0, "blind scrub repaired");
    check(u_cfg.words_written - w0 == FULL_WORDS, $sformatf("full words %0d", u_cfg.words_written - w0));
    check(u_cfg.last_far == BASE, "full scrub FAR");
    wait (full_scrubs == 2);
    check(1, "blind scrub repeats");
    @(negedge clk); mode = SCRUB_OFF;
    wait_idle();

    // --- CRC-triggered: one full reconfiguration per error, held level
    w0 = full_scrubs;
    u_cfg.flip(0, 0, 0); u_cfg.flip(7, 12, 9);
    @(negedge clk); mode = SCRUB_CRC;
    repeat (20) @(posedge clk);
    check(!busy, "crc mode idle without error");
    crc_error = 1;
    repeat (2000) @(posedge clk);
    crc_error = 0;
    wait_idle();
    check(full_scrubs == w0 + 1, "one scrub per CRC error");
    check(u_cfg.bad_words() == 0, "crc scrub repaired");

    // --- frame ECC: only the flagged frame is rewritten
    u_cfg.flip(3, 20, 5); u_cfg.flip(6, 1, 1);
    @(negedge clk); mode = SCRUB_FRAME_ECC;
    w0 = u_cfg.words_written;
    @(negedge clk); ecc_error = 1; ecc_frame = 3; @(negedge clk); ecc_error = 0;
    wait_idle();
    check(frame_scrubs == 1, "frame scrub counted");
    check(u_cfg.bad_words_in(3) == 0 && u_cfg.bad_words_in(6) == 1, "only frame 3 repaired");
    check(u_cfg.words_written - w0 == FRAME_WORDS_W, $sformatf("frame words %0d", u_cfg.words_written - w0));
    check(u_cfg.last_far == BASE + 3, "frame FAR");
    // two more different frames while one runs: escalation to full
    w0 = full_scrubs;
    u_cfg.flip(1, 2, 3);
    @(negedge clk); ecc_error = 1; ecc_frame = 6; @(negedge clk); ecc_error = 0;
    repeat (3) @(negedge clk); ecc_error = 1; ecc_frame = 1; @(negedge clk);
    ecc_frame = 2; @(negedge clk); ecc_error = 0;
    wait_idle();
    check(full_scrubs == w0 + 1 && frame_scrubs == 2, "queued frames escalate to full");
    check(u_cfg.bad_words() == 0, "all repaired after escalation");

    // --- SECDED fallback: uncorrectable error -> full reconfiguration, grant held off
    u_cfg.flip(4, 4, 4); u_cfg.flip(4, 4, 5);
    @(negedge clk); mode = SCRUB_SECDED;
    hold_gnt = 1;
    w0 = u_cfg.words_written;
    @(negedge clk); uncorrectable = 1; @(negedge clk); uncorrectable = 0;
    repeat (300) @(posedge clk);
    check(busy && icap_req && u_cfg.words_written == w0, "waits for the grant");
    hold_gnt = 0;
    wait_idle();
    check(u_cfg.bad_words() == 0 && u_cfg.protocol_errors == 0, "secded fallback repaired");
    check(u_cfg.syncs == 7, $sformatf("sessions %0d", u_cfg.syncs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
