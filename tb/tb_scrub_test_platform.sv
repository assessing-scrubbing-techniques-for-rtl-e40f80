// tb_scrub_test_platform: end-to-end test of the whole platform at its
// default sizes (115200-baud UART at 100 MHz, 1024 payload frames, 64
// vectors, triple-voter payload).
//
// Around the platform sit models of the ICAP port with the payload's
// configuration frames, of the reference-bitstream EEPROM and of the SEU
// Controller.  The SEU Controller model scans the frames every SCAN cycles,
// holding the ICAP port for a readback burst; it reports a CRC error while any
// frame is wrong, a frame-ECC error for the first wrong frame, corrects a
// lone bit itself in SECDED mode and reports two or more wrong bits in a
// frame as uncorrectable.  Configuration upsets are made directly in the
// frame model; an upset in "branch 1" of the payload is emulated by forcing
// one bit of that branch's result until the frame is repaired.
//
// The host side sends commands over the UART and checks the status vectors.
// Each mechanism is counted and must occur at least once: isolation test,
// masked branch error, frame-ECC scrub, CRC scrub, SECDED self-correction,
// SECDED fallback reconfiguration, blind scrub, ICAP contention, continuous
// test with the scrubber seen busy, and log read-back.
`timescale 1ns/1ps
module tb_scrub_test_platform;
  import scrub_pkg::*;
  localparam int CPB = 868, NF = 1024, SCAN = 20000;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  scrub_mode_e mode = SCRUB_OFF;
  logic [47:0] blind_period = 0;
  logic crc_err = 0, ecc_err = 0, uncorr = 0;
  logic [9:0] ecc_frame = 0;
  logic seu_req = 0, seu_gnt;
  icap_req_t seu_icap, icap;
  logic [31:0] seu_rdata, icap_rdata, bs_rdata;
  logic bs_rd, bs_rvalid;
  logic [15:0] bs_addr;
  logic scrub_busy, testing;
  logic [15:0] full_scrubs, frame_scrubs;
  int checks = 0, failures = 0;

  scrub_test_platform dut (
    .clk, .rst_n, .fm_uart_rxd(rxd), .fm_uart_txd(txd),
    .scrub_mode(mode), .blind_period,
    .seu_crc_error(crc_err), .seu_ecc_error(ecc_err), .seu_ecc_frame(ecc_frame),
    .seu_uncorrectable(uncorr), .seu_icap_req(seu_req), .seu_icap_gnt(seu_gnt),
    .seu_icap, .seu_icap_rdata(seu_rdata), .icap, .icap_rdata,
    .bs_rd, .bs_addr, .bs_rvalid, .bs_rdata,
    .scrub_busy, .full_scrubs, .frame_scrubs, .testing);

  icap_config_model #(.NUM_FRAMES(NF)) u_cfg (.clk, .icap, .rdata(icap_rdata));
  bitstream_rom_model #(.AW(16)) u_rom (.clk, .rd(bs_rd), .addr(bs_addr),
                                       .rvalid(bs_rvalid), .rdata(bs_rdata));

  always #5 clk = ~clk;

  // ---------------- mechanism counters
  int n_iso = 0, n_masked = 0, n_frame = 0, n_crc = 0, n_secded_fix = 0, n_secded_full = 0;
  int n_blind = 0, n_contention = 0, n_cont_busy = 0, n_logread = 0;

  always @(posedge clk) if (seu_req && dut.rm_icap_req && (seu_gnt || dut.rm_icap_gnt))
    n_contention++;

  // ---------------- SEU Controller model
  assign seu_icap = seu_gnt ? '{csb: 1'b0, rdwrb: 1'b1, wdata: 32'h0} : ICAP_IDLE;
  initial begin
    int nbad, first;
    @(posedge rst_n);
    forever begin
      repeat (SCAN) @(posedge clk);
      seu_req <= 1;
      wait (seu_gnt);
      repeat (200) @(posedge clk);       // readback burst
      seu_req <= 0;
      nbad = 0; first = -1;
      for (int f = 0; f < NF; f++) begin
        int b;
        b = u_cfg.bad_bits_in(f);
        if (b > 0) begin
          nbad++;
          if (first < 0) first = f;
          if (mode == SCRUB_SECDED) begin
            if (b == 1) begin
              for (int w = 0; w < 41; w++)
                for (int k = 0; k < 32; k++)
                  if (u_cfg.mem[f*41+w][k] != u_cfg.golden_word(f*41+w)[k]) u_cfg.flip(f, w, k);
              n_secded_fix++;
            end else begin
              uncorr <= 1; @(posedge clk); uncorr <= 0;
            end
          end
        end
      end
      crc_err <= (nbad > 0);
      if (first >= 0 && mode == SCRUB_FRAME_ECC) begin
        ecc_frame <= 10'(first); ecc_err <= 1; @(posedge clk); ecc_err <= 0;
      end
    end
  end

  // ---------------- host UART
  byte rxq[$];
  task automatic send(input byte b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  initial begin
    byte b;
    forever begin
      @(negedge txd);
      repeat (CPB + CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (CPB) @(posedge clk); end
      rxq.push_back(b);
    end
  end
  task automatic get_bytes(input int n, output logic [63:0] v);
    int guard = 0;
    v = '0;
    while (rxq.size() < n && guard < 3000000) begin @(posedge clk); guard++; end
    for (int i = 0; i < n; i++) if (rxq.size() > 0) v = {v[55:0], rxq.pop_front()};
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic iso_test(output logic [63:0] s);
    send("T");
    get_bytes(8, s);
    n_iso++;
  endtask

  task automatic wait_clean(input string what);
    int g = 0;
    while ((u_cfg.bad_words() != 0 || scrub_busy) && g < 2000) begin
      repeat (1000) @(posedge clk); g++;
    end
    check(u_cfg.bad_words() == 0, {what, ": configuration restored"});
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] s;
    int unsigned f0, c0, nlog;
    bit busy_entry;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // 1. isolation test, fault-free
    iso_test(s);
    check(s[15:0] == 16'h0 && s[31:24] == 0, $sformatf("clean pass %h", s));

    // 2. upset in branch 1's frame: masked by TMR, seen as a single error
    u_cfg.flip(10, 3, 17);
    force dut.u_payload.mod_ct[1][0] = ~dut.u_payload.mod_ct[1][0];
    iso_test(s);
    check(s[0] && !s[9] && s[15:13] == 3'b010 && s[12:10] == 3'b000,
          $sformatf("masked single error %h", s[15:0]));
    if (s[0] && !s[9]) n_masked++;

    // 3. frame-ECC scrubbing repairs just that frame
    f0 = frame_scrubs;
    mode = SCRUB_FRAME_ECC;
    wait_clean("frame ECC");
    check(frame_scrubs > f0 && u_cfg.last_far == 10, "frame scrub of frame 10");
    if (frame_scrubs > f0) n_frame++;
    release dut.u_payload.mod_ct[1][0];
    iso_test(s);
    check(s[15:0] == 16'h0, "clean after frame scrub");

    // 4. CRC-triggered full reconfiguration
    c0 = full_scrubs;
    u_cfg.flip(20, 0, 0); u_cfg.flip(500, 40, 31);
    mode = SCRUB_CRC;
    wait_clean("CRC");
    check(full_scrubs > c0, "CRC full scrub");
    if (full_scrubs > c0) n_crc++;

    // 5. SECDED: lone bit corrected by the SEU Controller, double bit -> full
    mode = SCRUB_SECDED;
    c0 = full_scrubs;
    u_cfg.flip(30, 7, 7);
    wait_clean("SECDED single");
    check(full_scrubs == c0 && n_secded_fix > 0, "single bit corrected without reconfiguration");
    u_cfg.flip(40, 1, 1); u_cfg.flip(40, 2, 2);
    wait_clean("SECDED double");
    check(full_scrubs > c0, "uncorrectable error reconfigures");
    if (full_scrubs > c0) n_secded_full++;

    // 6. blind scrubbing: periodic full reconfiguration
    mode = SCRUB_OFF;
    repeat (10) @(posedge clk);
    c0 = full_scrubs;
    u_cfg.flip(700, 9, 9);
    blind_period = 400000;
    mode = SCRUB_BLIND;
    wait_clean("blind");
    check(full_scrubs > c0, "blind full scrub");
    if (full_scrubs > c0) n_blind++;

    // 7. continuous test across a blind scrub, then read the log
    send("C");
    send("G");
    wait (full_scrubs > c0 + 1);
    repeat (20000) @(posedge clk);
    send("H");
    get_bytes(8, s);
    mode = SCRUB_OFF;
    send("R");
    get_bytes(2, s);
    nlog = s[15:0];
    check(nlog >= 2, $sformatf("continuous log entries %0d", nlog));
    busy_entry = 0;
    for (int i = 0; i < nlog; i++) begin
      get_bytes(8, s);
      if (s[8]) busy_entry = 1;
      check(!s[9], "no payload failure logged");
    end
    n_logread++;
    if (busy_entry) n_cont_busy++;
    check(u_cfg.protocol_errors == 0, "ICAP packet stream well formed");

    // every mechanism happened
    check(n_iso > 0, "isolation test");
    check(n_masked > 0, "masked branch error");
    check(n_frame > 0, "frame-ECC scrub");
    check(n_crc > 0, "CRC scrub");
    check(n_secded_fix > 0, "SECDED correction");
    check(n_secded_full > 0, "SECDED fallback");
    check(n_blind > 0, "blind scrub");
    check(n_contention > 0, "ICAP contention");
    check(n_cont_busy > 0, "continuous test saw the scrubber busy");
    check(n_logread > 0, "log read-back");
    $display("mechanisms: iso=%0d masked=%0d frame=%0d crc=%0d secded_fix=%0d secded_full=%0d blind=%0d contention_cycles=%0d cont_busy=%0d logread=%0d",
             n_iso, n_masked, n_frame, n_crc, n_secded_fix, n_secded_full, n_blind,
             n_contention, n_cont_busy, n_logread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
