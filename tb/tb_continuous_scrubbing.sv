// tb_continuous_scrubbing: continuous testing of the triple-voter platform
// under a steady stream of configuration upsets, once per scrubbing setting,
// with availability computed from the Fault Monitor's log.
//
// Setup: fast UART, a 16-frame payload interval (short full repairs, about
// 2,800 clocks), and an upset every SEU clocks on average in a random bit of
// a random frame.  Frame f is taken to hold logic of TMR branch f mod 3: while
// any such frame is wrong, that branch's result is forced wrong.  While a
// full reconfiguration runs the whole payload is down, so all its outputs are
// forced wrong.  An SEU Controller model scans the frames every SCAN clocks
// and reports CRC / frame-ECC / uncorrectable errors (correcting lone bits
// itself in SECDED mode), as in tb_scrub_test_platform.
//
// Each run resets the platform, starts a continuous test ('G'), lets RUN
// clocks pass, halts ('H') and reads the log ('R').  Availability is the
// share of passes without a failure, from the logged transitions.  Checks:
// blind scrubbing at one scrub per upset beats both 20 upsets per scrub
// (error build-up) and 8 scrubs per upset (always reconfiguring); every
// detection-based method beats no scrubbing.
`timescale 1ns/1ps
module tb_continuous_scrubbing;
  import scrub_pkg::*;
  localparam int CPB = 8, NF = 16, SEU = 20000, SCAN = 4000, RUN = 1200000;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  scrub_mode_e mode = SCRUB_OFF;
  logic [47:0] blind_period = 0;
  logic crc_err = 0, ecc_err = 0, uncorr = 0;
  logic [3:0] ecc_frame = 0;
  logic seu_req = 0, seu_gnt;
  icap_req_t seu_icap, icap;
  logic [31:0] seu_rdata, icap_rdata, bs_rdata;
  logic bs_rd, bs_rvalid;
  logic [9:0] bs_addr;
  logic scrub_busy, testing;
  logic [15:0] full_scrubs, frame_scrubs;
  logic [383:0] vec [64];
  int checks = 0, failures = 0;

  scrub_test_platform #(.CLKS_PER_BIT(CPB), .NUM_FRAMES(NF)) dut (
    .clk, .rst_n, .fm_uart_rxd(rxd), .fm_uart_txd(txd),
    .scrub_mode(mode), .blind_period,
    .seu_crc_error(crc_err), .seu_ecc_error(ecc_err), .seu_ecc_frame(ecc_frame),
    .seu_uncorrectable(uncorr), .seu_icap_req(seu_req), .seu_icap_gnt(seu_gnt),
    .seu_icap, .seu_icap_rdata(seu_rdata), .icap, .icap_rdata,
    .bs_rd, .bs_addr, .bs_rvalid, .bs_rdata,
    .scrub_busy, .full_scrubs, .frame_scrubs, .testing);

  icap_config_model #(.NUM_FRAMES(NF)) u_cfg (.clk, .icap, .rdata(icap_rdata));
  bitstream_rom_model #(.AW(10)) u_rom (.clk, .rd(bs_rd), .addr(bs_addr),
                                       .rvalid(bs_rvalid), .rdata(bs_rdata));
  always #5 clk = ~clk;

  // ---------------- effect of configuration upsets on the payload
  logic [127:0] exp_ct, corrupt;
  always_comb begin
    exp_ct = '0;
    for (int i = 0; i < 64; i++)
      if (vec[i][383:256] == dut.u_payload.key && vec[i][255:128] == dut.u_payload.pt)
        exp_ct = vec[i][127:0];
    corrupt = ~exp_ct;
  end
  logic [2:0] br_bad = '0;
  logic       down = 0;
  logic       injecting = 0;
  always @(posedge clk) begin
    logic [2:0] nb;
    logic       nd;
    nb = '0;
    for (int f = 0; f < NF; f++) if (u_cfg.bad_words_in(f) != 0) nb[f % 3] = 1'b1;
    nd = dut.u_reconfig_manager.icap_req && dut.u_reconfig_manager.cur_full;
    if (nb[0] != br_bad[0]) begin
      if (nb[0]) force dut.u_payload.mod_ct[0] = corrupt; else release dut.u_payload.mod_ct[0];
    end
    if (nb[1] != br_bad[1]) begin
      if (nb[1]) force dut.u_payload.mod_ct[1] = corrupt; else release dut.u_payload.mod_ct[1];
    end
    if (nb[2] != br_bad[2]) begin
      if (nb[2]) force dut.u_payload.mod_ct[2] = corrupt; else release dut.u_payload.mod_ct[2];
    end
    if (nd != down) begin
      if (nd) force dut.u_payload.out_ct = {3{corrupt}}; else release dut.u_payload.out_ct;
    end
    br_bad <= nb;
    down   <= nd;
  end

  // ---------------- upsets
  initial begin
    forever begin
      @(posedge clk);
      if (injecting) begin
        repeat (SEU / 2 + $urandom % SEU) @(posedge clk);
        if (injecting) u_cfg.flip($urandom % NF, $urandom % 41, $urandom % 32);
      end
    end
  end

  // ---------------- SEU Controller model (scan, report, SECDED self-correction)
  assign seu_icap = seu_gnt ? '{csb: 1'b0, rdwrb: 1'b1, wdata: 32'h0} : ICAP_IDLE;
  initial begin
    int nbad, first;
    forever begin
      repeat (SCAN) @(posedge clk);
      if (!rst_n) continue;
      seu_req <= 1;
      wait (seu_gnt);
      repeat (100) @(posedge clk);
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
            end else begin
              uncorr <= 1; @(posedge clk); uncorr <= 0;
            end
          end
        end
      end
      crc_err <= (nbad > 0);
      if (first >= 0 && mode == SCRUB_FRAME_ECC) begin
        ecc_frame <= 4'(first); ecc_err <= 1; @(posedge clk); ecc_err <= 0;
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
    while (rxq.size() < n && guard < 200000) begin @(posedge clk); guard++; end
    for (int i = 0; i < n; i++) if (rxq.size() > 0) v = {v[55:0], rxq.pop_front()};
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One continuous run; returns availability in units of 0.1 %.
  task automatic run(input scrub_mode_e m, input logic [47:0] period, input string name,
                     output int avail);
    logic [63:0] v;
    int n, total, good, last_pass, onsets;
    bit  last_fail, ordered;
    rst_n = 0; injecting = 0;
    u_cfg.restore_all();
    rxq.delete();
    mode = m; blind_period = period;
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    send("G");
    injecting = 1;
    repeat (RUN) @(posedge clk);
    injecting = 0;
    send("H");
    get_bytes(8, v);
    send("R");
    get_bytes(2, v);
    n = v[15:0];
    good = 0; last_pass = 0; last_fail = 0; ordered = 1; onsets = 0;
    for (int i = 0; i < n; i++) begin
      get_bytes(8, v);
      if (int'(v[63:32]) < last_pass) ordered = 0;
      if (!last_fail) good += int'(v[63:32]) - last_pass;
      if (v[9] && !last_fail) onsets++;
      last_pass = v[63:32];
      last_fail = v[9];
    end
    total = last_pass + 1;
    if (!last_fail) good++;
    avail = good * 1000 / total;
    check(ordered && n > 0 && n < 4096, {name, ": log well formed"});
    $display("%-22s passes %6d  log entries %4d  failure onsets %4d  full scrubs %5d  frame scrubs %4d  availability %0d.%0d %%",
             name, total, n, onsets, full_scrubs, frame_scrubs, avail / 10, avail % 10);
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a_off, a_b_slow, a_b_mid, a_b_fast, a_crc, a_ecc, a_sec;
    $readmemh("rtl/aes_kat_vectors.hex", vec);
    run(SCRUB_OFF,       0,           "no scrubbing",        a_off);
    run(SCRUB_BLIND,     48'(SEU*20), "blind, 1 per 20 SEU", a_b_slow);
    run(SCRUB_BLIND,     48'(SEU),    "blind, 1 per SEU",    a_b_mid);
    run(SCRUB_BLIND,     48'(SEU/8),  "blind, 8 per SEU",    a_b_fast);
    run(SCRUB_CRC,       0,           "CRC triggered",       a_crc);
    run(SCRUB_FRAME_ECC, 0,           "frame ECC triggered", a_ecc);
    run(SCRUB_SECDED,    0,           "SECDED",              a_sec);
    check(a_b_mid > a_b_slow, "blind: too rare scrubbing loses availability");
    check(a_b_mid > a_b_fast, "blind: too frequent scrubbing loses availability");
    check(a_crc > a_off, "CRC scrubbing beats none");
    check(a_ecc > a_off, "frame ECC scrubbing beats none");
    check(a_sec > a_off, "SECDED scrubbing beats none");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
