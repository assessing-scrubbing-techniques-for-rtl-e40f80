// isolation_campaign: one isolation-test campaign on one payload variant,
// for the tb_isolation_campaign testbench.
//
// Instantiates the platform with the given TMR variant and a fast UART, and
// plays the host: NUM_FAULTS times it emulates one upset, runs an isolation
// test ('T'), reads the status vector, and removes the upset before the next
// one.  An upset is emulated by forcing a wrong ciphertext (the right one
// with one random bit flipped) onto
//   a branch result          (70 %), an upset in one TMR copy;
//   two branch results       (10 %), an upset that bridges two copies;
//   the voted output(s)      (20 %), an upset in a voter: with one voter all
//                                    three output copies, with three voters
//                                    one copy.
// The reference variant has one real module, so every upset lands on it.
// Each status vector is checked against the class the upset must produce,
// and the totals are reported like an isolation-test summary table.
`timescale 1ns/1ps
module isolation_campaign
  import scrub_pkg::*;
#(
  parameter tmr_variant_e VARIANT    = TMR_TRIPLE_VOTER,
  parameter int           NUM_FAULTS = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int CPB = 8;
  logic rxd = 1, txd;
  icap_req_t icap;
  logic [31:0] seu_rdata;
  logic bs_rd, seu_gnt, scrub_busy, testing;
  logic [12:0] bs_addr;
  logic [15:0] full_scrubs, frame_scrubs;
  logic [383:0] vec [64];

  scrub_test_platform #(.VARIANT(VARIANT), .CLKS_PER_BIT(CPB), .NUM_FRAMES(8)) dut (
    .clk, .rst_n, .fm_uart_rxd(rxd), .fm_uart_txd(txd),
    .scrub_mode(SCRUB_OFF), .blind_period(48'd0),
    .seu_crc_error(1'b0), .seu_ecc_error(1'b0), .seu_ecc_frame(3'd0),
    .seu_uncorrectable(1'b0), .seu_icap_req(1'b0), .seu_icap_gnt(seu_gnt),
    .seu_icap(ICAP_IDLE), .seu_icap_rdata(seu_rdata), .icap, .icap_rdata(32'h0),
    .bs_rd, .bs_addr(bs_addr[8:0]), .bs_rvalid(1'b0), .bs_rdata(32'h0),
    .scrub_busy, .full_scrubs, .frame_scrubs, .testing);
  assign bs_addr[12:9] = '0;

  // expected ciphertext of the vector being applied, with the upset's bit flipped
  logic [127:0] mask = '0, exp_ct, corrupt;
  always_comb begin
    exp_ct = '0;
    for (int i = 0; i < 64; i++)
      if (vec[i][383:256] == dut.u_payload.key && vec[i][255:128] == dut.u_payload.pt)
        exp_ct = vec[i][127:0];
    corrupt = exp_ct ^ mask;
  end

  // host UART
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
  task automatic get_status(output logic [63:0] v);
    int guard = 0;
    v = '0;
    while (rxq.size() < 8 && guard < 100000) begin @(posedge clk); guard++; end
    for (int i = 0; i < 8; i++) if (rxq.size() > 0) v = {v[55:0], rxq.pop_front()};
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL variant %0d: %s", VARIANT, what); end
  endtask

  int n_err = 0, n_single = 0, n_bridge = 0, n_voter = 0, n_fail = 0;

  initial begin
    logic [63:0] s;
    int kind, a, b;
    bit exp_single, exp_bridge, exp_voter, exp_fail;
    finished = 0; checks = 0; failures = 0;
    $readmemh("rtl/aes_kat_vectors.hex", vec);
    @(posedge rst_n);
    repeat (10) @(posedge clk);
    for (int f = 0; f < NUM_FAULTS; f++) begin
      mask = 128'(1) << ($urandom % 128);
      kind = $urandom % 10;
      a = $urandom % 3;
      b = (a + 1 + $urandom % 2) % 3;
      exp_single = 0; exp_bridge = 0; exp_voter = 0; exp_fail = 1;
      if (VARIANT == TMR_REFERENCE) begin
        force dut.u_payload.mod_ct[0] = corrupt;
      end else if (kind < 7) begin
        case (a)
          0: force dut.u_payload.mod_ct[0] = corrupt;
          1: force dut.u_payload.mod_ct[1] = corrupt;
          default: force dut.u_payload.mod_ct[2] = corrupt;
        endcase
        exp_single = 1; exp_fail = 0;
      end else if (kind == 7) begin
        if (a != 0 && b != 0) begin
          force dut.u_payload.mod_ct[1] = corrupt; force dut.u_payload.mod_ct[2] = corrupt;
        end else if (a != 1 && b != 1) begin
          force dut.u_payload.mod_ct[0] = corrupt; force dut.u_payload.mod_ct[2] = corrupt;
        end else begin
          force dut.u_payload.mod_ct[0] = corrupt; force dut.u_payload.mod_ct[1] = corrupt;
        end
        exp_bridge = 1;
      end else if (VARIANT == TMR_SINGLE_VOTER) begin
        force dut.u_payload.out_ct = {3{corrupt}};
        exp_voter = 1;
      end else begin
        case (a)
          0: force dut.u_payload.out_ct[0] = corrupt;
          1: force dut.u_payload.out_ct[1] = corrupt;
          default: force dut.u_payload.out_ct[2] = corrupt;
        endcase
        exp_voter = 1; exp_fail = 0;
      end
      send("T");
      get_status(s);
      release dut.u_payload.mod_ct[0];
      release dut.u_payload.mod_ct[1];
      release dut.u_payload.mod_ct[2];
      release dut.u_payload.out_ct;
      release dut.u_payload.out_ct[0];
      release dut.u_payload.out_ct[1];
      release dut.u_payload.out_ct[2];
      check(s[63:32] == 32'(f), $sformatf("pass number %0d", s[63:32]));
      check(s[9] == exp_fail, $sformatf("fault %0d kind %0d failure flag %b", f, kind, s[9]));
      if (VARIANT != TMR_REFERENCE)
        check(s[2:0] == {exp_voter, exp_bridge, exp_single},
              $sformatf("fault %0d kind %0d classes %b", f, kind, s[2:0]));
      if (s[2:0] != 0 || s[9]) n_err++;
      if (s[0]) n_single++;
      if (s[1]) n_bridge++;
      if (s[2]) n_voter++;
      if (s[9]) n_fail++;
    end
    $display("variant %0d: faults %0d errors %0d single %0d bridge %0d voter %0d failures %0d (%0d.%02d %%)",
             VARIANT, NUM_FAULTS, n_err, n_single, n_bridge, n_voter, n_fail,
             n_fail * 100 / NUM_FAULTS, (n_fail * 10000 / NUM_FAULTS) % 100);
    finished = 1;
  end
endmodule
