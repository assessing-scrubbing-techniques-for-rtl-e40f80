// scrub_test_platform: FPGA test platform for evaluating configuration-memory
// scrubbing and TMR on an SRAM-based FPGA.
//
// Two logically separate halves share the device.  The payload (device under
// test) is an AES-128 encryption block in one of three TMR variants.  The
// test framework around it holds
//   * the Fault Monitor, which feeds known-answer vectors to the payload,
//     checks and classifies its answers and logs status vectors, under
//     command of a host PC on its own UART;
//   * the Reconfiguration Manager, which scrubs the payload's configuration
//     frames from a reference bitstream (blind, CRC-, frame-ECC- or
//     SECDED-triggered);
//   * the ICAP Manager, which shares the single configuration port between
//     the Reconfiguration Manager and the SEU Controller.
// The SEU Controller (fault injection and single-bit correction), the ICAP
// primitive, the reference-bitstream EEPROM, and the bus master / memory
// controller that would set the scrubbing configuration are outside this
// RTL: their signals are ports.  The Fault Monitor connects to the payload
// only through the vector inputs and the result outputs.
//
// Block structure follows the platform's block diagram; port-level choices
// (configuration as plain inputs, status counters as outputs) are this
// design's.  All blocks run on the one clock `clk`, which also clocks ICAP.
module scrub_test_platform
  import scrub_pkg::*;
#(
  parameter tmr_variant_e VARIANT      = TMR_TRIPLE_VOTER,
  parameter int unsigned  CLKS_PER_BIT = 868,
  parameter int unsigned  NUM_VECTORS  = 64,
  parameter int unsigned  LOG_DEPTH    = 4096,
  parameter int unsigned  NUM_FRAMES   = 1024,
  parameter int unsigned  FRAME_BASE   = 0,
  parameter int unsigned  BS_AW        = $clog2(NUM_FRAMES * FRAME_WORDS),
  parameter int unsigned  FRAME_AW     = $clog2(NUM_FRAMES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // Fault Monitor host link
  input  logic                fm_uart_rxd,
  output logic                fm_uart_txd,
  // scrubbing configuration
  input  scrub_mode_e         scrub_mode,
  input  logic [47:0]         blind_period,
  // SEU Controller: error reports and its ICAP port
  input  logic                seu_crc_error,
  input  logic                seu_ecc_error,
  input  logic [FRAME_AW-1:0] seu_ecc_frame,
  input  logic                seu_uncorrectable,
  input  logic                seu_icap_req,
  output logic                seu_icap_gnt,
  input  icap_req_t           seu_icap,
  output logic [31:0]         seu_icap_rdata,
  // ICAP primitive
  output icap_req_t           icap,
  input  logic [31:0]         icap_rdata,
  // reference bitstream memory (configuration interface)
  output logic                bs_rd,
  output logic [BS_AW-1:0]    bs_addr,
  input  logic                bs_rvalid,
  input  logic [31:0]         bs_rdata,
  // status
  output logic                scrub_busy,
  output logic [15:0]         full_scrubs,
  output logic [15:0]         frame_scrubs,
  output logic                testing
);

  // payload <-> Fault Monitor
  logic              pl_start, pl_busy, pl_done;
  logic [127:0]      pl_key, pl_pt;
  logic [2:0][127:0] pl_out_ct, pl_branch_ct;

  // Reconfiguration Manager <-> ICAP Manager
  logic              rm_icap_req, rm_icap_gnt;
  icap_req_t         rm_icap;
  logic [31:0]       rm_icap_rdata;

  aes_payload #(.VARIANT(VARIANT)) u_payload (
    .clk, .rst_n,
    .start(pl_start), .key(pl_key), .pt(pl_pt),
    .busy(pl_busy), .done(pl_done), .out_ct(pl_out_ct), .branch_ct(pl_branch_ct)
  );

  fault_monitor #(
    .CLKS_PER_BIT(CLKS_PER_BIT), .NUM_VECTORS(NUM_VECTORS), .LOG_DEPTH(LOG_DEPTH)
  ) u_fault_monitor (
    .clk, .rst_n,
    .uart_rxd(fm_uart_rxd), .uart_txd(fm_uart_txd),
    .pl_start, .pl_key, .pl_pt, .pl_done, .pl_out_ct, .pl_branch_ct,
    .scrub_busy, .testing
  );

  reconfig_manager #(.NUM_FRAMES(NUM_FRAMES), .FRAME_BASE(FRAME_BASE)) u_reconfig_manager (
    .clk, .rst_n,
    .mode(scrub_mode), .blind_period,
    .crc_error(seu_crc_error), .ecc_error(seu_ecc_error), .ecc_frame(seu_ecc_frame),
    .uncorrectable(seu_uncorrectable),
    .icap_req(rm_icap_req), .icap_gnt(rm_icap_gnt), .icap(rm_icap),
    .bs_rd, .bs_addr, .bs_rvalid, .bs_rdata,
    .busy(scrub_busy), .full_scrubs, .frame_scrubs
  );

  icap_manager u_icap_manager (
    .clk, .rst_n,
    .seu_req(seu_icap_req), .seu_gnt(seu_icap_gnt), .seu_icap, .seu_rdata(seu_icap_rdata),
    .rm_req(rm_icap_req), .rm_gnt(rm_icap_gnt), .rm_icap, .rm_rdata(rm_icap_rdata),
    .icap, .icap_rdata
  );

endmodule
