// fault_monitor: applies test vectors to the payload, checks its results and
// logs status vectors, under command of a host over its own UART.
//
// The monitor keeps a table of NUM_VECTORS AES-128 known-answer vectors
// (key, plaintext, expected ciphertext; read from VEC_FILE).  A test pass
// feeds every vector to the payload in turn, waits for `pl_done` (or
// TIMEOUT_CYCLES) and compares each of the three delivered output copies and
// each of the three TMR branch results with the expected ciphertext.  Per
// vector it classifies what it sees:
//   single error  exactly one branch wrong;
//   bridge error  two or more branches wrong;
//   voter error   an output copy wrong while at most one branch is wrong;
//   failure       two or more output copies wrong, or no answer (timeout).
// The pass is summed up in a 64-bit status vector:
//   [63:32] pass number          [31:24] failing vectors (saturating)
//   [23:16] first failing vector (FF: none)
//   [15:13] branch error mask    [12:10] output-copy error mask
//   [9] failure  [8] scrubber was busy during the pass
//   [7:4] 0      [3] timeout  [2] voter  [1] bridge  [0] single error
// Status vectors are kept in an on-chip log memory of LOG_DEPTH entries.
//
// Host commands, one byte each (ASCII):
//   'T'  isolation test: one pass; its status vector is logged and sent back
//        (8 bytes, most significant first).
//   'G'  continuous test: passes back to back until 'H'; a pass is logged
//        only when bits [15:0] differ from those of the previous pass, so the
//        log holds the times at which the payload went wrong or recovered.
//   'H'  halt continuous testing after the current pass; that last pass is
//        logged and its status vector sent back as for 'T'.
//   'R'  read the log: entry count (2 bytes) then every entry (8 bytes each).
//   'C'  clear the log.
// Other bytes are ignored, as is everything but 'H' while a test runs.
//
// The document gives the monitor's role (test vectors kept by the monitor,
// result comparison, status vectors in BRAM read back over a UART separate
// from the SEU Controller's); the command set, status layout, error
// classification in hardware and the log-on-change rule are this design's.
module fault_monitor #(
  parameter int unsigned CLKS_PER_BIT   = 868,   // 100 MHz / 115200 baud
  parameter int unsigned NUM_VECTORS    = 64,
  parameter int unsigned LOG_DEPTH      = 4096,
  parameter int unsigned TIMEOUT_CYCLES = 64,
  parameter string       VEC_FILE       = "rtl/aes_kat_vectors.hex"
) (
  input  logic              clk,
  input  logic              rst_n,
  // host link
  input  logic              uart_rxd,
  output logic              uart_txd,
  // payload
  output logic              pl_start,
  output logic [127:0]      pl_key,
  output logic [127:0]      pl_pt,
  input  logic              pl_done,
  input  logic [2:0][127:0] pl_out_ct,
  input  logic [2:0][127:0] pl_branch_ct,
  // status of the framework
  input  logic              scrub_busy,
  output logic              testing
);

  localparam int unsigned VW = $clog2(NUM_VECTORS);
  localparam int unsigned LW = $clog2(LOG_DEPTH);

  // ---------------------------------------------------------------- UART
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd(uart_txd));

  // ---------------------------------------------------------------- vectors
  logic [383:0] vec_rom [NUM_VECTORS];
  initial $readmemh(VEC_FILE, vec_rom);

  logic [VW-1:0]  vidx;
  logic [383:0]   cur_vec;
  assign cur_vec = vec_rom[vidx];
  assign pl_key  = cur_vec[383:256];
  assign pl_pt   = cur_vec[255:128];

  // ---------------------------------------------------------------- log
  logic [63:0]    log_mem [LOG_DEPTH];
  logic [LW:0]    log_count;
  logic           log_we;
  logic [63:0]    log_wdata, log_rdata;
  logic [LW-1:0]  log_raddr;

  always_ff @(posedge clk) begin
    if (log_we) log_mem[log_count[LW-1:0]] <= log_wdata;
    log_rdata <= log_mem[log_raddr];
  end

  // ---------------------------------------------------------------- control
  typedef enum logic [3:0] {
    S_IDLE, S_ISSUE, S_WAIT, S_END, S_SEND, S_DUMP_RD, S_DUMP_LOAD
  } fm_state_e;

  fm_state_e      state, after_send;
  logic           cont;
  logic [31:0]    pass_no;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] timer;
  logic [7:0]     fail_cnt, first_fail;
  logic [2:0]     br_mask, out_mask;
  logic           f_fail, f_busy, f_single, f_bridge, f_voter, f_tmo;
  logic [15:0]    prev_sig;
  logic [63:0]    tx_buf;
  logic [3:0]     tx_left;
  logic [LW:0]    dump_idx;

  // Per-vector comparison of the payload's answer.
  logic [2:0] br_wrong, out_wrong;
  logic [1:0] n_br, n_out;
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      br_wrong[c]  = pl_branch_ct[c] != cur_vec[127:0];
      out_wrong[c] = pl_out_ct[c]    != cur_vec[127:0];
    end
    n_br  = 2'(br_wrong[0])  + 2'(br_wrong[1])  + 2'(br_wrong[2]);
    n_out = 2'(out_wrong[0]) + 2'(out_wrong[1]) + 2'(out_wrong[2]);
  end

  logic [63:0] status;
  assign status = {pass_no, fail_cnt, first_fail, br_mask, out_mask, f_fail, f_busy,
                   4'b0, f_tmo, f_voter, f_bridge, f_single};

  assign testing  = (state == S_ISSUE) || (state == S_WAIT) || (state == S_END);
  assign tx_data  = tx_buf[63:56];
  assign log_raddr = dump_idx[LW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      after_send <= S_IDLE;
      cont       <= 1'b0;
      pass_no    <= '0;
      vidx       <= '0;
      timer      <= '0;
      pl_start   <= 1'b0;
      fail_cnt   <= '0;
      first_fail <= 8'hFF;
      br_mask    <= '0;
      out_mask   <= '0;
      {f_fail, f_busy, f_single, f_bridge, f_voter, f_tmo} <= '0;
      prev_sig   <= '0;
      tx_buf     <= '0;
      tx_left    <= '0;
      tx_valid   <= 1'b0;
      log_count  <= '0;
      log_we     <= 1'b0;
      log_wdata  <= '0;
      dump_idx   <= '0;
    end else begin
      pl_start <= 1'b0;
      tx_valid <= 1'b0;
      log_we   <= 1'b0;
      if (log_we) log_count <= log_count + 1'b1;
      if (rx_valid && rx_data == "H") cont <= 1'b0;

      unique case (state)
        S_IDLE: if (rx_valid) begin
          unique case (rx_data)
            "T", "G": begin
              cont     <= (rx_data == "G");
              prev_sig <= '0;
              state    <= S_ISSUE;
            end
            "R": begin
              tx_buf     <= {16'(log_count), 48'b0};
              tx_left    <= 4'd2;
              dump_idx   <= '0;
              after_send <= S_DUMP_RD;
              state      <= S_SEND;
            end
            "C": log_count <= '0;
            default: ;
          endcase
        end

        S_ISSUE: begin
          pl_start <= 1'b1;
          timer    <= '0;
          state    <= S_WAIT;
        end

        S_WAIT: begin
          if (scrub_busy) f_busy <= 1'b1;
          if (pl_done || 32'(timer) == TIMEOUT_CYCLES - 1) begin
            if (!pl_done) f_tmo <= 1'b1;
            br_mask  <= br_mask  | (pl_done ? br_wrong  : 3'b111);
            out_mask <= out_mask | (pl_done ? out_wrong : 3'b111);
            if (pl_done && n_br == 2'd1) f_single <= 1'b1;
            if (pl_done && n_br >= 2'd2) f_bridge <= 1'b1;
            if (pl_done && n_out != 2'd0 && n_br <= 2'd1) f_voter <= 1'b1;
            if (!pl_done || n_out >= 2'd2) begin
              f_fail <= 1'b1;
              if (fail_cnt != 8'hFF) fail_cnt <= fail_cnt + 1'b1;
              if (first_fail == 8'hFF) first_fail <= 8'(vidx);
            end
            if (32'(vidx) == NUM_VECTORS - 1) begin
              vidx  <= '0;
              state <= S_END;
            end else begin
              vidx  <= vidx + 1'b1;
              state <= S_ISSUE;
            end
          end else timer <= timer + 1'b1;
        end

        S_END: begin
          // Log the pass (always for an isolation test, on change otherwise).
          if (!cont || status[15:0] != prev_sig)
            if (32'(log_count) < LOG_DEPTH) begin
              log_we    <= 1'b1;
              log_wdata <= status;
            end
          prev_sig   <= status[15:0];
          pass_no    <= pass_no + 1'b1;
          fail_cnt   <= '0;
          first_fail <= 8'hFF;
          br_mask    <= '0;
          out_mask   <= '0;
          {f_fail, f_busy, f_single, f_bridge, f_voter, f_tmo} <= '0;
          if (cont) begin
            state <= S_ISSUE;
          end else begin
            tx_buf     <= status;
            tx_left    <= 4'd8;
            after_send <= S_IDLE;
            state      <= S_SEND;
          end
        end

        S_SEND: begin
          if (tx_left == 4'd0) begin
            state <= after_send;
          end else if (tx_ready && !tx_valid) begin
            tx_valid <= 1'b1;
          end else if (tx_valid) begin
            tx_buf  <= {tx_buf[55:0], 8'h00};
            tx_left <= tx_left - 1'b1;
          end
        end

        S_DUMP_RD: begin
          if (dump_idx == log_count) state <= S_IDLE;
          else state <= S_DUMP_LOAD;       // log_rdata valid next cycle
        end

        S_DUMP_LOAD: begin
          tx_buf     <= log_rdata;
          tx_left    <= 4'd8;
          dump_idx   <= dump_idx + 1'b1;
          after_send <= S_DUMP_RD;
          state      <= S_SEND;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
