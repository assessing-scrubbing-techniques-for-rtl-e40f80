// uart_rx: 8N1 UART receiver.
//
// Synchronises `rxd` with two flip-flops, detects the falling edge of the
// start bit, samples each data bit in the middle of its bit period
// (CLKS_PER_BIT clocks) and checks the stop bit.  A received byte appears on
// `data` with a one-cycle `valid` pulse in the middle of the stop bit; a byte
// with a bad stop bit is dropped.  The document gives the Fault Monitor a
// UART link to the host but not its format: 8N1, LSB first, is this design's
// choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e   state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      state   <= RX_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        RX_IDLE: if (!sync[1]) begin
          state <= RX_START;
          cnt   <= '0;
        end
        RX_START: begin
          if (32'(cnt) == CLKS_PER_BIT/2 - 1) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= sync[1] ? RX_IDLE : RX_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        RX_DATA: begin
          if (32'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            shreg <= {sync[1], shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        RX_STOP: begin
          if (32'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            state <= RX_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
