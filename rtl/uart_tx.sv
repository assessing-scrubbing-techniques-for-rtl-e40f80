// uart_tx: 8N1 UART transmitter.
//
// When `ready` is high, a one-cycle `valid` with `data` starts a frame: one
// start bit, eight data bits LSB first and one stop bit, each CLKS_PER_BIT
// clocks long.  `ready` is low from the cycle after `valid` until the stop
// bit has been sent.  Format and handshake are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  logic [9:0] shreg;     // stop, data[7:0], start; sent from bit 0
  logic [3:0] bits_left;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 4'd0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        txd       <= 1'b0;
      end
    end else begin
      if (32'(cnt) == CLKS_PER_BIT - 1) begin
        cnt       <= '0;
        bits_left <= bits_left - 1'b1;
        shreg     <= {1'b1, shreg[9:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : shreg[1];
      end else cnt <= cnt + 1'b1;
    end
  end

endmodule
