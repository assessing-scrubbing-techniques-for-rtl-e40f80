// bitstream_rom_model: behavioural model of the external EEPROM / platform
// flash holding the reference bitstream, for testbenches only.
//
// Word-addressed; a read request (`rd` with `addr`) is answered LATENCY
// clocks later with `rvalid` and `rdata`.  The contents are the reference
// configuration words, the same formula as icap_config_model's golden_word().
`timescale 1ns/1ps
module bitstream_rom_model #(
  parameter int unsigned AW      = 9,
  parameter int unsigned LATENCY = 2
) (
  input  logic          clk,
  input  logic          rd,
  input  logic [AW-1:0] addr,
  output logic          rvalid,
  output logic [31:0]   rdata
);
  logic [LATENCY-1:0] v = '0;
  logic [31:0]        d [LATENCY];
  int unsigned        reads = 0;

  always @(posedge clk) begin
    v    <= {v[LATENCY-2:0], rd};
    d[0] <= (32'(addr) * 32'h9E37_79B9) ^ 32'h5A5A_0F0F;
    for (int i = 1; i < LATENCY; i++) d[i] <= d[i-1];
    if (rd) reads++;
  end
  assign rvalid = v[LATENCY-1];
  assign rdata  = d[LATENCY-1];
endmodule
