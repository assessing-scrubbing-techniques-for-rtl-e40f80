// tb_aes128_core: checks the AES-128 core against known-answer vectors.
//
// Runs the two FIPS-197 worked examples and the 64-entry vector table
// (FIPS-197 examples, then variable-plaintext and variable-key vectors with
// expected ciphertexts computed by an independent software model), and checks
// that every encryption takes exactly 10 cycles from the start edge to done.
`timescale 1ns/1ps
module tb_aes128_core;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key, pt, ct;
  int checks = 0, failures = 0;
  logic [383:0] vec [64];

  aes128_core dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL ct=%h exp=%h", ct, exp);
    end
    checks++;
    if (cyc != 11) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("rtl/aes_kat_vectors.hex", vec);
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 64; i++) run(vec[i][383:256], vec[i][255:128], vec[i][127:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
