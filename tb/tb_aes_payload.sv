// tb_aes_payload: checks the three payload variants and TMR error masking.
//
// Instantiates the reference, single-voter and triple-voter payloads side by
// side, runs known-answer vectors through them, and checks every output copy
// and branch.  It then forces one branch's ciphertext to a wrong value and
// checks that both TMR variants still deliver the right result on every
// output copy while the branch result shows the error, and that the
// reference variant delivers the wrong value.  Also checks the 11-cycle
// latency.
`timescale 1ns/1ps
module tb_aes_payload;
  import scrub_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, pt;
  logic [2:0] busy, done;
  logic [2:0][127:0] out_ct [3];
  logic [2:0][127:0] br_ct [3];
  logic [383:0] vec [64];
  int checks = 0, failures = 0;

  aes_payload #(.VARIANT(TMR_REFERENCE)) u_ref (.clk, .rst_n, .start, .key, .pt,
    .busy(busy[0]), .done(done[0]), .out_ct(out_ct[0]), .branch_ct(br_ct[0]));
  aes_payload #(.VARIANT(TMR_SINGLE_VOTER)) u_sv (.clk, .rst_n, .start, .key, .pt,
    .busy(busy[1]), .done(done[1]), .out_ct(out_ct[1]), .branch_ct(br_ct[1]));
  aes_payload #(.VARIANT(TMR_TRIPLE_VOTER)) u_tv (.clk, .rst_n, .start, .key, .pt,
    .busy(busy[2]), .done(done[2]), .out_ct(out_ct[2]), .branch_ct(br_ct[2]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs one vector; `bad_branch` >= 0 means that branch was corrupted.
  task automatic run(input int i, input int bad_branch);
    int cyc;
    logic [127:0] exp;
    exp = vec[i][127:0];
    @(negedge clk);
    key = vec[i][383:256]; pt = vec[i][255:128]; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (done != 3'b111) begin @(negedge clk); cyc++; end
    check(cyc == 11, "latency");
    for (int v = 1; v < 3; v++)
      for (int c = 0; c < 3; c++) begin
        check(out_ct[v][c] === exp, $sformatf("variant %0d output %0d vector %0d", v, c, i));
        check((br_ct[v][c] === exp) == (c != bad_branch), $sformatf("variant %0d branch %0d", v, c));
      end
    check((out_ct[0][0] === exp) == (bad_branch < 0), $sformatf("reference vector %0d", i));
  endtask

  initial begin
    #500000;
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
    for (int i = 0; i < 16; i++) run(i * 4, -1);
    // Upset one branch of each design: the value flips a single output bit.
    force u_ref.mod_ct[0][5]   = 1'b1;
    force u_sv.mod_ct[1][5]  = 1'b1;
    force u_tv.mod_ct[1][5]  = 1'b1;
    run(0, 1);   // bit 5 of vector 0's ciphertext is 0 (…5a): forcing 1 is an error
    release u_ref.mod_ct[0][5];
    release u_sv.mod_ct[1][5];
    release u_tv.mod_ct[1][5];
    run(1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
