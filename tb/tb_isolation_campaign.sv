// tb_isolation_campaign: isolation testing of the three payload variants,
// 4,000 emulated upsets each, run side by side on three copies of the
// platform (fast UART, otherwise default sizes).  Every status vector must
// carry the error class its upset implies: single errors masked by both TMR
// variants, bridge errors failing, voter errors failing with one voter and
// masked with three, every upset failing the reference.
`timescale 1ns/1ps
module tb_isolation_campaign;
  import scrub_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] fin;
  int c [3], f [3];
  int checks, failures;

  isolation_campaign #(.VARIANT(TMR_REFERENCE))    u_ref (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  isolation_campaign #(.VARIANT(TMR_SINGLE_VOTER)) u_sv  (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  isolation_campaign #(.VARIANT(TMR_TRIPLE_VOTER)) u_tv  (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));

  always #5 clk = ~clk;

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (fin == 3'b111);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
