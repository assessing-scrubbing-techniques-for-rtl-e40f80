// tb_icap_manager: checks arbitration of the ICAP port between the SEU
// Controller and the Reconfiguration Manager: a grant is held until the
// owner releases, the Reconfiguration Manager wins a tie, the port carries
// the owner's words and is idle otherwise, and readback data reaches both.
`timescale 1ns/1ps
module tb_icap_manager;
  import scrub_pkg::*;
  logic clk = 0, rst_n = 0;
  logic seu_req = 0, rm_req = 0, seu_gnt, rm_gnt;
  icap_req_t seu_icap, rm_icap, icap;
  logic [31:0] seu_rdata, rm_rdata, icap_rdata;
  int checks = 0, failures = 0;

  icap_manager dut (.*);
  always #5 clk = ~clk;

  // masters drive the port only while granted
  always_comb begin
    seu_icap = seu_gnt ? '{csb: 1'b0, rdwrb: 1'b1, wdata: 32'h5E05_0000} : ICAP_IDLE;
    rm_icap  = rm_gnt  ? '{csb: 1'b0, rdwrb: 1'b0, wdata: 32'h0A0A_0001} : ICAP_IDLE;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    icap_rdata = 32'hCAFE_F00D;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!seu_gnt && !rm_gnt && icap.csb, "idle");
    // tie: both request together, RM wins
    seu_req = 1; rm_req = 1;
    @(negedge clk);
    check(rm_gnt && !seu_gnt, "tie goes to reconfiguration manager");
    check(icap == rm_icap && !icap.csb, "port carries RM words");
    // RM holds; SEU keeps requesting and waits
    repeat (20) @(negedge clk);
    check(rm_gnt && !seu_gnt, "grant held while requested");
    rm_req = 0;
    @(negedge clk);
    check(!rm_gnt, "RM released");
    @(negedge clk);
    check(seu_gnt && icap.wdata == 32'h5E05_0000 && icap.rdwrb, "SEU granted after release");
    // RM request cannot preempt SEU
    rm_req = 1;
    repeat (10) @(negedge clk);
    check(seu_gnt && !rm_gnt, "no preemption");
    check(seu_rdata == 32'hCAFE_F00D && rm_rdata == 32'hCAFE_F00D, "readback fan-out");
    seu_req = 0;
    @(negedge clk); @(negedge clk);
    check(rm_gnt && !seu_gnt, "RM granted after SEU release");
    rm_req = 0;
    @(negedge clk); @(negedge clk);
    check(!rm_gnt && !seu_gnt && icap == ICAP_IDLE, "idle again");
    // a lone SEU request
    seu_req = 1;
    @(negedge clk); @(negedge clk);
    check(seu_gnt, "lone SEU request granted");
    seu_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
