// icap_manager: shares the one ICAP configuration port between the SEU
// Controller and the Reconfiguration Manager.
//
// The device has a single internal configuration access port, used both by
// the SEU Controller (fault injection, readback, single-bit correction) and
// by the Reconfiguration Manager (scrubbing).  Each master raises `req` and
// may drive the port only while its `gnt` is high; a grant is held until the
// master drops `req`, so a frame write or a whole reconfiguration is never
// split.  When the port is free and both request in the same cycle the
// Reconfiguration Manager wins, because its work repairs the configuration.
// The granted master's request goes to the port; with no grant the port sees
// ICAP_IDLE.  Readback data from the port goes to both masters.
// `gnt` is registered: it rises the cycle after `req` at the earliest and
// falls the cycle after `req` falls.  That an arbiter exists follows the
// document; lock-until-release and the tie rule are this design's choices.
module icap_manager
  import scrub_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // master 0: SEU Controller
  input  logic        seu_req,
  output logic        seu_gnt,
  input  icap_req_t   seu_icap,
  output logic [31:0] seu_rdata,
  // master 1: Reconfiguration Manager
  input  logic        rm_req,
  output logic        rm_gnt,
  input  icap_req_t   rm_icap,
  output logic [31:0] rm_rdata,
  // ICAP primitive
  output icap_req_t   icap,
  input  logic [31:0] icap_rdata
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seu_gnt <= 1'b0;
      rm_gnt  <= 1'b0;
    end else begin
      if (seu_gnt) begin
        seu_gnt <= seu_req;
      end else if (rm_gnt) begin
        rm_gnt  <= rm_req;
      end else if (rm_req) begin
        rm_gnt  <= 1'b1;
      end else if (seu_req) begin
        seu_gnt <= 1'b1;
      end
    end
  end

  always_comb begin
    if (seu_gnt)     icap = seu_icap;
    else if (rm_gnt) icap = rm_icap;
    else             icap = ICAP_IDLE;
  end

  assign seu_rdata = icap_rdata;
  assign rm_rdata  = icap_rdata;

  // Never both granted; a master selects the port only while granted.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(seu_gnt && rm_gnt));
  a_seu_owns:  assert property (@(posedge clk) disable iff (!rst_n) !seu_gnt |-> seu_icap.csb);
  a_rm_owns:   assert property (@(posedge clk) disable iff (!rst_n) !rm_gnt  |-> rm_icap.csb);

endmodule
