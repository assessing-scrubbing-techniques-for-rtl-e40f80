// aes_payload: the device under test, AES-128 in one of three TMR variants.
//
// VARIANT selects what the document compares:
//   TMR_REFERENCE    one AES core, no redundancy;
//   TMR_SINGLE_VOTER three AES cores and one voter whose result feeds all
//                    three outputs;
//   TMR_TRIPLE_VOTER three AES cores and three voters, one per output, so a
//                    fault in a voter affects only its own output.
// The cores share the inputs and run in lock step.  The ciphertext and the
// `done` strobe are both voted.  `out_ct[i]` is the result delivered on output
// copy i (after its voter); `branch_ct[i]` is the ciphertext of core i before
// voting (for the reference all three copies carry the one core).  Exposing
// branch results, so that a monitor can tell a masked single-branch error
// from a voter error, is this design's choice.  Timing is that of
// aes128_core: `done` in the 11th cycle counting the `start` cycle as the first.
module aes_payload
  import scrub_pkg::*;
#(
  parameter tmr_variant_e VARIANT = TMR_TRIPLE_VOTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [2:0][127:0] out_ct,
  output logic [2:0][127:0] branch_ct
);

  logic [2:0][127:0] mod_ct;
  logic [2:0]        mod_done, mod_busy;

  if (VARIANT == TMR_REFERENCE) begin : g_ref
    aes128_core u_core (
      .clk, .rst_n, .start, .key, .pt,
      .busy(mod_busy[0]), .done(mod_done[0]), .ct(mod_ct[0])
    );
    assign mod_ct[1]   = mod_ct[0];
    assign mod_ct[2]   = mod_ct[0];
    assign mod_done[2:1] = {2{mod_done[0]}};
    assign mod_busy[2:1] = {2{mod_busy[0]}};
    assign out_ct    = mod_ct;
    assign done      = mod_done[0];
    assign busy      = mod_busy[0];
  end else begin : g_tmr
    for (genvar m = 0; m < 3; m++) begin : g_mod
      aes128_core u_core (
        .clk, .rst_n, .start, .key, .pt,
        .busy(mod_busy[m]), .done(mod_done[m]), .ct(mod_ct[m])
      );
    end
    // Control strobes are voted once; they are one bit wide.
    assign done = (mod_done[0] & mod_done[1]) | (mod_done[1] & mod_done[2])
                | (mod_done[0] & mod_done[2]);
    assign busy = (mod_busy[0] & mod_busy[1]) | (mod_busy[1] & mod_busy[2])
                | (mod_busy[0] & mod_busy[2]);
    if (VARIANT == TMR_SINGLE_VOTER) begin : g_single
      logic [127:0] voted;
      logic [2:0]   mism_unused;
      tmr_voter #(.WIDTH(128)) u_voter (
        .in0(mod_ct[0]), .in1(mod_ct[1]), .in2(mod_ct[2]),
        .voted, .mismatch(mism_unused)
      );
      assign out_ct = {3{voted}};
    end else begin : g_triple
      for (genvar v = 0; v < 3; v++) begin : g_voter
        logic [2:0] mism_unused;
        tmr_voter #(.WIDTH(128)) u_voter (
          .in0(mod_ct[0]), .in1(mod_ct[1]), .in2(mod_ct[2]),
          .voted(out_ct[v]), .mismatch(mism_unused)
        );
      end
    end
  end

  assign branch_ct = mod_ct;

endmodule
