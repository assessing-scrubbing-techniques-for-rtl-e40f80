// tmr_voter: bitwise two-out-of-three majority voter for module-level TMR.
//
// Each output bit is the value held by at least two of the three inputs, so
// an error in any one input is masked.  `mismatch` flags, per input, that the
// input disagrees with the voted result, which lets a monitor see an error
// that was masked.  Purely combinational.  The voter function follows the
// document's TMR variants; the mismatch flags are this design's addition for
// observability.
module tmr_voter #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] voted,
  output logic [2:0]       mismatch
);

  always_comb begin
    voted       = (in0 & in1) | (in1 & in2) | (in0 & in2);
    mismatch[0] = in0 != voted;
    mismatch[1] = in1 != voted;
    mismatch[2] = in2 != voted;
  end

endmodule
