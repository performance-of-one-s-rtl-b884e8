// s-bit one's complement adder (addition modulo 2^S - 1).
//
// Because 2^S = 1 (mod 2^S - 1), a sum modulo 2^S - 1 is formed by an
// ordinary S-bit binary adder whose carry out is added back into the least
// significant position ("end-around carry").  The result is an S-bit one's
// complement number in which both all-zeros (+0) and all-ones (-0) stand for
// residue 0; the output is never normalised here, so a consumer that needs a
// unique code for 0 must fold -0 onto +0 itself.  For any two S-bit inputs the
// second addition cannot carry again, so the result always fits in S bits.
//
// Purely combinational, no clock.  The structure follows the description of
// one's complement addition used to compute cache indices; writing the
// end-around carry as a second add is this design's choice.
module oc_adder #(
  parameter int unsigned S = 11
) (
  input  logic [S-1:0] a,
  input  logic [S-1:0] b,
  output logic [S-1:0] sum
);

  logic [S:0] raw;

  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    sum = raw[S-1:0] + S'(raw[S]);
  end

endmodule
