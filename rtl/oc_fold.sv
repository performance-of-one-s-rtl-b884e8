// Residue of a W-bit unsigned value modulo 2^S - 1.
//
// The value is cut into ceil(W/S) subfields of S bits, A_1 (least
// significant) .. A_i, the last one padded with zeros.  Since 2^S = 1
// (mod 2^S - 1), A mod (2^S - 1) = A_1 + A_2 + ... + A_i in one's complement
// arithmetic, so the residue is the one's complement sum of the subfields.
// The subfields are summed by a chain of oc_adder instances (i - 1 adders).
// The result may be -0 (all ones) for residue 0.
//
// Purely combinational.  The subfield sum is the document's method; the
// linear chain (rather than a tree) is this design's choice.
module oc_fold #(
  parameter int unsigned W = 28,
  parameter int unsigned S = 11
) (
  input  logic [W-1:0] value,
  output logic [S-1:0] residue
);

  localparam int unsigned N = (W + S - 1) / S;   // number of subfields

  logic [N*S-1:0] padded;
  logic [S-1:0]   part [N];

  assign padded = (N*S)'(value);

  // part[k] = A_1 + ... + A_(k+1)
  assign part[0] = padded[S-1:0];

  for (genvar k = 1; k < N; k++) begin : g_sum
    oc_adder #(.S(S)) u_add (
      .a   (part[k-1]),
      .b   (padded[k*S +: S]),
      .sum (part[k])
    );
  end

  assign residue = part[N-1];

endmodule
