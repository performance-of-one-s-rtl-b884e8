// One's complement cache address generator.
//
// A load or store addresses memory at EA = base + sext(disp).  The cache is
// indexed not by the S address bits above the line offset but by the line
// address EA >> L_W taken modulo 2^S - 1.  This unit produces that index from
// the base register and the 16-bit displacement directly, side by side with
// the ALU that forms EA, so the cache address and the memory address are
// ready together:
//
//   rb  = (base        >> L_W) mod (2^S - 1)      one subfield fold
//   rd  = (sext(disp)  >> L_W) mod (2^S - 1)      one subfield fold
//   idx = rb + rd + c                              one's complement adds
//
// where c is the carry out of the line-offset bits (base + disp)[L_W-1:0].
// The ALU's 32-bit add can wrap (a negative displacement always does, as a
// two's complement pattern); the line address then loses 2^(ADDR_W-L_W),
// whose residue is the constant R = 2^((ADDR_W-L_W) mod S).  Both candidates,
// idx and idx - R, are formed in parallel and the ALU carry out (ea_cout)
// picks one, so the index equals (EA >> L_W) mod (2^S - 1) for every input.
//
// The cache address is {tag, index, offset}.  Tag and offset are taken from
// EA unchanged.  The tag is widened by one bit, set when the S address bits
// above the offset are all ones: lines whose low S line-address bits are 0
// and 2^S - 1 fall into the same set with the same upper bits and would
// otherwise alias.
//
// Combinational, no clock.  The two folds and the final add follow the
// three s-bit adders of the block diagram; the offset carry, the wrap
// correction and the extra tag bit are this design's additions that make
// the mapping exact.  The index may be -0 (all ones); the cache folds it
// onto set 0.
module oc_index_gen #(
  parameter int unsigned ADDR_W     = oc_pkg::ADDR_W,
  parameter int unsigned S          = oc_pkg::DEF_S,
  parameter int unsigned LINE_BYTES = oc_pkg::DEF_LINE_BYTES,
  localparam int unsigned L_W       = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W     = ADDR_W - L_W - S,
  localparam int unsigned LINE_W    = ADDR_W - L_W
) (
  input  logic [ADDR_W-1:0] base,      // base register value
  input  logic [15:0]       disp,      // immediate displacement
  input  logic [ADDR_W-1:0] ea,        // ALU result base + sext(disp)
  input  logic              ea_cout,   // ALU carry out of that add
  output logic [TAG_W:0]    c_tag,     // {EA tag field, index-field-all-ones}
  output logic [S-1:0]      c_index,   // one's complement set number
  output logic [L_W-1:0]    c_offset   // byte offset in the line
);

  localparam logic [S-1:0] R_WRAP = S'(1) << (LINE_W % S);

  logic [ADDR_W-1:0] dsx;
  logic [S-1:0]      rb, rd, sum_bd, sum_c, sum_w;
  logic [L_W:0]      off_sum;

  assign dsx     = ADDR_W'(signed'(disp));
  assign off_sum = {1'b0, base[L_W-1:0]} + {1'b0, dsx[L_W-1:0]};

  // First level: subfields of base and of the displacement.
  oc_fold #(.W(LINE_W), .S(S)) u_fold_base (.value(base[ADDR_W-1:L_W]), .residue(rb));
  oc_fold #(.W(LINE_W), .S(S)) u_fold_disp (.value(dsx[ADDR_W-1:L_W]),  .residue(rd));

  // Second level: the two residues, then the carry out of the offset field.
  oc_adder #(.S(S)) u_add_bd (.a(rb),     .b(rd),             .sum(sum_bd));
  oc_adder #(.S(S)) u_add_c  (.a(sum_bd), .b(S'(off_sum[L_W])), .sum(sum_c));

  // Wrap-corrected candidate: subtract R, i.e. add its one's complement.
  oc_adder #(.S(S)) u_add_w  (.a(sum_c),  .b(~R_WRAP),        .sum(sum_w));

  assign c_index  = ea_cout ? sum_w : sum_c;
  assign c_tag    = {ea[ADDR_W-1 -: TAG_W], &ea[L_W +: S]};
  assign c_offset = ea[L_W-1:0];

endmodule
