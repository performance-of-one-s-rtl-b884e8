// Self-checking testbench of oc_index_gen.  Random base registers and
// displacements (including negative ones, offset carries and addresses that
// wrap past 2^32) are applied; the testbench forms EA and the carry out
// itself and checks that the index equals (EA >> L_W) mod (2^S - 1), that the
// tag is EA's tag field plus the all-ones flag of its index field, and that
// the offset is EA's.  Two geometries: the default (S = 11, 16-byte lines)
// and S = 8 with 32-byte lines.  Each special case must occur.
module tb_oc_index_gen;
  int checks = 0, failures = 0;
  int n_wrap_neg = 0, n_wrap_pos = 0, n_carry = 0, n_allones = 0;

  logic [31:0] base, ea;
  logic [15:0] disp;
  logic        cout;

  logic [17:0] tag_a;  logic [10:0] idx_a; logic [3:0] off_a;
  logic [19:0] tag_b;  logic [7:0]  idx_b; logic [4:0] off_b;

  oc_index_gen u_a (.base, .disp, .ea, .ea_cout(cout),
                    .c_tag(tag_a), .c_index(idx_a), .c_offset(off_a));
  oc_index_gen #(.S(8), .LINE_BYTES(32)) u_b (.base, .disp, .ea, .ea_cout(cout),
                    .c_tag(tag_b), .c_index(idx_b), .c_offset(off_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s base=%h disp=%h ea=%h got=%0d exp=%0d", what, base, disp, ea, got, exp);
    end
  endtask

  initial begin
    logic [32:0] s;
    for (int n = 0; n < 40000; n++) begin
      base = $urandom;
      disp = 16'($urandom);
      case (n % 4)
        0: base = base & 32'h00ff_ffff;                 // ordinary data address
        1: base = 32'hffff_0000 | (base & 32'hffff);    // near the top: may wrap
        2: base = base & 32'h0000_ffff;                 // near zero: negative disp wraps low
        default: ;
      endcase
      if (n % 97 == 0) base = {base[31:15], 11'h7ff, base[3:0]};   // index field all ones
      s    = {1'b0, base} + {1'b0, {{16{disp[15]}}, disp}};
      ea   = s[31:0];
      cout = s[32];
      #1;
      if (cout && !disp[15]) n_wrap_pos++;
      if (!cout && disp[15]) n_wrap_neg++;
      if ((base[3:0] + disp[3:0]) > 15) n_carry++;
      if (&ea[14:4]) n_allones++;
      check("idx_a", longint'(idx_a) % 2047, longint'(ea >> 4) % 2047);
      check("tag_a", longint'(tag_a), longint'({ea[31:15], &ea[14:4]}));
      check("off_a", longint'(off_a), longint'(ea[3:0]));
      check("idx_b", longint'(idx_b) % 255, longint'(ea >> 5) % 255);
      check("tag_b", longint'(tag_b), longint'({ea[31:13], &ea[12:5]}));
      check("off_b", longint'(off_b), longint'(ea[4:0]));
    end
    $display("wrap_pos=%0d wrap_neg=%0d offset_carry=%0d index_all_ones=%0d",
             n_wrap_pos, n_wrap_neg, n_carry, n_allones);
    checks += 4;
    if (n_wrap_pos == 0) failures++;
    if (n_wrap_neg == 0) failures++;
    if (n_carry == 0)    failures++;
    if (n_allones == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
