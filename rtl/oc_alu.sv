// ALU of the load/store datapath.
//
// Forms the memory address of a load or store as a + b (b is the
// sign-extended displacement) and also serves ADDIU/ADDU; the carry out of
// the add goes to the cache address generator, which needs it to tell when
// the 32-bit address calculation wrapped.  ALU_PASSB forwards b (used by
// LUI).  Combinational.  Only the operations the load/store subset needs
// are provided; the full MIPS ALU is outside this design.
module oc_alu #(
  parameter int unsigned XLEN = 32
) (
  input  oc_pkg::alu_op_e op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            cout
);

  logic [XLEN:0] s;

  always_comb begin
    s = {1'b0, a} + {1'b0, b};
    unique case (op)
      oc_pkg::ALU_ADD:   begin y = s[XLEN-1:0]; cout = s[XLEN]; end
      oc_pkg::ALU_PASSB: begin y = b;           cout = 1'b0;    end
      default:           begin y = s[XLEN-1:0]; cout = s[XLEN]; end
    endcase
  end

endmodule
