// Shared constants and types of the one's complement cache design.
//
// The cache maps a memory line with line address A to set A mod (2^S - 1)
// instead of A mod 2^S.  This package holds the default geometry (a 32 KB
// class direct-mapped data cache with 16-byte lines, i.e. 2^11 - 1 = 2047
// sets, on a 32-bit MIPS R2000/R3000-style machine) and the opcodes of the
// small MIPS instruction subset the load/store datapath executes.
package oc_pkg;

  // Machine word and address width of the MIPS R2000/R3000 family.
  localparam int unsigned ADDR_W     = 32;

  // Default cache geometry: 2^S - 1 sets of WAYS lines of LINE_BYTES bytes.
  localparam int unsigned DEF_S          = 11;
  localparam int unsigned DEF_WAYS       = 1;
  localparam int unsigned DEF_LINE_BYTES = 16;

  // MIPS I primary opcodes (instruction bits 31:26) that are executed.
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'b000000,   // R-type, function in bits 5:0
    OP_ADDIU   = 6'b001001,
    OP_LUI     = 6'b001111,
    OP_LW      = 6'b100011,
    OP_SW      = 6'b101011
  } opcode_e;

  localparam logic [5:0] FN_ADDU = 6'b100001;

  // ALU operations needed by the subset.
  typedef enum logic [0:0] {
    ALU_ADD   = 1'b0,   // a + b, with carry out (address calculation)
    ALU_PASSB = 1'b1    // b (LUI)
  } alu_op_e;

  // Write-back source, the three inputs of the lower MUX in the block diagram.
  typedef enum logic [1:0] {
    WB_ALU   = 2'd0,    // ALU result register
    WB_CACHE = 2'd1,    // word read from the cache on a hit
    WB_MEM   = 2'd2     // word taken from main memory on a miss
  } wb_sel_e;

endpackage
