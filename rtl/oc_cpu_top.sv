// Load/store datapath around a one's complement data cache.
//
// This is the address path of a MIPS R2000/R3000-style processor with a data
// cache of 2^S - 1 sets.  When a load or store reaches its ALU step, two
// addresses are formed at the same time from the base register and the
// 16-bit displacement held in the instruction register:
//   * the memory address base + sext(disp), by the ALU, kept in the memory
//     address register and used only if main memory must be accessed;
//   * the cache address {tag, index, offset}, by oc_index_gen, whose index is
//     the line address modulo 2^S - 1, kept in the cache address register.
// The cache looks the line up with the cache address; on a miss it fetches
// the line from main memory with the memory address.  The write-back MUX
// picks the ALU result, the word read from the cache on a hit, or the word
// taken straight from main memory on a miss.
//
// Instructions (one at a time) arrive on instr/instr_valid/instr_ready and
// step through IF, RD, ALU, MEM and WB as states of a sequencer, not as a
// pipeline: IF latches the instruction register, RD reads the register file,
// ALU computes both addresses, MEM accesses the cache, WB writes the
// register file and pulses retire_valid.  The executed subset is LW, SW,
// ADDIU, LUI and ADDU (word accesses only, alignment not checked); any other
// instruction retires without effect.  retire_valid is high for one cycle,
// 2 clocks after the instruction was accepted for an ALU instruction and 5
// clocks after it for a load hit; a miss or a store adds the memory time.
// The main memory port is the cache's memory port brought out.
//
// What follows the document: two addresses formed in parallel, the set
// count 2^S - 1, the index by one's complement addition, the MUX structure.
// This design's own choices: the sequencer, the instruction subset, the
// handshakes, the debug read port and the status outputs.
module oc_cpu_top #(
  parameter int unsigned S          = oc_pkg::DEF_S,
  parameter int unsigned WAYS       = oc_pkg::DEF_WAYS,
  parameter int unsigned LINE_BYTES = oc_pkg::DEF_LINE_BYTES,
  localparam int unsigned ADDR_W    = oc_pkg::ADDR_W,
  localparam int unsigned L_W       = $clog2(LINE_BYTES),
  localparam int unsigned TAGX_W    = ADDR_W - L_W - S + 1,
  localparam int unsigned LINE_BITS = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction input (stands for the instruction fetch side)
  input  logic                  instr_valid,
  output logic                  instr_ready,
  input  logic [31:0]           instr,
  // retirement status
  output logic                  retire_valid,
  output logic                  retire_mem,     // retired a load or store
  output logic                  retire_hit,     // ... and it hit in the cache
  output logic [S-1:0]          retire_index,   // its one's complement index
  output logic [ADDR_W-1:0]     retire_addr,    // its memory address
  // register observation
  input  logic [4:0]            dbg_reg_addr,
  output logic [31:0]           dbg_reg_data,
  // main memory
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [31:0]           mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LINE_BITS-1:0]  mem_resp_rdata
);

  import oc_pkg::*;

  typedef enum logic [2:0] {
    ST_IF, ST_RD, ST_ALU, ST_MEM_REQ, ST_MEM_WAIT, ST_WB
  } stage_e;

  stage_e stage_q;

  // Instruction register and its fields.
  logic [31:0] ir_q;
  logic [5:0]  f_op, f_fn;
  logic [4:0]  f_rs, f_rt, f_rd;
  logic [15:0] f_imm;
  assign f_op  = ir_q[31:26];
  assign f_rs  = ir_q[25:21];
  assign f_rt  = ir_q[20:16];
  assign f_rd  = ir_q[15:11];
  assign f_imm = ir_q[15:0];
  assign f_fn  = ir_q[5:0];

  logic is_lw, is_sw, is_addiu, is_lui, is_addu, is_mem, writes_reg;
  assign is_lw      = (f_op == OP_LW);
  assign is_sw      = (f_op == OP_SW);
  assign is_addiu   = (f_op == OP_ADDIU);
  assign is_lui     = (f_op == OP_LUI);
  assign is_addu    = (f_op == OP_SPECIAL) && (f_fn == FN_ADDU);
  assign is_mem     = is_lw || is_sw;
  assign writes_reg = is_lw || is_addiu || is_lui || is_addu;

  // Register file.
  logic [31:0] rf_rd1, rf_rd2, wb_data;
  logic        rf_we;
  logic [4:0]  rf_wa;

  oc_regfile u_rf (
    .clk, .rst_n,
    .ra1 (f_rs),         .rd1 (rf_rd1),
    .ra2 (f_rt),         .rd2 (rf_rd2),
    .ra3 (dbg_reg_addr), .rd3 (dbg_reg_data),
    .we  (rf_we),        .wa  (rf_wa),   .wd (wb_data)
  );

  // Operand registers (RD step).
  logic [31:0] a_q, b_q;

  // Operand MUX and ALU.
  logic [31:0] alu_b, alu_y;
  logic        alu_cout;
  alu_op_e     alu_op;

  always_comb begin
    if (f_op == OP_SPECIAL) alu_b = b_q;
    else if (is_lui)        alu_b = {f_imm, 16'h0000};
    else                    alu_b = {{16{f_imm[15]}}, f_imm};
    alu_op = is_lui ? ALU_PASSB : ALU_ADD;
  end

  oc_alu u_alu (.op(alu_op), .a(a_q), .b(alu_b), .y(alu_y), .cout(alu_cout));

  // Cache address, computed beside the ALU.
  logic [TAGX_W-1:0] c_tag;
  logic [S-1:0]      c_index;
  logic [L_W-1:0]    c_offset;

  oc_index_gen #(.ADDR_W(ADDR_W), .S(S), .LINE_BYTES(LINE_BYTES)) u_idx (
    .base (a_q), .disp (f_imm), .ea (alu_y), .ea_cout (alu_cout),
    .c_tag, .c_index, .c_offset
  );

  // Memory address / ALU result register and cache address register.
  logic [ADDR_W-1:0] mar_q;
  logic [TAGX_W-1:0] car_tag_q;
  logic [S-1:0]      car_index_q;
  logic [L_W-1:0]    car_offset_q;
  logic [31:0]       sd_q;

  // Cache.
  logic        c_req_valid, c_req_ready, c_resp_valid, c_resp_hit;
  logic [31:0] c_resp_rdata;

  oc_cache #(.ADDR_W(ADDR_W), .S(S), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_cache (
    .clk, .rst_n,
    .req_valid  (c_req_valid),
    .req_ready  (c_req_ready),
    .req_we     (is_sw),
    .req_tag    (car_tag_q),
    .req_index  (car_index_q),
    .req_offset (car_offset_q),
    .req_maddr  (mar_q),
    .req_wdata  (sd_q),
    .resp_valid (c_resp_valid),
    .resp_hit   (c_resp_hit),
    .resp_rdata (c_resp_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata
  );

  assign c_req_valid = (stage_q == ST_MEM_REQ);

  // Load data: the cache's word on a hit, main memory's word on a miss.
  logic [31:0] cache_word_q, mem_word_q;
  wb_sel_e     wb_sel_q;
  logic        hit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage_q      <= ST_IF;
      ir_q         <= '0;
      a_q          <= '0;
      b_q          <= '0;
      mar_q        <= '0;
      car_tag_q    <= '0;
      car_index_q  <= '0;
      car_offset_q <= '0;
      sd_q         <= '0;
      cache_word_q <= '0;
      mem_word_q   <= '0;
      wb_sel_q     <= WB_ALU;
      hit_q        <= 1'b0;
    end else begin
      unique case (stage_q)
        ST_IF: if (instr_valid) begin
          ir_q    <= instr;
          stage_q <= ST_RD;
        end
        ST_RD: begin
          a_q     <= rf_rd1;
          b_q     <= rf_rd2;
          stage_q <= ST_ALU;
        end
        ST_ALU: begin
          mar_q        <= alu_y;
          car_tag_q    <= c_tag;
          car_index_q  <= c_index;
          car_offset_q <= c_offset;
          sd_q         <= b_q;
          wb_sel_q     <= WB_ALU;
          hit_q        <= 1'b0;
          stage_q      <= is_mem ? ST_MEM_REQ : ST_WB;
        end
        ST_MEM_REQ: if (c_req_ready) stage_q <= ST_MEM_WAIT;
        ST_MEM_WAIT: begin
          if (mem_resp_valid && !mem_req_we)
            mem_word_q <= mem_resp_rdata[32*int'(car_offset_q[L_W-1:2]) +: 32];
          if (c_resp_valid) begin
            cache_word_q <= c_resp_rdata;
            hit_q        <= c_resp_hit;
            wb_sel_q     <= c_resp_hit ? WB_CACHE : WB_MEM;
            stage_q      <= ST_WB;
          end
        end
        ST_WB: stage_q <= ST_IF;
        default: stage_q <= ST_IF;
      endcase
    end
  end

  // Write-back MUX.
  always_comb begin
    unique case (wb_sel_q)
      WB_CACHE: wb_data = cache_word_q;
      WB_MEM:   wb_data = mem_word_q;
      default:  wb_data = mar_q;
    endcase
  end

  assign rf_we = (stage_q == ST_WB) && writes_reg;
  assign rf_wa = (f_op == OP_SPECIAL) ? f_rd : f_rt;

  assign instr_ready  = (stage_q == ST_IF);
  assign retire_valid = (stage_q == ST_WB);
  assign retire_mem   = is_mem;
  assign retire_hit   = hit_q;
  assign retire_index = car_index_q;
  assign retire_addr  = mar_q;

endmodule
