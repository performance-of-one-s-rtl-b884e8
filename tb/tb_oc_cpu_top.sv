// End-to-end testbench of oc_cpu_top at its default parameters (2047-set
// direct-mapped cache, 16-byte lines) with a behavioural main memory.
//
// It runs MIPS instruction sequences (LUI/ADDIU/ADDU to build addresses,
// LW/SW to move data) and checks, for every instruction, the register file
// (through the observation port) against a register model, and for every
// load and store the cache index (line address mod 2047), the hit/miss
// outcome (against a reference cache that keeps full line addresses) and the
// loaded data (against a shadow memory).  Latencies are checked: an ALU
// instruction retires 2 clocks after acceptance, a load hit 5.
//
// Scenarios: a strided walk whose stride is 2^11 lines (every line in one
// set of a 2048-set cache, all in different sets here, so the second pass
// hits), negative displacements (the ALU add wraps), offset carries, both
// encodings of set 0, two lines that differ only in an all-zero / all-one
// index field, store hits and misses, and a random mix.  Each must occur.
module tb_oc_cpu_top;
  import oc_pkg::*;
  localparam int S = DEF_S, WAYS = DEF_WAYS, LB = DEF_LINE_BYTES, M = (1 << S) - 1;
  localparam int L_W = $clog2(LB);

  int checks = 0, failures = 0;
  int n_ld_hit = 0, n_ld_miss = 0, n_st_hit = 0, n_st_miss = 0, n_negzero = 0, n_poszero = 0;
  int n_wrap = 0, n_carry = 0, n_alias = 0, n_stride_hit = 0, n_evict = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic instr_valid, instr_ready, retire_valid, retire_mem, retire_hit;
  logic [31:0] instr, retire_addr, dbg_reg_data;
  logic [S-1:0] retire_index;
  logic [4:0] dbg_reg_addr;
  logic mreq_valid, mreq_ready, mreq_we, mresp_valid;
  logic [31:0] mreq_addr, mreq_wdata;
  logic [LB*8-1:0] mresp_rdata;

  oc_cpu_top dut (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr,
    .retire_valid, .retire_mem, .retire_hit, .retire_index, .retire_addr,
    .dbg_reg_addr, .dbg_reg_data,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
    .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata),
    .mem_resp_valid(mresp_valid), .mem_resp_rdata(mresp_rdata));

  oc_mem_model #(.LINE_BYTES(LB), .LATENCY(3)) mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req_we(mreq_we),
    .req_addr(mreq_addr), .req_wdata(mreq_wdata), .resp_valid(mresp_valid),
    .resp_rdata(mresp_rdata));

  // ---------------- models ----------------
  logic [31:0] regs [32];
  logic [31:0] shadow [logic [29:0]];
  logic [31:0] ref_line [M][WAYS];
  int          ref_cnt  [M];

  function automatic logic [31:0] mem_word(logic [31:0] a);
    if (shadow.exists(a[31:2])) return shadow[a[31:2]];
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic bit ref_access(logic [31:0] line, bit is_store);
    int set = int'(line % M);
    int pos = -1;
    for (int i = 0; i < ref_cnt[set]; i++) if (ref_line[set][i] == line) pos = i;
    if (pos >= 0) begin
      for (int i = pos; i > 0; i--) ref_line[set][i] = ref_line[set][i-1];
      ref_line[set][0] = line;
      return 1;
    end
    if (!is_store) begin
      if (ref_cnt[set] == WAYS) n_evict++;
      for (int i = WAYS - 1; i > 0; i--) ref_line[set][i] = ref_line[set][i-1];
      ref_line[set][0] = line;
      if (ref_cnt[set] < WAYS) ref_cnt[set]++;
    end
    return 0;
  endfunction

  // ---------------- encoders ----------------
  function automatic logic [31:0] i_lui(int rt, logic [15:0] imm);
    return {OP_LUI, 5'd0, 5'(rt), imm};
  endfunction
  function automatic logic [31:0] i_addiu(int rt, int rs, logic [15:0] imm);
    return {OP_ADDIU, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] i_addu(int rd, int rs, int rt);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_ADDU};
  endfunction
  function automatic logic [31:0] i_lw(int rt, logic [15:0] off, int base);
    return {OP_LW, 5'(base), 5'(rt), off};
  endfunction
  function automatic logic [31:0] i_sw(int rt, logic [15:0] off, int base);
    return {OP_SW, 5'(base), 5'(rt), off};
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  // Issue one instruction, wait for it to retire, check it against the models.
  task automatic run(logic [31:0] ins);
    logic [5:0]  op  = ins[31:26];
    int          rs  = int'(ins[25:21]), rt = int'(ins[20:16]), rd = int'(ins[15:11]);
    logic [31:0] sx  = {{16{ins[15]}}, ins[15:0]};
    logic [32:0] ea  = {1'b0, regs[rs]} + {1'b0, sx};
    int          lat = 0;
    bit          exp_hit;
    int          dest = -1;
    logic [31:0] dval;
    while (!instr_ready) @(posedge clk);
    #1 instr = ins; instr_valid = 1;
    @(posedge clk);
    #1 instr_valid = 0;
    while (!retire_valid) begin @(posedge clk); lat++; #1; end
    if (op == OP_LW || op == OP_SW) begin
      exp_hit = ref_access(ea[31:L_W], op == OP_SW);
      chk("addr", retire_addr, ea[31:0]);
      chk("index", longint'(retire_index) % M, longint'(ea[31:L_W]) % M);
      chk("hit", retire_hit, exp_hit);
      if (retire_index == '1) n_negzero++;
      if (retire_index == '0) n_poszero++;
      if (ea[32]) n_wrap++;          // ALU carry out: corrected index used
      if (int'(regs[rs][L_W-1:0]) + int'(ins[L_W-1:0]) >= LB) n_carry++;
      if (op == OP_LW) begin
        dest = rt; dval = mem_word(ea[31:0]);
        if (exp_hit) begin n_ld_hit++; chk("load hit latency", lat, 5); end
        else n_ld_miss++;
      end else begin
        shadow[ea[31:2]] = regs[rt];
        if (exp_hit) n_st_hit++; else n_st_miss++;
      end
    end else if (op == OP_LUI) begin
      dest = rt; dval = {ins[15:0], 16'h0};      chk("alu latency", lat, 2);
    end else if (op == OP_ADDIU) begin
      dest = rt; dval = ea[31:0];                chk("alu latency", lat, 2);
    end else if (op == OP_SPECIAL) begin
      dest = rd; dval = regs[rs] + regs[rt];     chk("alu latency", lat, 2);
    end
    if (dest > 0) regs[dest] = dval;
    @(posedge clk); #1;
    if (dest >= 0) begin
      dbg_reg_addr = 5'(dest); #1;
      chk($sformatf("r%0d", dest), dbg_reg_data, regs[dest]);
    end
  endtask

  task automatic li(int r, logic [31:0] v);
    logic [15:0] hi = 16'((v + 32'h8000) >> 16);
    run(i_lui(r, hi));
    run(i_addiu(r, r, v[15:0]));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int conv_misses;
    instr_valid = 0; instr = 0; dbg_reg_addr = 0;
    for (int i = 0; i < 32; i++) regs[i] = 0;
    for (int i = 0; i < M; i++) ref_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // register set-up
    li(1, 32'h1000_0000);
    li(2, 32'h0000_8000);      // stride of 2^11 lines of 16 bytes (32 KB)
    li(3, 32'hdead_beef);
    run(i_addu(4, 1, 2));
    run(i_addu(0, 1, 2));      // write to r0 is ignored

    // Strided walk: 16 lines, 32 KB apart, two passes.  In a 2048-set
    // cache they would all fall into one set; here they take 16 sets.
    conv_misses = 0;
    for (int pass = 0; pass < 2; pass++) begin
      run(i_addu(5, 1, 0));
      for (int k = 0; k < 16; k++) begin
        int hits_before;
        hits_before = n_ld_hit;
        run(i_lw(6, 16'h0004, 5));
        if (pass == 1 && n_ld_hit > hits_before) n_stride_hit++;
        conv_misses++;                       // one set, direct mapped: always a miss
        run(i_addu(5, 5, 2));
      end
    end
    $display("stride walk: one's complement hits on pass 2 = %0d of 16, conventional would miss %0d of 32",
             n_stride_hit, conv_misses);
    chk("stride pass-2 hits", n_stride_hit, 16);

    // negative displacements: the 32-bit add wraps
    li(7, 32'h0012_3450);
    run(i_sw(3, 16'hfff0, 7));                 // -16
    run(i_lw(8, 16'hfff0, 7));
    run(i_lw(9, 16'h8000, 7));                 // -32768
    run(i_lw(9, 16'h7ffc, 7));
    // offset carry: base ends in 0xc, disp 0x8
    li(10, 32'h0040_000c);
    run(i_lw(11, 16'h0008, 10));
    run(i_sw(3, 16'h0008, 10));                // store hit
    run(i_lw(11, 16'h0008, 10));
    // set 0 as -0 (line 2047) and as +0 (line 0)
    li(12, 32'h0000_7ff0);
    run(i_lw(13, 16'h0000, 12));
    run(i_lw(13, 16'h0000, 0));
    run(i_lw(13, 16'h0000, 12));
    // lines T*2^11 and T*2^11 + 2^11 - 1: same set, same EA tag field
    li(14, 32'h0050_0000);
    li(15, 32'h0050_7ff0);
    for (int r = 0; r < 3; r++) begin
      run(i_lw(16, 16'h0000, 14));
      run(i_lw(17, 16'h0000, 15));
      n_alias++;
    end
    // store miss (no allocate) then load
    li(18, 32'h0070_0000);
    run(i_sw(3, 16'h0000, 18));
    run(i_lw(19, 16'h0000, 18));

    // random mix over a pool of conflicting addresses
    li(20, 32'h0100_0000);
    for (int n = 0; n < 400; n++) begin
      int          which, base;
      logic [15:0] off;
      which = $urandom_range(3);
      off   = 16'(4 * $urandom_range(15));
      case (which)
        0: base = 1; 1: base = 4; 2: base = 20; default: base = 7;
      endcase
      if ($urandom_range(3) == 0) begin
        li(21, $urandom);
        run(i_sw(21, off, base));
      end else begin
        run(i_lw(22, off, base));
      end
    end

    $display("load_hit=%0d load_miss=%0d store_hit=%0d store_miss=%0d evictions=%0d",
             n_ld_hit, n_ld_miss, n_st_hit, n_st_miss, n_evict);
    $display("index -0=%0d +0=%0d carry_corrected=%0d offset_carries=%0d alias_rounds=%0d stride_hits=%0d",
             n_negzero, n_poszero, n_wrap, n_carry, n_alias, n_stride_hit);
    checks += 10;
    if (n_ld_hit == 0)     failures++;
    if (n_ld_miss == 0)    failures++;
    if (n_st_hit == 0)     failures++;
    if (n_st_miss == 0)    failures++;
    if (n_negzero == 0)    failures++;
    if (n_poszero == 0)    failures++;
    if (n_wrap == 0)       failures++;
    if (n_carry == 0)      failures++;
    if (n_evict == 0)      failures++;
    if (n_stride_hit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
