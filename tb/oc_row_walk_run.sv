// One run of the row-walk workload, used by tb_oc_row_walk.
//
// Builds an oc_cpu_top with 2^S - 1 sets of WAYS lines and walks along a row
// of a column-major matrix: ROW elements whose line addresses are COL lines
// apart (COL even), PASSES times, with LW instructions.  Every access's hit
// or miss is compared with a reference cache of 2^S - 1 sets (full line
// addresses, LRU); the same walk is also replayed on a reference cache of
// 2^S sets, the conventional organisation, whose miss count is reported in
// conv_misses for comparison.
module oc_row_walk_run #(
  parameter int S      = 3,
  parameter int WAYS   = 1,
  parameter int ROW    = 7,
  parameter int COL    = 2,
  parameter int PASSES = 4
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   misses,
  output int   conv_misses
);
  import oc_pkg::*;
  localparam int LB = 16;

  logic rst_n;
  logic instr_valid, instr_ready, retire_valid, retire_mem, retire_hit;
  logic [31:0] instr, retire_addr, dbg_reg_data;
  logic [S-1:0] retire_index;
  logic mreq_valid, mreq_ready, mreq_we, mresp_valid;
  logic [31:0] mreq_addr, mreq_wdata;
  logic [LB*8-1:0] mresp_rdata;

  oc_cpu_top #(.S(S), .WAYS(WAYS), .LINE_BYTES(LB)) dut (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr,
    .retire_valid, .retire_mem, .retire_hit, .retire_index, .retire_addr,
    .dbg_reg_addr(5'd0), .dbg_reg_data,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
    .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata),
    .mem_resp_valid(mresp_valid), .mem_resp_rdata(mresp_rdata));

  oc_mem_model #(.LINE_BYTES(LB), .LATENCY(4)) mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req_we(mreq_we),
    .req_addr(mreq_addr), .req_wdata(mreq_wdata), .resp_valid(mresp_valid),
    .resp_rdata(mresp_rdata));

  // LRU reference caches: [0] has 2^S - 1 sets, [1] has 2^S sets.
  longint lines [2][1 << S][WAYS];
  int     cnt   [2][1 << S];

  task automatic ref_access(int k, longint line);
    int nsets = (k == 0) ? (1 << S) - 1 : (1 << S);
    int set = int'(line % nsets);
    int pos = -1;
    for (int i = 0; i < cnt[k][set]; i++) if (lines[k][set][i] == line) pos = i;
    if (pos < 0) begin
      if (cnt[k][set] < WAYS) cnt[k][set]++;
      pos = cnt[k][set] - 1;
    end
    for (int i = pos; i > 0; i--) lines[k][set][i] = lines[k][set][i-1];
    lines[k][set][0] = line;
  endtask

  function automatic bit ref_lookup(int k, longint line);
    int nsets = (k == 0) ? (1 << S) - 1 : (1 << S);
    int set = int'(line % nsets);
    for (int i = 0; i < cnt[k][set]; i++) if (lines[k][set][i] == line) return 1;
    return 0;
  endfunction

  task automatic run(logic [31:0] ins, output bit hit);
    while (!instr_ready) @(posedge clk);
    #1 instr = ins; instr_valid = 1;
    @(posedge clk);
    #1 instr_valid = 0;
    while (!retire_valid) begin @(posedge clk); #1; end
    hit = retire_hit;
    @(posedge clk); #1;
  endtask

  initial begin
    bit h, exp_hit;
    logic [31:0] base = 32'h0002_0000;
    done = 0; checks = 0; failures = 0; misses = 0; conv_misses = 0;
    instr_valid = 0; instr = 0; rst_n = 0;
    for (int k = 0; k < 2; k++) for (int i = 0; i < (1 << S); i++) cnt[k][i] = 0;
    wait (start);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run({OP_LUI, 5'd0, 5'd1, base[31:16]}, h);                  // r1 = base
    run({OP_ADDIU, 5'd0, 5'd2, 16'(COL * LB)}, h);              // r2 = column length in bytes
    for (int p = 0; p < PASSES; p++) begin
      run({OP_SPECIAL, 5'd1, 5'd0, 5'd3, 5'd0, FN_ADDU}, h);       // r3 = r1
      for (int e = 0; e < ROW; e++) begin
        longint line;
        line = longint'(base >> 4) + longint'(e * COL);
        exp_hit = ref_lookup(0, line);
        if (!ref_lookup(1, line)) conv_misses++;
        ref_access(0, line);
        ref_access(1, line);
        run({OP_LW, 5'd3, 5'd4, 16'h0000}, h);                  // lw r4, 0(r3)
        checks++;
        if (h != exp_hit) begin
          failures++;
          $display("FAIL S=%0d WAYS=%0d pass %0d element %0d hit=%0b expected %0b", S, WAYS, p, e, h, exp_hit);
        end
        if (!h) misses++;
        run({OP_SPECIAL, 5'd3, 5'd2, 5'd3, 5'd0, FN_ADDU}, h);     // r3 += column
      end
    end
    done = 1;
  end
endmodule
