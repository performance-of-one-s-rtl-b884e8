// Self-checking testbench of oc_cache (15 sets, 2 ways, 16-byte lines, and
// a direct-mapped 31-set copy), driven with random loads and stores over a
// small address pool chosen so that lines collide in sets.
//
// Reference: a model that places line address A in set A mod (2^S - 1),
// keeps the full line address per way and replaces LRU; it predicts hit or
// miss for every access.  A shadow copy of memory predicts load data.  The
// pool includes line pairs whose low S line-address bits are 0 and 2^S - 1
// (same set, same upper bits), and the cache index is sometimes given as -0.
// Also checked: a load hit answers one clock after acceptance.
module tb_oc_cache;
  localparam int S = 4, WAYS = 2, LB = 16, M = (1 << S) - 1;
  localparam int S1 = 5, M1 = (1 << S1) - 1;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_st_hit = 0, n_st_miss = 0, n_negzero = 0, n_evict = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- 2-way instance ----------------
  logic req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [28-S:0] req_tag;
  logic [S-1:0]  req_index;
  logic [3:0]    req_offset;
  logic [31:0]   req_maddr, req_wdata, resp_rdata;
  logic mreq_valid, mreq_ready, mreq_we, mresp_valid;
  logic [31:0] mreq_addr, mreq_wdata;
  logic [127:0] mresp_rdata;

  oc_cache #(.S(S), .WAYS(WAYS), .LINE_BYTES(LB)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_tag, .req_index, .req_offset,
    .req_maddr, .req_wdata, .resp_valid, .resp_hit, .resp_rdata,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
    .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata),
    .mem_resp_valid(mresp_valid), .mem_resp_rdata(mresp_rdata));

  oc_mem_model #(.LINE_BYTES(LB), .LATENCY(3)) mem (
    .clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready), .req_we(mreq_we),
    .req_addr(mreq_addr), .req_wdata(mreq_wdata), .resp_valid(mresp_valid),
    .resp_rdata(mresp_rdata));

  // ---------------- direct-mapped instance ----------------
  logic d_valid, d_ready, d_we, d_rvalid, d_hit;
  logic [28-S1:0] d_tag;
  logic [S1-1:0]  d_index;
  logic [3:0]     d_offset;
  logic [31:0]    d_maddr, d_wdata, d_rdata;
  logic dm_valid, dm_ready, dm_we, dm_rvalid;
  logic [31:0] dm_addr, dm_wdata;
  logic [127:0] dm_rdata;

  oc_cache #(.S(S1), .WAYS(1), .LINE_BYTES(LB)) dut_dm (
    .clk, .rst_n, .req_valid(d_valid), .req_ready(d_ready), .req_we(d_we), .req_tag(d_tag),
    .req_index(d_index), .req_offset(d_offset), .req_maddr(d_maddr), .req_wdata(d_wdata),
    .resp_valid(d_rvalid), .resp_hit(d_hit), .resp_rdata(d_rdata),
    .mem_req_valid(dm_valid), .mem_req_ready(dm_ready), .mem_req_we(dm_we),
    .mem_req_addr(dm_addr), .mem_req_wdata(dm_wdata),
    .mem_resp_valid(dm_rvalid), .mem_resp_rdata(dm_rdata));

  oc_mem_model #(.LINE_BYTES(LB), .LATENCY(2)) mem_dm (
    .clk, .rst_n, .req_valid(dm_valid), .req_ready(dm_ready), .req_we(dm_we),
    .req_addr(dm_addr), .req_wdata(dm_wdata), .resp_valid(dm_rvalid),
    .resp_rdata(dm_rdata));

  // ---------------- reference model ----------------
  logic [31:0] shadow    [logic [29:0]];
  logic [31:0] shadow_dm [logic [29:0]];
  function automatic logic [31:0] mem_word(bit dm, logic [31:0] a);
    if (!dm && shadow.exists(a[31:2]))    return shadow[a[31:2]];
    if (dm && shadow_dm.exists(a[31:2])) return shadow_dm[a[31:2]];
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // per set: line addresses of the ways, most recent first
  logic [27:0] ref_line [M][WAYS];
  int          ref_cnt  [M];
  logic [27:0] ref_dm   [M1];
  bit          ref_dm_v [M1];

  function automatic bit ref_access(logic [27:0] line, bit is_store);
    int set = int'(line % 28'(M));
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

  function automatic bit ref_dm_access(logic [27:0] line, bit is_store);
    int set = int'(line % 28'(M1));
    if (ref_dm_v[set] && ref_dm[set] == line) return 1;
    if (!is_store) begin ref_dm_v[set] = 1; ref_dm[set] = line; end
    return 0;
  endfunction

  // address pool: lines that collide modulo M and modulo 2^S
  logic [27:0] pool [28];

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  task automatic access(bit dm, bit we, logic [31:0] addr, logic [31:0] wdata);
    logic [27:0] line = addr[31:4];
    bit exp_hit;
    int lat = 0;
    logic [31:0] exp_data = mem_word(dm, addr);
    if (!dm) begin
      exp_hit = ref_access(line, we);
      req_we     = we;
      req_maddr  = addr;
      req_wdata  = wdata;
      req_offset = addr[3:0];
      req_tag    = {addr[31:4+S], &addr[4+S-1:4]};
      req_index  = S'(line % 28'(M));
      if (req_index == 0 && $urandom_range(1)) begin req_index = '1; n_negzero++; end
      req_valid  = 1;
      @(posedge clk); while (!req_ready) @(posedge clk);
      #1 req_valid = 0;
      while (!resp_valid) begin @(posedge clk); lat++; #1; end
      chk("hit", resp_hit, exp_hit);
      if (!we) chk("rdata", resp_rdata, exp_data);
      if (!we && exp_hit) chk("hit latency", lat, 1);
      if (!we) begin if (exp_hit) n_hit++; else n_miss++; end
      else begin if (exp_hit) n_st_hit++; else n_st_miss++; end
    end else begin
      exp_hit = ref_dm_access(line, we);
      d_we = we; d_maddr = addr; d_wdata = wdata; d_offset = addr[3:0];
      d_tag = {addr[31:4+S1], &addr[4+S1-1:4]};
      d_index = S1'(line % 28'(M1));
      if (d_index == 0 && $urandom_range(1)) d_index = '1;
      d_valid = 1;
      @(posedge clk); while (!d_ready) @(posedge clk);
      #1 d_valid = 0;
      while (!d_rvalid) begin @(posedge clk); #1; end
      chk("dm hit", d_hit, exp_hit);
      if (!we) chk("dm rdata", d_rdata, exp_data);
    end
    if (we && !dm) shadow[addr[31:2]] = wdata;
    if (we && dm)  shadow_dm[addr[31:2]] = wdata;
    @(posedge clk); #1;
  endtask

  initial begin
    req_valid = 0; d_valid = 0;
    for (int i = 0; i < M; i++) ref_cnt[i] = 0;
    for (int i = 0; i < M1; i++) ref_dm_v[i] = 0;
    // pool: stride 2^S lines (all one set in a 2^S-set cache), stride M lines
    // (all one set here), and pairs with low S line bits 0 / 2^S - 1.
    for (int i = 0; i < 8; i++)  pool[i]      = 28'(32'h100 + i * (1 << S));
    for (int i = 0; i < 8; i++)  pool[8 + i]  = 28'(32'h300 + i * M);
    for (int i = 0; i < 4; i++) begin
      pool[16 + 2*i]     = 28'((32'h40 + i) << S);
      pool[16 + 2*i + 1] = 28'(((32'h40 + i) << S) | ((1 << S) - 1));
    end
    // lines whose set is 0 (index may be presented as -0)
    pool[24] = 28'(M * 64);  pool[25] = 28'(M * 80);
    pool[26] = 28'(M1 * 40); pool[27] = 28'(M1 * 50);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      bit st;
      a  = {pool[$urandom_range(27)], 4'(4 * $urandom_range(3))};
      st = ($urandom_range(3) == 0);
      // fold the pool into the direct-mapped cache's geometry too
      access(n % 2 == 1, st, a, $urandom);
    end
    $display("load_hit=%0d load_miss=%0d store_hit=%0d store_miss=%0d neg_zero=%0d evict=%0d",
             n_hit, n_miss, n_st_hit, n_st_miss, n_negzero, n_evict);
    checks += 6;
    if (n_hit == 0) failures++;
    if (n_miss == 0) failures++;
    if (n_st_hit == 0) failures++;
    if (n_st_miss == 0) failures++;
    if (n_negzero == 0) failures++;
    if (n_evict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
