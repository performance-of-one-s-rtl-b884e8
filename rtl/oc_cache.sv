// One's complement data cache.
//
// A WAYS-way set-associative cache with 2^S - 1 sets (an odd number) instead
// of 2^S.  It is addressed by a cache address {tag, index, offset} whose
// index is the line address modulo 2^S - 1, computed outside (oc_index_gen),
// and it receives the ordinary memory address alongside, which it uses only
// to fetch a line from main memory on a miss and to write a store through.
// Apart from the set decoder, which maps both one's complement zeros (all
// zeros and all ones) onto set 0, lookup is that of a conventional
// set-associative cache: tag memory, data memory and a tag comparator per
// way.
//
// Interface and timing (all signals on clk, active-low synchronous reset):
//   * CPU side: a request is taken when req_valid && req_ready (ready only
//     in IDLE).  The following cycle looks the line up; a load hit raises
//     resp_valid at the end of it, one clock after acceptance.  A load
//     miss requests the whole line (line-aligned mem_req_addr), writes it
//     into the victim way when mem_resp_valid arrives and answers the cycle
//     after.  A store updates the line on a hit, never allocates on a miss,
//     and is always written through to memory; it answers after the memory
//     acknowledges the write.  resp_hit tells whether the access hit.
//   * Memory side: valid/ready request channel (address, write enable,
//     one data word), then one mem_resp_valid pulse carrying the full line
//     for a read, or acknowledging a write.
//
// Replacement is least recently used, per set, with an age rank per way;
// an invalid way is filled first.  Write-through, no write allocate, LRU
// and the handshakes are this design's own choices; the set count 2^S - 1,
// the treatment of the two zeros and the use of the memory address for the
// refill follow the one's complement cache organisation.
module oc_cache #(
  parameter int unsigned ADDR_W     = oc_pkg::ADDR_W,
  parameter int unsigned S          = oc_pkg::DEF_S,
  parameter int unsigned WAYS       = oc_pkg::DEF_WAYS,
  parameter int unsigned LINE_BYTES = oc_pkg::DEF_LINE_BYTES,
  localparam int unsigned L_W       = $clog2(LINE_BYTES),
  localparam int unsigned TAGX_W    = ADDR_W - L_W - S + 1,
  localparam int unsigned LINE_BITS = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // CPU side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [TAGX_W-1:0]     req_tag,
  input  logic [S-1:0]          req_index,
  input  logic [L_W-1:0]        req_offset,
  input  logic [ADDR_W-1:0]     req_maddr,
  input  logic [31:0]           req_wdata,
  output logic                  resp_valid,
  output logic                  resp_hit,
  output logic [31:0]           resp_rdata,
  // main memory side
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [31:0]           mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LINE_BITS-1:0]  mem_resp_rdata
);

  localparam int unsigned NSETS  = (1 << S) - 1;
  localparam int unsigned WORDS  = LINE_BYTES / 4;
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned AGE_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned SET_W  = S;

  typedef enum logic [2:0] {
    ST_IDLE, ST_LOOKUP, ST_FILL_REQ, ST_FILL_WAIT, ST_WR_REQ, ST_WR_WAIT
  } state_e;

  state_e state_q;

  // Arrays: tag memory, data memory, valid bits, LRU ranks.
  logic [TAGX_W-1:0]    tag_mem  [WAYS][NSETS];
  logic [LINE_BITS-1:0] data_mem [WAYS][NSETS];
  logic [NSETS-1:0]     valid_q  [WAYS];
  logic [AGE_W-1:0]     age_q    [WAYS][NSETS];

  // Registered request.
  logic              r_we;
  logic [TAGX_W-1:0] r_tag;
  logic [SET_W-1:0]  r_set;
  logic [L_W-1:0]    r_offset;
  logic [ADDR_W-1:0] r_maddr;
  logic [31:0]       r_wdata;
  logic              r_hit;
  logic [WAY_W-1:0]  r_way;

  // Set decoder: +0 and -0 are one set.
  logic [SET_W-1:0] req_set;
  assign req_set = (&req_index) ? '0 : req_index;

  // Matching logic.
  logic [WAYS-1:0]  hit_vec;
  logic             hit_any;
  logic [WAY_W-1:0] hit_way, victim_way;
  logic [WSEL_W-1:0] wsel;

  always_comb begin
    hit_vec = '0;
    for (int w = 0; w < WAYS; w++)
      hit_vec[w] = valid_q[w][r_set] && (tag_mem[w][r_set] == r_tag);
    hit_any = |hit_vec;
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (hit_vec[w]) hit_way = WAY_W'(w);
  end

  // Victim choice: an invalid way if any, else the least recently used.
  always_comb begin
    logic found;
    victim_way = '0;
    found      = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (!found && age_q[w][r_set] == AGE_W'(WAYS - 1)) victim_way = WAY_W'(w);
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[w][r_set]) begin
        victim_way = WAY_W'(w);
        found      = 1'b1;
      end
  end

  if (WORDS > 1) begin : g_wsel
    assign wsel = r_offset[L_W-1:2];
  end else begin : g_wsel1
    assign wsel = '0;
  end

  function automatic logic [31:0] word_of(logic [LINE_BITS-1:0] line, logic [WSEL_W-1:0] sel);
    return line[32*sel +: 32];
  endfunction

  function automatic logic [LINE_BITS-1:0] merge_word(logic [LINE_BITS-1:0] line,
                                                      logic [WSEL_W-1:0] sel,
                                                      logic [31:0] word);
    logic [LINE_BITS-1:0] l;
    l = line;
    l[32*sel +: 32] = word;
    return l;
  endfunction

  // Age update: the touched way becomes 0, younger ways grow by one.
  task automatic touch(input logic [WAY_W-1:0] t);
    logic [AGE_W-1:0] ref_age;
    ref_age = age_q[t][r_set];
    for (int w = 0; w < WAYS; w++)
      if (WAY_W'(w) == t)               age_q[w][r_set] <= '0;
      else if (age_q[w][r_set] < ref_age) age_q[w][r_set] <= age_q[w][r_set] + 1'b1;
  endtask

  // Control, valid bits and LRU ranks.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      resp_valid <= 1'b0;
      resp_hit   <= 1'b0;
      resp_rdata <= '0;
      r_we       <= 1'b0;
      r_tag      <= '0;
      r_set      <= '0;
      r_offset   <= '0;
      r_maddr    <= '0;
      r_wdata    <= '0;
      r_hit      <= 1'b0;
      r_way      <= '0;
      for (int w = 0; w < WAYS; w++) begin
        valid_q[w] <= '0;
        for (int i = 0; i < NSETS; i++) age_q[w][i] <= AGE_W'(w);
      end
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (req_valid) begin
          r_we     <= req_we;
          r_tag    <= req_tag;
          r_set    <= req_set;
          r_offset <= req_offset;
          r_maddr  <= req_maddr;
          r_wdata  <= req_wdata;
          state_q  <= ST_LOOKUP;
        end
        ST_LOOKUP: begin
          r_hit <= hit_any;
          r_way <= hit_any ? hit_way : victim_way;
          if (hit_any) touch(hit_way);
          if (r_we) begin
            state_q <= ST_WR_REQ;
          end else if (hit_any) begin
            resp_valid <= 1'b1;
            resp_hit   <= 1'b1;
            resp_rdata <= word_of(data_mem[hit_way][r_set], wsel);
            state_q    <= ST_IDLE;
          end else begin
            state_q <= ST_FILL_REQ;
          end
        end
        ST_FILL_REQ: if (mem_req_ready) state_q <= ST_FILL_WAIT;
        ST_FILL_WAIT: if (mem_resp_valid) begin
          valid_q[r_way][r_set] <= 1'b1;
          touch(r_way);
          resp_valid <= 1'b1;
          resp_hit   <= 1'b0;
          resp_rdata <= word_of(mem_resp_rdata, wsel);
          state_q    <= ST_IDLE;
        end
        ST_WR_REQ: if (mem_req_ready) state_q <= ST_WR_WAIT;
        ST_WR_WAIT: if (mem_resp_valid) begin
          resp_valid <= 1'b1;
          resp_hit   <= r_hit;
          resp_rdata <= '0;
          state_q    <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // Tag and data memories (no reset; guarded by the valid bits).
  always_ff @(posedge clk) begin
    for (int w = 0; w < WAYS; w++) begin
      if (state_q == ST_FILL_WAIT && mem_resp_valid && r_way == WAY_W'(w)) begin
        tag_mem[w][r_set]  <= r_tag;
        data_mem[w][r_set] <= mem_resp_rdata;
      end else if (state_q == ST_LOOKUP && r_we && hit_vec[w]) begin
        data_mem[w][r_set] <= merge_word(data_mem[w][r_set], wsel, r_wdata);
      end
    end
  end

  assign req_ready     = (state_q == ST_IDLE);
  assign mem_req_valid = (state_q == ST_FILL_REQ) || (state_q == ST_WR_REQ);
  assign mem_req_we    = (state_q == ST_WR_REQ);
  assign mem_req_addr  = (state_q == ST_WR_REQ) ? {r_maddr[ADDR_W-1:2], 2'b00}
                                                : {r_maddr[ADDR_W-1:L_W], {L_W{1'b0}}};
  assign mem_req_wdata = r_wdata;

  // Handshake rules.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr) && $stable(mem_req_we));
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> (state_q == ST_FILL_WAIT || state_q == ST_WR_WAIT));
  a_set_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(r_set) < NSETS);

endmodule
