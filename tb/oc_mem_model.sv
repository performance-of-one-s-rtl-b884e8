// Behavioural model of main memory for the testbenches (not synthesizable).
//
// Accepts one request at a time on a valid/ready channel and, LATENCY cycles
// after acceptance, answers with a single resp_valid pulse.  A read returns
// the whole line that contains the (line-aligned) address; a write stores one
// 32-bit word.  Words never written read as init_word(address), a fixed
// scrambling of the address, so every location has a known, distinct value.
// Counts reads and writes for the testbench.
module oc_mem_model #(
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned LATENCY    = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [31:0]             req_wdata,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_rdata
);

  localparam int unsigned WORDS = LINE_BYTES / 4;

  logic [31:0] mem [logic [29:0]];
  int unsigned reads, writes;
  logic        busy;
  int unsigned cnt;
  logic        p_we;
  logic [31:0] p_addr, p_wdata;

  function automatic logic [31:0] init_word(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] peek(logic [31:0] a);
    if (mem.exists(a[31:2])) return mem[a[31:2]];
    return init_word({a[31:2], 2'b00});
  endfunction

  assign req_ready = !busy;

  always @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      reads      <= 0;
      writes     <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy    <= 1'b1;
        cnt     <= LATENCY;
        p_we    <= req_we;
        p_addr  <= req_addr;
        p_wdata <= req_wdata;
      end else if (busy) begin
        if (cnt > 1) begin
          cnt <= cnt - 1;
        end else begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          if (p_we) begin
            mem[p_addr[31:2]] = p_wdata;
            writes            <= writes + 1;
          end else begin
            for (int w = 0; w < WORDS; w++)
              resp_rdata[32*w +: 32] <= peek(p_addr + 32'(4*w));
            reads <= reads + 1;
          end
        end
      end
    end
  end

endmodule
