// Row-walk workload: the eight-line cache example of a matrix row accessed
// in a column-major matrix whose column length (2 lines) is even.
//
// A conventional eight-line cache (8 sets direct-mapped, or 4 sets of 2
// ways) can hold at most four lines of such a row.  The one's complement
// versions have 7 sets direct-mapped (S = 3) or 3 sets of 2 ways (S = 2),
// hold the whole row (7 or 6 elements) and therefore miss only on the first
// pass.  The testbench checks every access against a reference model, that
// the one's complement misses equal the row length (compulsory only) and
// that they are fewer than the conventional organisation's.
module tb_oc_row_walk;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int ch_a, ch_b, f_a, f_b, m_a, m_b, cm_a, cm_b;

  oc_row_walk_run #(.S(3), .WAYS(1), .ROW(7), .COL(2), .PASSES(4)) run_dm (
    .clk, .start, .done(done_a), .checks(ch_a), .failures(f_a), .misses(m_a), .conv_misses(cm_a));
  oc_row_walk_run #(.S(2), .WAYS(2), .ROW(6), .COL(2), .PASSES(4)) run_2w (
    .clk, .start, .done(done_b), .checks(ch_b), .failures(f_b), .misses(m_b), .conv_misses(cm_b));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", ch_a + ch_b, f_a + f_b + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    #20 start = 1;
    wait (done_a && done_b);
    checks = ch_a + ch_b + 4;
    failures = f_a + f_b;
    $display("direct-mapped: one's complement (7 sets) misses %0d of 28, conventional (8 sets) %0d", m_a, cm_a);
    $display("2-way:         one's complement (3 sets) misses %0d of 24, conventional (4 sets) %0d", m_b, cm_b);
    if (m_a != 7)     failures++;
    if (m_b != 6)     failures++;
    if (m_a >= cm_a)  failures++;
    if (m_b >= cm_b)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
