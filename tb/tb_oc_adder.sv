// Self-checking testbench of oc_adder: exhaustive for S = 5, random for the
// default S = 11.  The expected value is (a + b) mod (2^S - 1), computed with
// integer arithmetic; the adder result is compared modulo 2^S - 1 (so -0 and
// +0 are equal).  The count of -0 results checks that the end-around carry
// case with an all-ones sum occurs.
module tb_oc_adder;
  int checks = 0, failures = 0, neg_zero = 0;

  logic [4:0]  a5, b5, s5;
  logic [10:0] a11, b11, s11;

  oc_adder #(.S(5)) u5  (.a(a5),  .b(b5),  .sum(s5));
  oc_adder          u11 (.a(a11), .b(b11), .sum(s11));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        checks++;
        if (int'(s5) % 31 != (i + j) % 31) begin
          failures++;
          $display("FAIL S=5 a=%0d b=%0d sum=%0d", i, j, s5);
        end
        if (s5 == 5'h1f) neg_zero++;
      end
    for (int n = 0; n < 20000; n++) begin
      a11 = 11'($urandom); b11 = 11'($urandom);
      if (n < 4) begin a11 = 11'h7ff; b11 = 11'(n); end
      #1;
      checks++;
      if (int'(s11) % 2047 != (int'(a11) + int'(b11)) % 2047) begin
        failures++;
        $display("FAIL S=11 a=%0d b=%0d sum=%0d", a11, b11, s11);
      end
    end
    checks++;
    if (neg_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
