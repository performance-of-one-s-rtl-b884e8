// Self-checking testbench of oc_fold: the residue of random values, and of
// the edge values 0, all ones and multiples of 2^S - 1, is compared with
// value % (2^S - 1) computed with 64-bit integer arithmetic, for the
// default (28-bit value, S = 11) and for a 20-bit value with S = 4.
module tb_oc_fold;
  int checks = 0, failures = 0;

  logic [27:0] v28; logic [10:0] r11;
  logic [19:0] v20; logic [3:0]  r4;

  oc_fold                   u_a (.value(v28), .residue(r11));
  oc_fold #(.W(20), .S(4))  u_b (.value(v20), .residue(r4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      v28 = 28'($urandom); v20 = 20'($urandom);
      if (n == 0) begin v28 = '0;  v20 = '0;  end
      if (n == 1) begin v28 = '1;  v20 = '1;  end
      if (n == 2) begin v28 = 28'(2047 * 1000); v20 = 20'(15 * 999); end
      if (n == 3) begin v28 = 28'(2047 * 131071); v20 = 20'(15 * 69905); end
      #1;
      checks += 2;
      if (longint'(r11) % 2047 != longint'(v28) % 2047) begin
        failures++; $display("FAIL W=28 v=%h r=%h", v28, r11);
      end
      if (int'(r4) % 15 != int'(v20) % 15) begin
        failures++; $display("FAIL W=20 v=%h r=%h", v20, r4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
