// Self-checking testbench of oc_alu: random operands for ADD (sum and
// carry out, checked against 33-bit integer addition) and PASSB.
module tb_oc_alu;
  import oc_pkg::*;
  int checks = 0, failures = 0, n_cout = 0;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic cout;

  oc_alu dut (.op, .a, .b, .y, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] s;
    for (int n = 0; n < 10000; n++) begin
      a = $urandom; b = $urandom;
      op = (n % 5 == 4) ? ALU_PASSB : ALU_ADD;
      #1;
      s = {1'b0, a} + {1'b0, b};
      checks++;
      if (op == ALU_ADD) begin
        if ({cout, y} !== s) begin failures++; $display("FAIL add %h+%h -> %b %h", a, b, cout, y); end
        if (cout) n_cout++;
      end else if (y !== b || cout !== 1'b0) begin
        failures++; $display("FAIL passb %h -> %h", b, y);
      end
    end
    checks++;
    if (n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
