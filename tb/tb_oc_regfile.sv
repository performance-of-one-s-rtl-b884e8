// Self-checking testbench of oc_regfile: random writes and reads on all
// three read ports against an array model; register 0 must stay zero and
// all registers must read zero after reset.
module tb_oc_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic        we;
  logic [31:0] model [32];

  oc_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .ra3, .rd3, .we, .wa, .wd);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL got=%h exp=%h", got, exp); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin ra3 = 5'(i); #1; chk(rd3, 32'h0); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = (n % 7 == 0) ? 5'd0 : 5'($urandom);
      #1;
      chk(rd1, model[ra1]); chk(rd2, model[ra2]); chk(rd3, model[ra3]);
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
