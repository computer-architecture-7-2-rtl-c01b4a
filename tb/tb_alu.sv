// tb_alu: random and corner operands; sum and the bne-taken flag are
// compared with values computed in the testbench.
module tb_alu;
  logic [31:0] in1, in2, sum;
  logic        tkn;
  int checks = 0, failures = 0;

  alu dut (.in1, .in2, .sum, .tkn);

  task automatic check(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] exp_sum;
    in1 = a; in2 = b;
    #1;
    exp_sum = 32'(64'(a) + 64'(b));
    checks += 2;
    if (sum !== exp_sum) begin failures++; $display("FAIL sum %h+%h=%h", a, b, sum); end
    if (tkn !== (a != b)) begin failures++; $display("FAIL tkn %h %h", a, b); end
  endtask

  initial begin
    check(0, 0);
    check(32'hffff_ffff, 1);
    check(32'h8000_0000, 32'h8000_0000);
    check(3, 3);
    check(3, 5);
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a;
      a = $urandom;
      check(a, (n % 4 == 0) ? a : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
