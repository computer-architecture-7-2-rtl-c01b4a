// tb_sm_imem: loads random words, then presents byte addresses; each word
// must appear on insn one clock after its address (synchronous read), and
// reset must load the nop.
module tb_sm_imem;
  logic        clk = 0, rst = 1, ld_we;
  logic [9:0]  ld_addr;
  logic [31:0] ld_data, pc, insn;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  sm_imem dut (.clk, .rst, .pc, .insn, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    int prev;
    ld_we = 0; ld_addr = 0; ld_data = 0; pc = 0;
    @(posedge clk); #1;
    checks++;
    if (insn !== 32'h13) begin failures++; $display("FAIL reset value %h", insn); end
    rst = 0;
    for (int a = 0; a < 1024; a++) begin
      model[a] = $urandom;
      ld_we = 1; ld_addr = 10'(a); ld_data = model[a];
      @(posedge clk); #1;
    end
    ld_we = 0;
    prev = -1;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a  = int'($urandom % 1024);
      pc = {20'(n), 10'(a), 2'b00};
      #1;
      if (prev >= 0) begin
        checks++;
        if (insn !== model[prev]) begin failures++; $display("FAIL insn=%h exp %h", insn, model[prev]); end
      end
      @(posedge clk); #1;
      prev = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
