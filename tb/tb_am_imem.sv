// tb_am_imem: loads random words, then reads them back at their byte
// addresses; the word must appear in the same cycle (asynchronous read).
module tb_am_imem;
  logic        clk = 0, ld_we;
  logic [9:0]  ld_addr;
  logic [31:0] ld_data, pc, insn;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  am_imem dut (.clk, .pc, .insn, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    ld_we = 0; ld_addr = 0; ld_data = 0; pc = 0;
    for (int a = 0; a < 1024; a++) begin
      model[a] = $urandom;
      ld_we = 1; ld_addr = 10'(a); ld_data = model[a];
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a  = int'($urandom % 1024);
      pc = {20'(n), 10'(a), 2'b00};   // upper bits wrap
      #1;
      checks++;
      if (insn !== model[a]) begin failures++; $display("FAIL pc=%h insn=%h exp %h", pc, insn, model[a]); end
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
