// tb_sm_dmem: random word writes and reads against a model array; the word
// at an address appears on rd one clock after the address, with the value
// it held before a write in that same cycle.
module tb_sm_dmem;
  logic        clk = 0, rst = 1, we;
  logic [31:0] adr, wd, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  sm_dmem dut (.clk, .rst, .adr, .we, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    logic [31:0] expv;
    we = 0; adr = 0; wd = 0;
    @(posedge clk); #1;
    checks++;
    if (rd !== 0) begin failures++; $display("FAIL reset value %h", rd); end
    rst = 0;
    for (int a = 0; a < 64; a++) begin
      model[a] = $urandom;
      we = 1; adr = 32'(a * 4); wd = model[a];
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      a   = int'($urandom % 64);
      we  = ($urandom % 2) == 1;
      adr = 32'(a * 4);
      wd  = $urandom;
      expv = model[a];
      @(posedge clk);
      if (we) model[a] = wd;
      #1;
      checks++;
      if (rd !== expv) begin failures++; $display("FAIL adr=%h rd=%h exp %h", adr, rd, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
