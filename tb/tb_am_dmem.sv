// tb_am_dmem: random word writes and reads against a model array; a read
// returns the stored word in the same cycle, a write takes effect at the
// clock edge.
module tb_am_dmem;
  logic        clk = 0, we;
  logic [31:0] adr, wd, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  am_dmem dut (.clk, .adr, .we, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    we = 0; adr = 0; wd = 0;
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
      #1;
      checks++;
      if (rd !== model[a]) begin failures++; $display("FAIL adr=%h rd=%h exp %h", adr, rd, model[a]); end
      @(posedge clk);
      if (we) model[a] = wd;
      #1;
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
