// tb_rf2: random writes and reads against a model register array kept in
// the testbench; register 0 must read zero and a write is seen in the same cycle through the bypass.
module tb_rf2;
  logic        clk = 0, rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  localparam bit BYPASS = 1;

  rf2 dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .wa, .we, .wd);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 32'd0;
    if (BYPASS && we && a == wa) return wd;
    return model[a];
  endfunction

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    for (int k = 0; k < 32; k++) model[k] = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      we  = ($urandom % 3) != 0;
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (n % 5 == 0) ? wa : 5'($urandom);
      ra2 = (n % 7 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin failures++; $display("FAIL rd1 r%0d=%h", ra1, rd1); end
      if (rd2 !== expect_rd(ra2)) begin failures++; $display("FAIL rd2 r%0d=%h", ra2, rd2); end
      @(posedge clk);
      if (we) model[wa] = wd;
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
