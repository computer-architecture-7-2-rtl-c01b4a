// tb_cache1: writes entries {valid, tag, data} and looks up addresses that
// hit, that miss on the tag, that miss on an invalid entry, and that miss
// after reset; expected results come from a model of the 32 entries.
module tb_cache1;
  logic        clk = 0, rst, we, hit;
  logic [31:0] adr, dout;
  logic [4:0]  wadr;
  logic [57:0] wd;
  logic        mv [32];
  logic [24:0] mt [32];
  logic [31:0] md [32];
  int checks = 0, failures = 0;

  cache1 dut (.clk, .rst, .adr, .hit, .dout, .wadr, .we, .wd);

  always #5 clk = ~clk;

  task automatic lookup(input logic [31:0] a);
    logic [4:0] i;
    logic       eh;
    adr = a;
    #1;
    i  = a[6:2];
    eh = mv[i] && (mt[i] == a[31:7]);
    checks++;
    if (hit !== eh) begin failures++; $display("FAIL hit adr=%h %b exp %b", a, hit, eh); end
    if (eh) begin
      checks++;
      if (dout !== md[i]) begin failures++; $display("FAIL data adr=%h %h exp %h", a, dout, md[i]); end
    end
  endtask

  int hits = 0;
  initial begin
    rst = 1; we = 0; wadr = 0; wd = 0; adr = 0;
    for (int k = 0; k < 32; k++) begin mv[k] = 0; mt[k] = 0; md[k] = 0; end
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 64; k++) lookup($urandom);       // all miss after reset
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] a;
      // write an entry
      we = 1; wadr = 5'($urandom);
      wd = {($urandom % 4) != 0, 25'($urandom % 8), 32'($urandom)};
      @(posedge clk);
      {mv[wadr], mt[wadr], md[wadr]} = wd;
      #1 we = 0;
      // look up: same index with small tags so both hits and misses occur
      a = {25'($urandom % 8), 5'($urandom), 2'($urandom)};
      lookup(a);
      if (hit) hits++;
    end
    checks++;
    if (hits < 50) begin failures++; $display("FAIL too few hits %0d", hits); end
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
