// tb_mem_org: the four memory organizations and their miss penalties:
// one-word-wide with a one-word block (27 cycles), one-word-wide with a
// four-word block (102), page-mode DRAM (51) and four interleaved banks (30).
module tb_mem_org;
  import mem_pkg::*;
  logic clk = 0;
  logic done [4];
  int   c [4], f [4], p [4];
  int   checks, failures;
  localparam int EXP [4] = '{27, 102, 51, 30};

  always #5 clk = ~clk;

  tb_mem_org_cfg #(.ORG(ORG_ONE_WORD),    .BLOCK_WORDS(1), .PENALTY(27))  t0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .penalty_seen(p[0]));
  tb_mem_org_cfg #(.ORG(ORG_ONE_WORD),    .BLOCK_WORDS(4), .PENALTY(102)) t1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .penalty_seen(p[1]));
  tb_mem_org_cfg #(.ORG(ORG_PAGE_MODE),   .BLOCK_WORDS(4), .PENALTY(51))  t2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .penalty_seen(p[2]));
  tb_mem_org_cfg #(.ORG(ORG_INTERLEAVED), .BLOCK_WORDS(4), .PENALTY(30))  t3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .penalty_seen(p[3]));

  initial begin
    checks = 0; failures = 0;
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int k = 0; k < 4; k++) begin
      checks += c[k];
      failures += f[k];
      $display("organization %0d: miss penalty %0d cycles (expected %0d), %0d bytes per 100 cycles",
               k, p[k], EXP[k], (k == 0 ? 4 : 16) * 100 / p[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
