// tb_sa_cache: runs the cache lookup array in the four organizations the
// design supports (direct-mapped 1K x 1 word, direct-mapped 256 x 4 words,
// 2-way and 4-way with 256 sets) against testbench models.
module tb_sa_cache;
  logic clk = 0;
  logic done [4];
  int   c [4], f [4], h [4];
  int   checks, failures;

  always #5 clk = ~clk;

  tb_sa_cache_cfg #(.WAYS(1), .INDEX_BITS(10), .OFF_BITS(0)) t0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .hits(h[0]));
  tb_sa_cache_cfg #(.WAYS(1), .INDEX_BITS(8),  .OFF_BITS(2)) t1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .hits(h[1]));
  tb_sa_cache_cfg #(.WAYS(2), .INDEX_BITS(8),  .OFF_BITS(0)) t2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .hits(h[2]));
  tb_sa_cache_cfg #(.WAYS(4), .INDEX_BITS(8),  .OFF_BITS(0)) t3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .hits(h[3]));

  initial begin
    checks = 0; failures = 0;
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int k = 0; k < 4; k++) begin
      checks += c[k] + 1;
      failures += f[k];
      $display("config %0d: checks=%0d failures=%0d hits=%0d", k, c[k], f[k], h[k]);
      if (h[k] < 50) begin failures++; $display("FAIL config %0d: too few hits", k); end
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
