// tb_proc5s: the single-cycle processor against the reference model.
// A directed program and random programs are run; the sequence of register
// writes must equal the reference model's, and every instruction must take
// exactly one cycle (the end marker of the four-instruction example is
// written in the fourth cycle).
module tb_proc5s;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  logic        clk = 0, rst = 1, ld_we = 0, halt, rf_we;
  logic [9:0]  ld_addr = 0;
  logic [31:0] ld_data = 0, pc, rf_wd;
  logic [4:0]  rf_wa;
  int checks = 0, failures = 0, n_taken = 0;
  bit run = 0;
  wr_t got [$];
  logic [31:0] last_pc;

  proc5s dut (.clk, .rst, .ld_we, .ld_addr, .ld_data, .halt, .pc, .rf_we, .rf_wa, .rf_wd);

  always #5 clk = ~clk;

  always @(negedge clk) if (run && !rst) begin
    if (rf_we && rf_wa != 0) got.push_back('{wa: rf_wa, wd: rf_wd});
  end
  always @(posedge clk) if (run && !rst) begin
    last_pc = pc;
    #1 if (pc != last_pc + 4) n_taken++;
  end

  task automatic load(input logic [31:0] p[$]);
    rst = 1; run = 0;
    for (int a = 0; a < 1024; a++) begin
      ld_we = 1; ld_addr = 10'(a); ld_data = (a < p.size()) ? p[a] : NOP;
      @(posedge clk); #1;
    end
    ld_we = 0;
    @(posedge clk); #1;
  endtask

  task automatic run_and_compare(input string name, input logic [31:0] p[$], output int cyc);
    wr_t exp [$];
    iss_run(p, exp);
    load(p);
    got = {};
    rst = 0; run = 1;
    cyc = 1;
    while (!halt && cyc < 20000) begin @(posedge clk); #1 cyc++; end
    @(negedge clk);
    @(posedge clk); #1;
    run = 0;
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("FAIL %s: %0d writes, expected %0d", name, got.size(), exp.size());
    end
    for (int k = 0; k < exp.size() && k < got.size(); k++) begin
      checks++;
      if (got[k] !== exp[k]) begin
        failures++;
        $display("FAIL %s write %0d: x%0d=%h expected x%0d=%h", name, k,
                 got[k].wa, got[k].wd, exp[k].wa, exp[k].wd);
      end
    end
  endtask

  initial begin
    logic [31:0] p [$];
    int cyc;
    p = {enc_addi(1, 0, 3), enc_add(2, 1, 1), enc_addi(10, 2, 5), enc_addi(30, 10, 0)};
    run_and_compare("example", p, cyc);
    checks++;
    if (cyc != 4) begin failures++; $display("FAIL example ended in cycle %0d", cyc); end
    prog_directed(p);
    run_and_compare("directed", p, cyc);
    for (int r = 0; r < 20; r++) begin
      prog_random(p, 60);
      run_and_compare($sformatf("random%0d", r), p, cyc);
    end
    checks++;
    if (n_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
