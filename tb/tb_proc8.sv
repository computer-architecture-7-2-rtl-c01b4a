// tb_proc8: the pipelined processor against the reference model.
//
// 1. The four-instruction example (addi x1,x0,3; add x2,x1,x1;
//    addi x10,x2,5; addi x30,x10,0): the fetch pc, the pcs held in P1..P3
//    and the ALU operands and result are checked cycle by cycle for the
//    first seven cycles after reset, and the end marker must be written in
//    cycle 7 (one instruction per cycle, four stages).
// 2. A directed program and random programs: the sequence of register
//    writes must equal the reference model's. Forwarding of each operand,
//    forwarding of a loaded word, the register-file bypass and branch
//    squashes are counted and must all occur.
// 3. A second instance built with synchronous-read memories (SYNC_MEM)
//    runs alongside; its trace and halt flag must match every cycle.
module tb_proc8;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  logic        clk = 0, rst = 1, ld_we = 0, halt;
  logic [9:0]  ld_addr = 0;
  logic [31:0] ld_data = 0;
  p8_trace_t   trace;
  int checks = 0, failures = 0;
  int n_miss = 0, n_fwd1 = 0, n_fwd2 = 0, n_fwd3 = 0, n_fwd_ld = 0, n_byp = 0;
  int n_cycles = 0, n_writes = 0;
  bit run = 0;
  wr_t got [$];

  proc8 dut (.clk, .rst, .ld_we, .ld_addr, .ld_data, .halt, .trace);

  // the same processor built with synchronous-read memories must behave
  // identically, cycle by cycle
  logic      halt_sm;
  p8_trace_t trace_sm;
  int        n_sm_cmp = 0, n_sm_diff = 0;
  proc8 #(.SYNC_MEM(1'b1)) dut_sm (.clk, .rst, .ld_we, .ld_addr, .ld_data, .halt(halt_sm), .trace(trace_sm));

  always @(negedge clk) if (!rst) begin
    n_sm_cmp++;
    if (trace_sm !== trace || halt_sm !== halt) begin
      n_sm_diff++;
      if (n_sm_diff < 5) $display("FAIL synchronous-memory build differs at %0t", $time);
    end
  end

  always #5 clk = ~clk;

  always @(negedge clk) if (run && !rst) begin
    n_cycles++;
    if (trace.rf_we && trace.rf_wa != 0) got.push_back('{wa: trace.rf_wa, wd: trace.rf_wd});
    n_miss   += int'(trace.miss);
    n_fwd1   += int'(trace.fwd1);
    n_fwd2   += int'(trace.fwd2);
    n_fwd3   += int'(trace.fwd3);
    n_fwd_ld += int'(trace.fwd_ld);
    n_byp    += int'(trace.rf_bypass);
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

  task automatic run_and_compare(input string name, input logic [31:0] p[$]);
    wr_t exp [$];
    int  cyc = 0;
    iss_run(p, exp);
    load(p);
    got = {};
    rst = 0; run = 1;
    while (!halt && cyc < 20000) begin @(posedge clk); #1 cyc++; end
    @(negedge clk); #1;
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
    n_writes += exp.size();
  endtask

  // the example program and its trace
  logic [31:0] ex_pc  [7] = '{32'h0, 32'h4, 32'h8, 32'hc, 32'h10, 32'h14, 32'h18};
  logic [31:0] ex_p1  [7] = '{32'h0, 32'h0, 32'h4, 32'h8, 32'hc, 32'h10, 32'h14};
  logic [31:0] ex_p2  [7] = '{32'h0, 32'h0, 32'h0, 32'h4, 32'h8, 32'hc, 32'h10};
  logic [31:0] ex_p3  [7] = '{32'h0, 32'h0, 32'h0, 32'h0, 32'h4, 32'h8, 32'hc};
  logic [31:0] ex_in1 [7] = '{0, 0, 0, 3, 6, 11, 0};
  logic [31:0] ex_in2 [7] = '{0, 0, 3, 3, 5, 0, 0};
  logic [31:0] ex_alu [7] = '{0, 0, 3, 6, 11, 11, 0};

  initial begin
    logic [31:0] p [$];
    p = {enc_addi(1, 0, 3), enc_add(2, 1, 1), enc_addi(10, 2, 5), enc_addi(30, 10, 0)};
    load(p);
    rst = 0;
    for (int c = 0; c < 7; c++) begin
      checks += 8;
      if (trace.pc !== ex_pc[c] || trace.p1_pc !== ex_p1[c] || trace.p2_pc !== ex_p2[c] ||
          trace.p3_pc !== ex_p3[c]) begin
        failures++;
        $display("FAIL CC%02d pcs %h %h %h %h", c + 1, trace.pc, trace.p1_pc, trace.p2_pc, trace.p3_pc);
      end
      if (trace.in1 !== ex_in1[c]) begin failures++; $display("FAIL CC%02d in1=%0d", c + 1, trace.in1); end
      if (trace.in2 !== ex_in2[c]) begin failures++; $display("FAIL CC%02d in2=%0d", c + 1, trace.in2); end
      if (trace.alu !== ex_alu[c]) begin failures++; $display("FAIL CC%02d alu=%0d", c + 1, trace.alu); end
      if (halt !== (c == 6))       begin failures++; $display("FAIL CC%02d halt=%b", c + 1, halt); end
      if (c == 6 && trace.rf_wd !== 32'd11) begin failures++; $display("FAIL x30=%0d", trace.rf_wd); end
      checks--;   // the last two checks count as one
      @(posedge clk); #1;
    end

    prog_directed(p);
    run_and_compare("directed", p);
    for (int r = 0; r < 20; r++) begin
      prog_random(p, 60);
      run_and_compare($sformatf("random%0d", r), p);
    end

    $display("register writes %0d, cycles %0d, squashes %0d, forwards rs1 %0d rs2 %0d store %0d load %0d, rf bypass %0d",
             n_writes, n_cycles, n_miss, n_fwd1, n_fwd2, n_fwd3, n_fwd_ld, n_byp);
    checks += 7;
    if (n_sm_cmp == 0 || n_sm_diff != 0) begin failures++; $display("FAIL sync-memory build: %0d of %0d cycles differ", n_sm_diff, n_sm_cmp); end
    if (n_miss == 0)   begin failures++; $display("FAIL no branch squash"); end
    if (n_fwd1 == 0)   begin failures++; $display("FAIL no rs1 forward"); end
    if (n_fwd2 == 0)   begin failures++; $display("FAIL no rs2 forward"); end
    if (n_fwd3 == 0)   begin failures++; $display("FAIL no store data forward"); end
    if (n_fwd_ld == 0) begin failures++; $display("FAIL no load forward"); end
    if (n_byp == 0)    begin failures++; $display("FAIL no register file bypass"); end
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
