// tb_ca7_top: end-to-end run of the whole top at its default sizes.
//
// * Both processors are loaded with the same programs (the four-instruction
//   example, the directed program and random programs) and run from the
//   same reset; each one's register writes must equal the reference model's.
//   proc8 must end the example in cycle 7 and proc5s in cycle 4. Branch
//   squashes, each kind of forwarding and the register-file bypass of proc8
//   are counted and must each occur. The proc8 built with synchronous-read
//   memories gets the same programs and must match proc8 cycle by cycle.
// * cache1 and the four cache organizations get blocks filled and are
//   looked up at hitting and missing addresses; hits and misses are counted
//   and must each occur, and the 4-way cache must hold four blocks of one set.
// * Each memory organization refills a block; the data and the miss penalty
//   (27, 102, 51 and 30 cycles) are checked.
module tb_ca7_top;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        p8_ld_we = 0, p5_ld_we = 0, p8_halt, p5_halt, p5_rf_we;
  logic [9:0]  p8_ld_addr = 0, p5_ld_addr = 0;
  logic [31:0] p8_ld_data = 0, p5_ld_data = 0, p5_pc, p5_rf_wd;
  logic [4:0]  p5_rf_wa;
  p8_trace_t   p8_trace, p8s_trace;
  logic        p8s_ld_we, p8s_halt;
  logic [9:0]  p8s_ld_addr;
  logic [31:0] p8s_ld_data;
  int          n_sm_cmp = 0, n_sm_diff = 0;
  assign p8s_ld_we = p8_ld_we;
  assign p8s_ld_addr = p8_ld_addr;
  assign p8s_ld_data = p8_ld_data;
  logic [31:0] c1_adr = 0, c1_dout;
  logic        c1_hit, c1_we = 0;
  logic [4:0]  c1_wadr = 0;
  logic [57:0] c1_wd = 0;
  logic [31:0]  ca_adr [4], ca_data [4], ca_fill_adr [4];
  logic         ca_hit [4], ca_fill_we [4];
  logic [3:0]   ca_hit_way [4], ca_fill_way [4];
  logic [127:0] ca_fill_block [4];
  logic         mo_req [4], mo_busy [4], mo_rvalid [4], mo_rlast [4], mo_wr_we [4];
  logic [31:0]  mo_req_adr [4], mo_rdata [4], mo_wr_data [4];
  logic [1:0]   mo_rword [4];
  logic [11:0]  mo_wr_adr [4];

  ca7_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- processors ----------------
  int n_miss = 0, n_fwd1 = 0, n_fwd2 = 0, n_fwd3 = 0, n_fwd_ld = 0, n_byp = 0;
  bit run = 0, h8 = 0, h5 = 0;
  int cyc8 = 0, cyc5 = 0, cyc = 0;
  wr_t got8 [$], got5 [$];

  always @(negedge clk) if (run) begin
    cyc++;
    n_sm_cmp++;
    if (p8s_trace !== p8_trace || p8s_halt !== p8_halt) n_sm_diff++;
    if (!h8) begin
      if (p8_trace.rf_we && p8_trace.rf_wa != 0) got8.push_back('{wa: p8_trace.rf_wa, wd: p8_trace.rf_wd});
      n_miss   += int'(p8_trace.miss);
      n_fwd1   += int'(p8_trace.fwd1);
      n_fwd2   += int'(p8_trace.fwd2);
      n_fwd3   += int'(p8_trace.fwd3);
      n_fwd_ld += int'(p8_trace.fwd_ld);
      n_byp    += int'(p8_trace.rf_bypass);
      if (p8_halt) begin h8 = 1; cyc8 = cyc; end
    end
    if (!h5) begin
      if (p5_rf_we && p5_rf_wa != 0) got5.push_back('{wa: p5_rf_wa, wd: p5_rf_wd});
      if (p5_halt) begin h5 = 1; cyc5 = cyc; end
    end
  end

  task automatic compare(input string who, input wr_t got[$], input wr_t exp[$]);
    check(got.size() == exp.size(), $sformatf("%s: %0d writes, expected %0d", who, got.size(), exp.size()));
    for (int k = 0; k < exp.size() && k < got.size(); k++)
      check(got[k] === exp[k], $sformatf("%s write %0d: x%0d=%h expected x%0d=%h", who, k,
                                         got[k].wa, got[k].wd, exp[k].wa, exp[k].wd));
  endtask

  task automatic run_program(input string name, input logic [31:0] p[$], output int c8, output int c5);
    wr_t exp [$];
    iss_run(p, exp);
    rst = 1;
    for (int a = 0; a < 1024; a++) begin
      p8_ld_we = 1; p8_ld_addr = 10'(a); p8_ld_data = (a < p.size()) ? p[a] : NOP;
      p5_ld_we = 1; p5_ld_addr = 10'(a); p5_ld_data = (a < p.size()) ? p[a] : NOP;
      @(posedge clk); #1;
    end
    p8_ld_we = 0; p5_ld_we = 0;
    @(posedge clk); #1;
    got8 = {}; got5 = {}; h8 = 0; h5 = 0; cyc = 0;
    rst = 0; run = 1;
    while (!(h8 && h5) && cyc < 20000) @(posedge clk);
    #1 run = 0;
    compare({name, " proc8"}, got8, exp);
    compare({name, " proc5s"}, got5, exp);
    c8 = cyc8; c5 = cyc5;
  endtask

  // ---------------- caches ----------------
  int c_hits [5], c_miss [5];

  task automatic cache1_test();
    for (int n = 0; n < 200; n++) begin
      logic [4:0]  i = 5'($urandom);
      logic [24:0] t = 25'($urandom % 4);
      logic [31:0] d = $urandom;
      c1_we = 1; c1_wadr = i; c1_wd = {1'b1, t, d};
      @(posedge clk); #1 c1_we = 0;
      c1_adr = {t, i, 2'b00}; #1;
      check(c1_hit && c1_dout == d, "cache1 hit after fill");
      c_hits[4] += int'(c1_hit);
      c1_adr = {t ^ 25'h1, i, 2'b00}; #1;
      check(!c1_hit, "cache1 miss on other tag");
      c_miss[4] += int'(!c1_hit);
    end
  endtask

  localparam int WAYS [4] = '{1, 1, 2, 4};
  localparam int IDX  [4] = '{10, 8, 8, 8};
  localparam int OFF  [4] = '{0, 2, 0, 0};

  task automatic cache_test(input int c);
    for (int n = 0; n < 100; n++) begin
      int          tb_ = 30 - IDX[c] - OFF[c];
      logic [31:0] base = $urandom;
      logic [127:0] blk;
      logic [31:0] words [4];
      int          way = n % WAYS[c];
      base = base & ~32'(3);
      for (int i = 0; i < 4; i++) begin words[i] = $urandom; blk[32*i +: 32] = words[i]; end
      // a different tag for each way so that one set holds WAYS blocks
      base[31 -: 4] = 4'(way);
      ca_fill_we[c] = 1; ca_fill_way[c] = 4'(1 << way); ca_fill_adr[c] = base; ca_fill_block[c] = blk;
      @(posedge clk); #1 ca_fill_we[c] = 0;
      for (int i = 0; i < (1 << OFF[c]); i++) begin
        logic [31:0] a = base;
        if (OFF[c] > 0) a[3:2] = 2'(i);
        ca_adr[c] = a; #1;
        check(ca_hit[c] && ca_hit_way[c] == 4'(1 << way) && ca_data[c] == words[i],
              $sformatf("cache %0d hit after fill", c));
        c_hits[c] += int'(ca_hit[c]);
      end
      ca_adr[c] = base ^ (32'h1 << 27); #1;   // tag bit not used by any way
      check(!ca_hit[c], $sformatf("cache %0d miss on other tag", c));
      c_miss[c] += int'(!ca_hit[c]);
      if (tb_ < 4) check(0, "tag too short");
    end
    if (WAYS[c] == 4) begin     // fill one set in all four ways, then hit each
      int hit_ways = 0;
      logic [31:0] a = 32'h0000_1230;
      for (int w = 0; w < 4; w++) begin
        a[31 -: 4] = 4'(w);
        ca_fill_we[c] = 1; ca_fill_way[c] = 4'(1 << w); ca_fill_adr[c] = a;
        ca_fill_block[c] = 128'(w + 100);
        @(posedge clk); #1 ca_fill_we[c] = 0;
      end
      for (int w = 0; w < 4; w++) begin
        a[31 -: 4] = 4'(w);
        ca_adr[c] = a; #1;
        hit_ways += int'(ca_hit[c] && ca_hit_way[c] == 4'(1 << w) && ca_data[c] == 32'(w + 100));
      end
      check(hit_ways == 4, "4-way set holds four blocks");
    end
  endtask

  // ---------------- memories ----------------
  localparam int PEN [4] = '{27, 102, 51, 30};
  localparam int BW  [4] = '{1, 4, 4, 4};
  int pen_seen [4];

  task automatic mem_test(input int m);
    logic [31:0] w [4];
    int got = 0, c = 1;
    for (int i = 0; i < 4; i++) begin
      w[i] = $urandom;
      mo_wr_we[m] = 1; mo_wr_adr[m] = 12'(400 + i); mo_wr_data[m] = w[i];
      @(posedge clk); #1;
    end
    mo_wr_we[m] = 0;
    mo_req[m] = 1; mo_req_adr[m] = 32'(400 * 4 + 4 * (BW[m] - 1));
    @(posedge clk); #1 mo_req[m] = 0;
    while (got < BW[m] && c < 300) begin
      @(posedge clk); #1 c++;
      if (mo_rvalid[m]) begin
        check(mo_rdata[m] == w[got], $sformatf("memory %0d word %0d", m, got));
        got++;
        if (got == BW[m]) begin pen_seen[m] = c; check(mo_rlast[m], "rlast"); end
      end
    end
    check(pen_seen[m] == PEN[m], $sformatf("memory %0d miss penalty %0d expected %0d", m, pen_seen[m], PEN[m]));
  endtask

  initial begin
    logic [31:0] p [$];
    int c8, c5;
    for (int c = 0; c < 4; c++) begin
      ca_adr[c] = 0; ca_fill_we[c] = 0; ca_fill_way[c] = 0; ca_fill_adr[c] = 0; ca_fill_block[c] = 0;
      mo_req[c] = 0; mo_req_adr[c] = 0; mo_wr_we[c] = 0; mo_wr_adr[c] = 0; mo_wr_data[c] = 0;
      pen_seen[c] = 0;
    end
    for (int c = 0; c < 5; c++) begin c_hits[c] = 0; c_miss[c] = 0; end

    p = {enc_addi(1, 0, 3), enc_add(2, 1, 1), enc_addi(10, 2, 5), enc_addi(30, 10, 0)};
    run_program("example", p, c8, c5);
    check(c8 == 7, $sformatf("proc8 example ended in cycle %0d", c8));
    check(c5 == 4, $sformatf("proc5s example ended in cycle %0d", c5));
    prog_directed(p);
    run_program("directed", p, c8, c5);
    $display("directed program: proc8 %0d cycles, proc5s %0d cycles", c8, c5);
    for (int r = 0; r < 6; r++) begin
      prog_random(p, 80);
      run_program($sformatf("random%0d", r), p, c8, c5);
    end
    $display("proc8: squashes %0d, forwards rs1 %0d rs2 %0d store %0d load %0d, rf bypass %0d",
             n_miss, n_fwd1, n_fwd2, n_fwd3, n_fwd_ld, n_byp);
    check(n_miss > 0, "no branch squash");
    check(n_fwd1 > 0, "no rs1 forward");
    check(n_fwd2 > 0, "no rs2 forward");
    check(n_fwd3 > 0, "no store data forward");
    check(n_fwd_ld > 0, "no load forward");
    check(n_byp > 0, "no register file bypass");
    check(n_sm_cmp > 0 && n_sm_diff == 0,
          $sformatf("synchronous-memory proc8 differs in %0d of %0d cycles", n_sm_diff, n_sm_cmp));

    cache1_test();
    for (int c = 0; c < 4; c++) cache_test(c);
    for (int c = 0; c < 5; c++) begin
      $display("cache %0d: hits %0d misses %0d", c, c_hits[c], c_miss[c]);
      check(c_hits[c] > 0 && c_miss[c] > 0, "cache without hits or misses");
    end

    for (int m = 0; m < 4; m++) mem_test(m);
    $display("miss penalties: %0d %0d %0d %0d", pen_seen[0], pen_seen[1], pen_seen[2], pen_seen[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
