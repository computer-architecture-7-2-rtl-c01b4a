// tb_mem_org_cfg: checks one organization of mem_org. Fills the memory with
// random words through the load port, then reads blocks at random
// addresses and checks every returned word, its index, rlast, and the cycle
// in which it arrives. Counting the cycle that sends the address as cycle
// 1, word k of a block must arrive in cycle 2 + T_CYCLE + k * STEP, where
// STEP is T_CYCLE (one-word-wide), T_PAGE (page mode) or 1 (interleaved):
// the miss penalty is then 27 for a one-word block and 102, 51 or 30 for a
// four-word block.
module tb_mem_org_cfg
  import mem_pkg::*;
#(
  parameter mem_org_e    ORG         = ORG_ONE_WORD,
  parameter int unsigned BLOCK_WORDS = 4,
  parameter int unsigned PENALTY     = 102,   // expected miss penalty
  parameter int unsigned READS       = 12
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   penalty_seen
);
  localparam int unsigned WORDS = 4096;
  localparam int unsigned STEP  = (ORG == ORG_ONE_WORD) ? 25 : (ORG == ORG_PAGE_MODE) ? 8 : 1;
  localparam int unsigned KW    = $clog2(BLOCK_WORDS > 1 ? BLOCK_WORDS : 2);

  logic              rst, req, busy, rvalid, rlast, wr_we;
  logic [31:0]       req_adr, rdata, wr_data;
  logic [KW-1:0]     rword;
  logic [11:0]       wr_adr;
  logic [31:0]       model [WORDS];

  mem_org #(.ORG(ORG), .BLOCK_WORDS(BLOCK_WORDS)) dut (
    .clk, .rst, .req, .req_adr, .busy, .rvalid, .rword, .rlast, .rdata,
    .wr_we, .wr_adr, .wr_data
  );

  initial begin
    done = 0; checks = 0; failures = 0; penalty_seen = 0;
    rst = 1; req = 0; req_adr = 0; wr_we = 0; wr_adr = 0; wr_data = 0;
    @(posedge clk); #1 rst = 0;
    for (int a = 0; a < WORDS; a++) begin
      model[a] = $urandom;
      wr_we = 1; wr_adr = 12'(a); wr_data = model[a];
      @(posedge clk); #1;
    end
    wr_we = 0;
    for (int r = 0; r < READS; r++) begin
      int base, got, cyc;
      req_adr = $urandom % (WORDS * 4);
      base    = int'(req_adr / 4) / BLOCK_WORDS * BLOCK_WORDS;
      req = 1;
      @(posedge clk); #1 req = 0;          // edge 0: request taken
      got = 0; cyc = 1;
      while (got < BLOCK_WORDS && cyc < 500) begin
        @(posedge clk); #1 cyc++;
        if (rvalid) begin
          checks += 4;
          if (cyc != 2 + 25 + got * STEP) begin
            failures++; $display("FAIL org%0d word %0d in cycle %0d", ORG, got, cyc);
          end
          if (int'(rword) != got) begin failures++; $display("FAIL org%0d rword %0d exp %0d", ORG, rword, got); end
          if (rdata !== model[base + got]) begin
            failures++; $display("FAIL org%0d data %h exp %h", ORG, rdata, model[base + got]);
          end
          if (rlast !== (got == BLOCK_WORDS - 1)) begin failures++; $display("FAIL org%0d rlast", ORG); end
          got++;
          if (got == BLOCK_WORDS) penalty_seen = cyc;
        end
      end
      checks += 2;
      if (got != BLOCK_WORDS) begin failures++; $display("FAIL org%0d only %0d words", ORG, got); end
      if (penalty_seen != PENALTY) begin failures++; $display("FAIL org%0d penalty %0d exp %0d", ORG, penalty_seen, PENALTY); end
      @(posedge clk); #1;
      checks++;
      if (busy) begin failures++; $display("FAIL org%0d still busy", ORG); end
    end
    done = 1;
  end
endmodule
