// tb_sa_cache_cfg: checks one configuration of sa_cache against a model of
// its valid bits, tags and blocks kept in the testbench. Fills pick the way
// that already holds the block, or a random way; lookups use a small pool of
// tags and sets so that hits, tag misses and empty-way misses all occur.
// Finally a reset must invalidate every block. Reports its counts on its ports when done.
module tb_sa_cache_cfg #(
  parameter int unsigned WAYS       = 1,
  parameter int unsigned INDEX_BITS = 10,
  parameter int unsigned OFF_BITS   = 0,
  parameter int unsigned ROUNDS     = 600
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   hits
);
  localparam int unsigned SETS = 2 ** INDEX_BITS;
  localparam int unsigned WPB  = 2 ** OFF_BITS;
  localparam int unsigned TB   = 30 - INDEX_BITS - OFF_BITS;

  logic                rst, hit, fill_we;
  logic [WAYS-1:0]     hit_way, fill_way;
  logic [31:0]         adr, data, fill_adr;
  logic [32*WPB-1:0]   fill_block;

  logic                mv [WAYS][SETS];
  logic [TB-1:0]       mt [WAYS][SETS];
  logic [32*WPB-1:0]   mb [WAYS][SETS];
  logic [31:0]         filled [$];

  sa_cache #(.WAYS(WAYS), .INDEX_BITS(INDEX_BITS), .OFF_BITS(OFF_BITS)) dut (
    .clk, .rst, .adr, .hit, .hit_way, .data,
    .fill_we, .fill_way, .fill_adr, .fill_block
  );

  function automatic logic [31:0] pick_adr();
    logic [TB-1:0]         t;
    logic [INDEX_BITS-1:0] s;
    logic [31:0]           a;
    t = TB'($urandom % 6) | (TB'(1) << (TB - 1)) * TB'($urandom % 2);
    s = ($urandom % 2) ? INDEX_BITS'($urandom % 4) : INDEX_BITS'($urandom);
    a = $urandom;
    a[31 -: TB] = t;
    a[2 + OFF_BITS +: INDEX_BITS] = s;
    return a;
  endfunction

  task automatic lookup(input logic [31:0] a);
    logic [INDEX_BITS-1:0] s;
    logic [TB-1:0]         t;
    logic [WAYS-1:0]       ew;
    logic [31:0]           ed;
    int                    wo;
    adr = a;
    #1;
    s  = a[2 + OFF_BITS +: INDEX_BITS];
    t  = a[31 -: TB];
    wo = (OFF_BITS == 0) ? 0 : int'((a >> 2) % WPB);
    ew = '0; ed = '0;
    for (int w = 0; w < WAYS; w++)
      if (mv[w][s] && mt[w][s] == t) begin ew[w] = 1'b1; ed = mb[w][s][32*wo +: 32]; end
    checks += 2;
    if (hit !== (ew != 0)) begin failures++; $display("FAIL W%0d hit adr=%h %b", WAYS, a, hit); end
    if (hit_way !== ew)    begin failures++; $display("FAIL W%0d hit_way adr=%h %b exp %b", WAYS, a, hit_way, ew); end
    if (ew != 0) begin
      hits++;
      checks++;
      if (data !== ed) begin failures++; $display("FAIL W%0d data adr=%h %h exp %h", WAYS, a, data, ed); end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; hits = 0;
    rst = 1; fill_we = 0; fill_way = 0; fill_adr = 0; fill_block = 0; adr = 0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin mv[w][s] = 0; mt[w][s] = 0; mb[w][s] = 0; end
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 32; k++) lookup(pick_adr());
    for (int n = 0; n < ROUNDS; n++) begin
      logic [31:0]           a;
      logic [INDEX_BITS-1:0] s;
      logic [TB-1:0]         t;
      int                    way;
      a = pick_adr();
      s = a[2 + OFF_BITS +: INDEX_BITS];
      t = a[31 -: TB];
      way = int'($urandom % WAYS);
      for (int w = 0; w < WAYS; w++) if (mv[w][s] && mt[w][s] == t) way = w;
      fill_we = 1; fill_adr = a; fill_way = WAYS'(1) << way;
      for (int i = 0; i < WPB; i++) fill_block[32*i +: 32] = $urandom;
      @(posedge clk);
      mv[way][s] = 1; mt[way][s] = t; mb[way][s] = fill_block;
      #1 fill_we = 0;
      lookup(pick_adr());
      lookup(a);
      filled.push_back(a);
    end
    // reset invalidates every block: all previously filled addresses miss
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) mv[w][s] = 0;
    foreach (filled[k]) lookup(filled[k]);
    done = 1;
  end
endmodule
