// ca7_top: the processors, caches and memory organizations side by side.
//
// The hardware of this lecture is a set of separate designs that share
// units but are not wired into one system; this top holds one instance of
// each, with its own ports:
//   * u_proc8   four-stage pipelined add/addi/lw/sw/bne processor (the
//               main design) with its program load port, halt flag and a
//               per-cycle trace of pcs, ALU operands and hazard events;
//   * u_proc8_sm the same processor built with synchronous-read memories
//               (sm_imem, sm_dmem), as drawn for block-RAM implementations;
//   * u_proc5s  the single-cycle processor it is derived from;
//   * u_cache1  32-entry direct-mapped cache lookup with an entry write port;
//   * g_cache[0..3]  cache lookup arrays in the four drawn organizations:
//               0 direct-mapped 1K x 1-word blocks, 1 direct-mapped 256 x
//               4-word blocks, 2 two-way 256 sets, 3 four-way 256 sets;
//   * g_mem[0..3]    main memory behind a one-word bus: 0 one-word-wide with
//               one-word blocks (27-cycle miss), 1 one-word-wide with 4-word
//               blocks (102), 2 page mode (51), 3 four interleaved banks (30).
// Port arrays indexed 0..3 follow that numbering. Narrower instances use
// the low bits of the shared-width ports: cache fill_way uses bits
// [WAYS-1:0], fill_block bits [32*words-1:0]. The padding outputs are
// constant zero on purpose: hit_way above the instance's ways (3+3+2 bits)
// and mo_rword[0][1] for the one-word memory (9 bits in all).
// All parts share one clock and one synchronous reset.
module ca7_top
  import rv_pkg::*;
  import mem_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // proc8
  input  logic              p8_ld_we,
  input  logic [9:0]        p8_ld_addr,
  input  logic [31:0]       p8_ld_data,
  output logic              p8_halt,
  output p8_trace_t         p8_trace,
  // proc8 built with synchronous-read memories
  input  logic              p8s_ld_we,
  input  logic [9:0]        p8s_ld_addr,
  input  logic [31:0]       p8s_ld_data,
  output logic              p8s_halt,
  output p8_trace_t         p8s_trace,
  // proc5s
  input  logic              p5_ld_we,
  input  logic [9:0]        p5_ld_addr,
  input  logic [31:0]       p5_ld_data,
  output logic              p5_halt,
  output logic [31:0]       p5_pc,
  output logic              p5_rf_we,
  output logic [4:0]        p5_rf_wa,
  output logic [31:0]       p5_rf_wd,
  // cache1
  input  logic [31:0]       c1_adr,
  output logic              c1_hit,
  output logic [31:0]       c1_dout,
  input  logic [4:0]        c1_wadr,
  input  logic              c1_we,
  input  logic [57:0]       c1_wd,
  // cache organizations
  input  logic [31:0]       ca_adr        [4],
  output logic              ca_hit        [4],
  output logic [3:0]        ca_hit_way    [4],
  output logic [31:0]       ca_data       [4],
  input  logic              ca_fill_we    [4],
  input  logic [3:0]        ca_fill_way   [4],
  input  logic [31:0]       ca_fill_adr   [4],
  input  logic [127:0]      ca_fill_block [4],
  // memory organizations
  input  logic              mo_req        [4],
  input  logic [31:0]       mo_req_adr    [4],
  output logic              mo_busy       [4],
  output logic              mo_rvalid     [4],
  output logic [1:0]        mo_rword      [4],
  output logic              mo_rlast      [4],
  output logic [31:0]       mo_rdata      [4],
  input  logic              mo_wr_we      [4],
  input  logic [11:0]       mo_wr_adr     [4],
  input  logic [31:0]       mo_wr_data    [4]
);

  // ---------------- processors ----------------
  proc8 u_proc8 (
    .clk, .rst, .ld_we(p8_ld_we), .ld_addr(p8_ld_addr), .ld_data(p8_ld_data),
    .halt(p8_halt), .trace(p8_trace)
  );

  proc8 #(.SYNC_MEM(1'b1)) u_proc8_sm (
    .clk, .rst, .ld_we(p8s_ld_we), .ld_addr(p8s_ld_addr), .ld_data(p8s_ld_data),
    .halt(p8s_halt), .trace(p8s_trace)
  );

  proc5s u_proc5s (
    .clk, .rst, .ld_we(p5_ld_we), .ld_addr(p5_ld_addr), .ld_data(p5_ld_data),
    .halt(p5_halt), .pc(p5_pc), .rf_we(p5_rf_we), .rf_wa(p5_rf_wa), .rf_wd(p5_rf_wd)
  );

  // ---------------- caches ----------------
  cache1 u_cache1 (
    .clk, .rst, .adr(c1_adr), .hit(c1_hit), .dout(c1_dout),
    .wadr(c1_wadr), .we(c1_we), .wd(c1_wd)
  );

  localparam int unsigned CA_WAYS [4] = '{1, 1, 2, 4};
  localparam int unsigned CA_IDX  [4] = '{10, 8, 8, 8};
  localparam int unsigned CA_OFF  [4] = '{0, 2, 0, 0};

  for (genvar c = 0; c < 4; c++) begin : g_cache
    localparam int unsigned W  = CA_WAYS[c];
    localparam int unsigned NB = 32 * (2 ** CA_OFF[c]);
    logic [W-1:0] hw;
    sa_cache #(.WAYS(W), .INDEX_BITS(CA_IDX[c]), .OFF_BITS(CA_OFF[c])) u_cache (
      .clk, .rst,
      .adr(ca_adr[c]), .hit(ca_hit[c]), .hit_way(hw), .data(ca_data[c]),
      .fill_we(ca_fill_we[c]), .fill_way(ca_fill_way[c][W-1:0]),
      .fill_adr(ca_fill_adr[c]), .fill_block(ca_fill_block[c][NB-1:0])
    );
    assign ca_hit_way[c] = 4'(hw);
  end

  // ---------------- memory organizations ----------------
  localparam mem_org_e    MO_ORG   [4] = '{ORG_ONE_WORD, ORG_ONE_WORD, ORG_PAGE_MODE, ORG_INTERLEAVED};
  localparam int unsigned MO_BLOCK [4] = '{1, 4, 4, 4};

  for (genvar m = 0; m < 4; m++) begin : g_mem
    localparam int unsigned KW = (MO_BLOCK[m] > 2) ? 2 : 1;
    logic [KW-1:0] rw;
    mem_org #(.ORG(MO_ORG[m]), .BLOCK_WORDS(MO_BLOCK[m])) u_mem (
      .clk, .rst,
      .req(mo_req[m]), .req_adr(mo_req_adr[m]), .busy(mo_busy[m]),
      .rvalid(mo_rvalid[m]), .rword(rw), .rlast(mo_rlast[m]), .rdata(mo_rdata[m]),
      .wr_we(mo_wr_we[m]), .wr_adr(mo_wr_adr[m]), .wr_data(mo_wr_data[m])
    );
    assign mo_rword[m] = 2'(rw);
  end

endmodule
