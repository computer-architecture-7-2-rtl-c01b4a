// am_dmem: data memory with asynchronous read and synchronous write.
//
// rd = mem[adr / 4] combinationally; when we is high the word wd is written
// to mem[adr / 4] at the rising clock edge. Word accesses only (lw, sw).
// The lecture names this memory and its ports (adr, we, wd, rd); its size
// is this design's choice, and the address wraps modulo the memory size.
module am_dmem #(
  parameter int unsigned WORDS = 1024   // 4 KiB
) (
  input  logic        clk,
  input  logic [31:0] adr,
  input  logic        we,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[adr[AW+1:2]] <= wd;

  assign rd = mem[adr[AW+1:2]];

endmodule
