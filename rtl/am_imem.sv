// am_imem: instruction memory with asynchronous (combinational) read.
//
// insn = mem[pc / 4]: the word addressed by the program counter appears in
// the same cycle, which is what lets the fetch stage of the processors fetch
// in one cycle without an extra register. The lecture names this memory and
// its pc-in / insn-out function only; its size and the load port, through
// which a program is written one word per clock before the processor runs,
// are this design's own. The address wraps modulo the memory size.
module am_imem #(
  parameter int unsigned WORDS = 1024   // 4 KiB
) (
  input  logic                     clk,
  input  logic [31:0]              pc,
  output logic [31:0]              insn,
  // program load port
  input  logic                     ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,   // word address
  input  logic [31:0]              ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (ld_we) mem[ld_addr] <= ld_data;

  assign insn = mem[pc[AW+1:2]];

endmodule
