// sm_imem: instruction memory with synchronous read (registered output).
//
// At each rising clock edge the word at pc / 4 is captured in the output
// register, so insn shows it one cycle after pc is presented, the way an
// FPGA block RAM reads. In the pipelined processor this output register
// takes the place of the IF/ID instruction register P1_ir, which keeps the
// pipeline timing unchanged. Reset loads the output register with a nop.
// The lecture draws this memory (grey, with its register on the output
// side) in place of am_imem; size, reset value and the load port are this
// design's own.
module sm_imem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
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

  always_ff @(posedge clk)
    if (rst) insn <= NOP;
    else     insn <= mem[pc[AW+1:2]];

endmodule
