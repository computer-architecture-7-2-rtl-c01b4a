// sm_dmem: data memory with synchronous read and synchronous write.
//
// At each rising clock edge the word at adr / 4 is captured in the output
// register rd (read-before-write when the same word is written in that
// cycle), and when we is high wd is written there. In the pipelined
// processor the output register takes the place of the EX/WB register
// P3_ldd. Reset clears the output register. The lecture draws this memory
// (grey, register on the output side) in place of am_dmem; its size and
// the read-before-write order are this design's own.
module sm_dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] adr,
  input  logic        we,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[adr[AW+1:2]] <= wd;

  always_ff @(posedge clk)
    if (rst) rd <= '0;
    else     rd <= mem[adr[AW+1:2]];

endmodule
