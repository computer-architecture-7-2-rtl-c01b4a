// cache1: 32-entry direct-mapped cache lookup, one 32-bit word per block.
//
// Each entry is 58 bits: {valid, tag[24:0], data[31:0]}. A lookup address
// splits into tag = adr[31:7], index = adr[6:2] and a 2-bit byte offset.
// The entry at the index is read combinationally; hit is raised when it is
// valid and its tag equals the address tag, and dout is its data word.
// Entries are written whole, at the rising clock edge, through the write
// port (wadr, we, wd), e.g. by a refill controller after a miss.
//
// Entry format, field split and ports follow the lecture's cache1. The
// synchronous reset, which clears all entries in place of an initial
// zero fill, is this design's own.
module cache1 (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] adr,    // lookup address
  output logic        hit,
  output logic [31:0] dout,
  input  logic [4:0]  wadr,   // entry to write
  input  logic        we,
  input  logic [57:0] wd      // {valid, tag, data}
);

  logic [57:0] mem [32];
  logic        v;
  logic [24:0] tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 32; k++) mem[k] <= '0;
    end else if (we) begin
      mem[wadr] <= wd;
    end
  end

  assign {v, tag, dout} = mem[adr[6:2]];
  assign hit = v && (tag == adr[31:7]);

endmodule
