// rf: 32 x 32-bit register file, two read ports and one write port.
//
// Reads are combinational; register 0 always reads as zero. The write
// happens at the rising clock edge when we is high, so a value written in a
// cycle becomes readable in the next one. A synchronous reset clears all
// registers (the lecture's model starts them at zero). Port names and widths
// (ra1, ra2, wa: 5 bits; we: 1 bit; wd, rd1, rd2: 32 bits) follow the
// lecture; the reset input is this design's addition.
module rf #(
  parameter int unsigned NREG = 32,
  parameter int unsigned XLEN = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(NREG)-1:0] ra1,
  input  logic [$clog2(NREG)-1:0] ra2,
  output logic [XLEN-1:0]         rd1,
  output logic [XLEN-1:0]         rd2,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic                    we,
  input  logic [XLEN-1:0]         wd
);

  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NREG; k++) regs[k] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
