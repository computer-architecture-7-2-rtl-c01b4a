// alu: the execution unit of the add/addi/lw/sw/bne processors.
//
// Produces the sum of its two operands (the result of add and addi, and the
// effective address of lw and sw) and, in parallel, the branch-taken flag of
// bne, which is raised when the two operands differ. Combinational.
// Both functions are the ones the lecture's processors give this unit.
module alu (
  input  logic [31:0] in1,   // first operand (rs1)
  input  logic [31:0] in2,   // second operand (rs2 or immediate)
  output logic [31:0] sum,   // in1 + in2
  output logic        tkn    // in1 != in2: bne is taken
);
  assign sum = in1 + in2;
  assign tkn = (in1 != in2);
endmodule
