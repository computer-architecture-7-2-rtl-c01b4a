// gen_imm: instruction format decoder and immediate generator.
//
// Looks at the major opcode of a 32-bit RV32I instruction and raises one of
// the format flags r, i, s, b, u, j, plus ld for a load, and assembles the
// sign-extended immediate of that format (zero for R-type and for unknown
// opcodes). Purely combinational.
//
// The lecture gives this unit's name, its input (the instruction) and its
// outputs (the immediate and the seven flags r,i,s,b,u,j,ld); the bit
// layouts follow the RV32I base encoding, which is this design's reading
// of what the unit must do.
module gen_imm
  import rv_pkg::*;
(
  input  logic [31:0] ir,    // instruction
  output logic [31:0] imm,   // sign-extended immediate
  output itype_t      ty     // format flags
);

  logic [6:0] op;
  assign op = ir[6:0];

  always_comb begin
    ty = '0;
    unique case (op)
      OP_REG:                   ty.r = 1'b1;
      OP_IMM, OP_JALR:          ty.i = 1'b1;
      OP_LOAD:   begin          ty.i = 1'b1; ty.ld = 1'b1; end
      OP_STORE:                 ty.s = 1'b1;
      OP_BRANCH:                ty.b = 1'b1;
      OP_LUI, OP_AUIPC:         ty.u = 1'b1;
      OP_JAL:                   ty.j = 1'b1;
      default:                  ty = '0;
    endcase
  end

  always_comb begin
    if (ty.i)      imm = {{20{ir[31]}}, ir[31:20]};
    else if (ty.s) imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
    else if (ty.b) imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
    else if (ty.u) imm = {ir[31:12], 12'b0};
    else if (ty.j) imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
    else           imm = 32'd0;
  end

endmodule
