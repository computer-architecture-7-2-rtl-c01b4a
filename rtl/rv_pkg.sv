// rv_pkg: shared constants and types of the small RV32I-subset processors.
//
// The processors execute add, addi, lw, sw and bne. The decoder (gen_imm)
// classifies an instruction by its major opcode into one of the six RV32I
// encoding formats (R, I, S, B, U, J) and flags loads; that 7-bit bundle is
// carried through the pipeline as a packed struct. Opcode values are the
// standard RV32I ones; the struct layout is this design's choice.
// Modules that import the package but use only a few of its constants get
// unused-parameter lint notes for the rest; they carry no hardware.
package rv_pkg;

  // RV32I major opcodes (instruction bits [6:0])
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // addi x0,x0,0: the bubble loaded into the fetch/decode register at reset
  localparam logic [31:0] NOP = 32'h0000_0013;

  // register written by the instruction that ends a program run
  localparam logic [4:0] HALT_REG = 5'd30;

  // instruction class flags produced by gen_imm (r,i,s,b,u,j,ld)
  typedef struct packed {
    logic r;   // R-type: register-register ALU
    logic i;   // I-type: immediate ALU, load, jalr
    logic s;   // S-type: store
    logic b;   // B-type: conditional branch
    logic u;   // U-type: lui, auipc
    logic j;   // J-type: jal
    logic ld;  // load
  } itype_t;

  // observation bundle of the pipelined processor, one value per cycle
  typedef struct packed {
    logic [31:0] pc;        // fetch program counter
    logic [31:0] p1_pc;     // pc of the instruction in decode
    logic [31:0] p2_pc;     // pc of the instruction in execute
    logic [31:0] p3_pc;     // pc of the instruction in write-back
    logic [31:0] in1;       // ALU operand 1 after forwarding
    logic [31:0] in2;       // ALU operand 2 after forwarding
    logic [31:0] alu;       // ALU result
    logic        miss;      // taken bne in execute: two younger slots squashed
    logic        fwd1;      // operand 1 forwarded from write-back
    logic        fwd2;      // operand 2 forwarded from write-back
    logic        fwd3;      // store data forwarded from write-back
    logic        fwd_ld;    // a loaded word was forwarded to execute
    logic        rf_bypass; // decode read a register being written this cycle
    logic        rf_we;     // register write
    logic [4:0]  rf_wa;
    logic [31:0] rf_wd;
  } p8_trace_t;

endpackage
