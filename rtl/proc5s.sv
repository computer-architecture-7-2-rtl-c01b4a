// proc5s: single-cycle processor for add, addi, lw, sw and bne.
//
// Every instruction is fetched, decoded, executed, given its memory access
// and written back within one clock cycle: am_imem is read at pc, gen_imm
// decodes, rf is read, the ALU adds (and compares for bne), am_dmem is
// read or written at the ALU result and the result is written to rf at the
// clock edge, together with the new pc (pc + 4, or pc + imm for a taken
// bne). It is the starting point from which the pipelined proc8 is built,
// and shares all its units.
//
// The datapath and control conditions follow the lecture's proc5s. This
// design's own choices: a synchronous reset, the program load port, and the
// trace outputs. A write to x30 is flagged on halt.
module proc5s
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ld_we,     // program load port
  input  logic [$clog2(IMEM_WORDS)-1:0] ld_addr,
  input  logic [31:0]                   ld_data,
  output logic                          halt,      // x30 written this cycle
  output logic [31:0]                   pc,        // current pc
  output logic                          rf_we,     // register write this cycle
  output logic [4:0]                    rf_wa,
  output logic [31:0]                   rf_wd
);

  logic [31:0] r_pc, w_npc, w_tpc, w_pcin, w_ir, w_imm;
  logic [31:0] w_r1, w_r2, w_s2, w_alu, w_ldd, w_rt;
  logic        w_tkn;
  itype_t      w_ty;

  assign w_npc  = r_pc + 32'd4;                          // m2
  assign w_tpc  = r_pc + w_imm;                          // m6
  assign w_pcin = (w_ty.b && w_tkn) ? w_tpc : w_npc;     // m11

  am_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc(r_pc), .insn(w_ir), .ld_we, .ld_addr, .ld_data
  );

  gen_imm u_gen_imm (.ir(w_ir), .imm(w_imm), .ty(w_ty));

  assign rf_we = !w_ty.s && !w_ty.b;
  assign rf_wa = w_ir[11:7];
  assign rf_wd = w_rt;

  rf u_rf (
    .clk, .rst, .ra1(w_ir[19:15]), .ra2(w_ir[24:20]), .rd1(w_r1), .rd2(w_r2),
    .wa(rf_wa), .we(rf_we && !rst), .wd(w_rt)
  );

  assign w_s2 = (!w_ty.r && !w_ty.b) ? w_imm : w_r2;    // m7

  alu u_alu (.in1(w_r1), .in2(w_s2), .sum(w_alu), .tkn(w_tkn));

  am_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .adr(w_alu), .we(w_ty.s && !rst), .wd(w_r2), .rd(w_ldd)
  );

  assign w_rt = w_ty.ld ? w_ldd : w_alu;                // m10

  assign halt = rf_we && (rf_wa == HALT_REG);
  assign pc   = r_pc;

  always_ff @(posedge clk)
    if (rst) r_pc <= '0;
    else     r_pc <= w_pcin;

endmodule
