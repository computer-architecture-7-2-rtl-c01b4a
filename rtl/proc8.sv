// proc8: four-stage pipelined processor for add, addi, lw, sw and bne.
//
// Stages and pipeline registers:
//   IF  pc -> am_imem; P1 holds ir, pc and a valid bit.
//   ID  gen_imm decodes P1_ir; rf2 reads rs1/rs2; the branch target
//       P1_pc + imm and the second operand (imm unless R-type or branch)
//       are formed. P2 holds them with rd, rs1, rs2 and the class flags.
//   EX  (with MA) the ALU adds and compares; am_dmem is read or written at
//       the ALU result in the same cycle. P3 holds the ALU result, the
//       loaded word, rd and the flags.
//   WB  the result (loaded word for lw) is written to rf2.
// Hazards:
//   * A producer two instructions ahead writes rf2 in the same cycle the
//     consumer reads it in ID: rf2's bypass supplies the new value. Three
//     or more ahead, the register is already written.
//   * A producer one instruction ahead is in WB while the consumer is in
//     EX: three forwarding multiplexers replace the operand from P2
//     by the write-back value (m11 operand 1, m12 operand 2 when it is a
//     register, m13 store data). Loads need no stall: memory is read in EX
//     and the loaded word is forwarded from WB like any other result.
//   * A taken bne is resolved in EX: the fetch pc is redirected to the
//     target and the two younger instructions (in IF and ID) are squashed
//     by clearing their valid bits. Branches are predicted not taken.
// With SYNC_MEM set, the instruction and data memories are synchronous-read
// memories (sm_imem, sm_dmem) whose output registers are P1_ir and P3_ldd,
// as the lecture draws for an FPGA block-RAM implementation; behaviour and
// timing are the same as with the asynchronous memories (the default).
// Only valid instructions write memory or registers. Nothing stalls: one
// instruction enters per cycle, and a taken branch costs two cycles.
// A write to x30 is the end-of-program marker and is flagged on halt.
//
// The stage split, the multiplexer conditions and the squash rule follow
// the lecture's proc8. This design's own choices: a synchronous reset in
// place of initial values (P1 holds a nop, all valid bits cleared), the
// store and branch flags carried into P3 so that sw and bne never write a
// register, the program load port and the trace output.
module proc8
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          SYNC_MEM   = 1'b0   // 1: sm_imem/sm_dmem hold P1_ir and P3_ldd
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ld_we,     // program load port
  input  logic [$clog2(IMEM_WORDS)-1:0] ld_addr,
  input  logic [31:0]                   ld_data,
  output logic                          halt,      // x30 written this cycle
  output p8_trace_t                     trace
);

  // ---------------- IF ----------------
  logic [31:0] r_pc, w_npc, w_pcin, w_ir;
  logic        w_miss;
  logic [31:0] P2_tpc;

  assign w_npc  = r_pc + 32'd4;
  assign w_pcin = w_miss ? P2_tpc : w_npc;

  logic [31:0] P1_ir, P1_pc;
  logic        P1_v;

  if (SYNC_MEM) begin : g_sm_imem
    // the memory's output register is P1_ir
    sm_imem #(.WORDS(IMEM_WORDS)) u_imem (
      .clk, .rst, .pc(r_pc), .insn(P1_ir), .ld_we, .ld_addr, .ld_data
    );
    assign w_ir = P1_ir;
  end else begin : g_am_imem
    am_imem #(.WORDS(IMEM_WORDS)) u_imem (
      .clk, .pc(r_pc), .insn(w_ir), .ld_we, .ld_addr, .ld_data
    );
    always_ff @(posedge clk)
      if (rst) P1_ir <= NOP;
      else     P1_ir <= w_ir;
  end

  // ---------------- ID ----------------
  logic [31:0] w_imm, w_r1, w_r2, w_s2, w_tpc;
  itype_t      w_ty;
  logic [4:0]  w_rs1, w_rs2, w_rd;

  assign w_rs1 = P1_ir[19:15];
  assign w_rs2 = P1_ir[24:20];
  assign w_rd  = P1_ir[11:7];

  gen_imm u_gen_imm (.ir(P1_ir), .imm(w_imm), .ty(w_ty));

  logic        w_rf_we;
  logic [4:0]  P3_rd;
  logic [31:0] w_rt;

  rf2 u_rf (
    .clk, .rst, .ra1(w_rs1), .ra2(w_rs2), .rd1(w_r1), .rd2(w_r2),
    .wa(P3_rd), .we(w_rf_we), .wd(w_rt)
  );

  assign w_tpc = P1_pc + w_imm;
  assign w_s2  = (!w_ty.r && !w_ty.b) ? w_imm : w_r2;

  logic [31:0] P2_pc, P2_r1, P2_r2, P2_s2;
  itype_t      P2_ty;
  logic [4:0]  P2_rd, P2_rs1, P2_rs2;
  logic        P2_v;

  // ---------------- EX / MA ----------------
  logic [31:0] w_in1, w_in2, w_in3, w_alu, w_ldd;
  logic        w_tkn, w_f, w_f1, w_f2, w_f3;

  assign w_f1  = w_f && (P2_rs1 == P3_rd);
  assign w_f3  = w_f && (P2_rs2 == P3_rd);
  assign w_f2  = w_f3 && (P2_ty.r || P2_ty.b);
  assign w_in1 = w_f1 ? w_rt : P2_r1;   // m11
  assign w_in2 = w_f2 ? w_rt : P2_s2;   // m12
  assign w_in3 = w_f3 ? w_rt : P2_r2;   // m13

  alu u_alu (.in1(w_in1), .in2(w_in2), .sum(w_alu), .tkn(w_tkn));

  assign w_miss = P2_ty.b && w_tkn && P2_v;

  logic [31:0] P3_pc, P3_alu, P3_ldd;

  if (SYNC_MEM) begin : g_sm_dmem
    // the memory's output register is P3_ldd
    sm_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
      .clk, .rst, .adr(w_alu), .we(P2_ty.s && P2_v), .wd(w_in3), .rd(P3_ldd)
    );
    assign w_ldd = P3_ldd;
  end else begin : g_am_dmem
    am_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
      .clk, .adr(w_alu), .we(P2_ty.s && P2_v), .wd(w_in3), .rd(w_ldd)
    );
    always_ff @(posedge clk)
      if (rst) P3_ldd <= '0;
      else     P3_ldd <= w_ldd;
  end
  logic        P3_s, P3_b, P3_ld, P3_v;

  // ---------------- WB ----------------
  assign w_rt    = P3_ld ? P3_ldd : P3_alu;                  // m10
  assign w_rf_we = !P3_s && !P3_b && P3_v;
  assign w_f     = !P3_s && !P3_b && (P3_rd != 5'd0) && P3_v;
  assign halt    = w_rf_we && (P3_rd == HALT_REG);

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      r_pc  <= '0;
      P1_pc <= '0;  P1_v <= 1'b0;
      P2_pc <= '0;   P2_r1 <= '0;  P2_r2 <= '0;  P2_s2 <= '0;  P2_tpc <= '0;
      P2_ty <= '0;   P2_rd <= '0;  P2_rs1 <= '0; P2_rs2 <= '0; P2_v <= 1'b0;
      P3_pc <= '0;   P3_alu <= '0; P3_rd <= '0;
      P3_s  <= 1'b0; P3_b <= 1'b0; P3_ld <= 1'b0; P3_v <= 1'b0;
    end else begin
      r_pc  <= w_pcin;
      // IF -> ID
      P1_pc <= r_pc;
      P1_v  <= !w_miss;
      // ID -> EX
      P2_pc  <= P1_pc;
      P2_r1  <= w_r1;
      P2_r2  <= w_r2;
      P2_s2  <= w_s2;
      P2_tpc <= w_tpc;
      P2_ty  <= w_ty;
      P2_rd  <= w_rd;
      P2_rs1 <= w_rs1;
      P2_rs2 <= w_rs2;
      P2_v   <= !w_miss && P1_v;
      // EX -> WB
      P3_pc  <= P2_pc;
      P3_alu <= w_alu;
      P3_rd  <= P2_rd;
      P3_s   <= P2_ty.s;
      P3_b   <= P2_ty.b;
      P3_ld  <= P2_ty.ld;
      P3_v   <= P2_v;
    end
  end

  // ---------------- observation ----------------
  always_comb begin
    trace.pc        = r_pc;
    trace.p1_pc     = P1_pc;
    trace.p2_pc     = P2_pc;
    trace.p3_pc     = P3_pc;
    trace.in1       = w_in1;
    trace.in2       = w_in2;
    trace.alu       = w_alu;
    trace.miss      = w_miss;
    trace.fwd1      = w_f1 && P2_v;
    trace.fwd2      = w_f2 && P2_v;
    trace.fwd3      = w_f3 && P2_ty.s && P2_v;
    trace.fwd_ld    = P3_ld && P2_v && (w_f1 || w_f2 || (w_f3 && P2_ty.s));
    trace.rf_bypass = P1_v && w_rf_we &&
                      ((w_rs1 != 5'd0 && w_rs1 == P3_rd) ||
                       (w_rs2 != 5'd0 && w_rs2 == P3_rd && (w_ty.r || w_ty.s || w_ty.b)));
    trace.rf_we     = w_rf_we;
    trace.rf_wa     = P3_rd;
    trace.rf_wd     = w_rt;
  end

endmodule
