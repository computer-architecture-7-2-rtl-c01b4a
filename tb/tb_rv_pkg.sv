// tb_rv_pkg: testbench support for the add/addi/lw/sw/bne processors.
//
// Instruction encoders (RV32I formats), an instruction-set reference model
// that executes a program one instruction at a time and records every
// register write (register 0 excluded) up to and including the write to
// x30 that ends the program, and program generators: a directed program
// with a loop, and random straight-line programs with forward branches.
package tb_rv_pkg;

  typedef struct packed {
    logic [4:0]  wa;
    logic [31:0] wd;
  } wr_t;

  function automatic logic [31:0] enc_add(int rd, int rs1, int rs2);
    return {7'b0, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_addi(int rd, int rs1, int imm);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] enc_lw(int rd, int rs1, int imm);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic logic [31:0] enc_sw(int rs2, int rs1, int imm);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_bne(int rs1, int rs2, int imm);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'b001, i[4:1], i[11], 7'b1100011};
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0013;

  // reference model: returns the register writes in program order
  function automatic void iss_run(input logic [31:0] prog[$], output wr_t wr[$],
                                  input int max_steps = 100000);
    logic [31:0] x [32];
    logic [31:0] mem [int];
    int unsigned pc = 0;
    wr = {};
    for (int k = 0; k < 32; k++) x[k] = 0;
    for (int n = 0; n < max_steps; n++) begin
      logic [31:0] ir, imm_i, imm_s, imm_b, res;
      int rd, rs1, rs2;
      bit wb;
      ir    = (pc / 4 < prog.size()) ? prog[pc / 4] : NOP;
      rd    = int'(ir[11:7]);
      rs1   = int'(ir[19:15]);
      rs2   = int'(ir[24:20]);
      imm_i = {{20{ir[31]}}, ir[31:20]};
      imm_s = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      imm_b = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      wb = 0; res = 0;
      case (ir[6:0])
        7'b0110011: begin res = x[rs1] + x[rs2]; wb = 1; end
        7'b0010011: begin res = x[rs1] + imm_i;  wb = 1; end
        7'b0000011: begin
          int unsigned a = (x[rs1] + imm_i) / 4;
          res = mem.exists(a) ? mem[a] : 32'd0; wb = 1;
        end
        7'b0100011: mem[(x[rs1] + imm_s) / 4] = x[rs2];
        7'b1100011: if (x[rs1] != x[rs2]) begin pc = pc + imm_b; continue; end
        default: ;
      endcase
      if (wb && rd != 0) begin
        x[rd] = res;
        wr.push_back('{wa: 5'(rd), wd: res});
        if (rd == 30) return;
      end
      pc = pc + 4;
    end
  endfunction

  // directed program: dependences at distance 1, 2 and 3, load-use, store
  // data from the previous instruction, a counted loop and a skipped branch
  function automatic void prog_directed(output logic [31:0] p[$]);
    p = {};
    p.push_back(enc_addi(1, 0, 5));       // 00 x1 = 5 (loop count)
    p.push_back(enc_addi(2, 0, 0));       // 04 x2 = 0 (sum)
    p.push_back(enc_addi(3, 0, 64));      // 08 x3 = 64 (pointer)
    p.push_back(enc_add (2, 2, 1));       // 0c loop: x2 += x1
    p.push_back(enc_sw  (2, 3, 0));       // 10 mem[x3] = x2
    p.push_back(enc_lw  (4, 3, 0));       // 14 x4 = mem[x3]
    p.push_back(enc_add (5, 4, 4));       // 18 x5 = 2*x4
    p.push_back(enc_addi(3, 3, 4));       // 1c x3 += 4
    p.push_back(enc_addi(1, 1, -1));      // 20 x1 -= 1
    p.push_back(enc_bne (1, 0, -24));     // 24 loop while x1 != 0
    p.push_back(enc_addi(7, 0, 7));       // 28
    p.push_back(enc_addi(8, 0, 1));       // 2c
    p.push_back(enc_addi(9, 0, 2));       // 30
    p.push_back(enc_add (10, 7, 7));      // 34 x7 from three slots back
    p.push_back(enc_bne (8, 8, 8));       // 38 not taken
    p.push_back(enc_lw  (11, 0, 72));     // 3c
    p.push_back(enc_sw  (11, 0, 128));    // 40 store the loaded word
    p.push_back(enc_lw  (12, 0, 128));    // 44
    p.push_back(enc_bne (12, 0, 8));      // 48 taken: skip next
    p.push_back(enc_addi(13, 0, 99));     // 4c squashed
    p.push_back(enc_add (14, 12, 10));    // 50
    p.push_back(enc_addi(30, 14, 0));     // 54 end
  endfunction

  // random program: a prologue that stores zero to the 16 words at 256..316
  // and sets x15 = 256, a random body over x1..x8, and the end marker
  function automatic void prog_random(output logic [31:0] p[$], input int len);
    p = {};
    p.push_back(enc_addi(15, 0, 256));
    for (int k = 0; k < 16; k++) p.push_back(enc_sw(0, 15, 4 * k));
    for (int n = 0; n < len; n++) begin
      int rd  = 1 + int'($urandom % 8);
      int rs1 = int'($urandom % 9);
      int rs2 = int'($urandom % 9);
      int off = 4 * int'($urandom % 16);
      case ($urandom % 8)
        0, 1: p.push_back(enc_add(rd, rs1, rs2));
        2, 3: p.push_back(enc_addi(rd, rs1, int'($urandom % 101) - 50));
        4:    p.push_back(($urandom % 2) ? enc_lw(rd, 15, off) : enc_lw(rd, 0, 256 + off));
        5:    p.push_back(enc_sw(rs2, 15, off));
        6:    p.push_back(enc_bne(rs1, rs2, 8 + 4 * int'($urandom % 2)));
        default: p.push_back(enc_add(rd, rd, rs1));
      endcase
    end
    p.push_back(NOP);
    p.push_back(NOP);
    p.push_back(enc_addi(30, 0, 1));
  endfunction

endpackage
