// tb_gen_imm: builds instructions of every format from a chosen immediate
// (field placement per the RV32I encoding, written out independently here)
// and checks that the decoder returns the format flags and the immediate.
module tb_gen_imm;
  import rv_pkg::*;
  logic [31:0] ir, imm;
  itype_t      ty;
  int checks = 0, failures = 0;

  gen_imm dut (.ir, .imm, .ty);

  task automatic expect_dec(input string what, input logic [31:0] insn,
                            input logic [6:0] flags, input logic [31:0] exp_imm);
    ir = insn;
    #1;
    checks += 2;
    if (ty !== flags) begin failures++; $display("FAIL %s flags %b exp %b", what, ty, flags); end
    if (imm !== exp_imm) begin failures++; $display("FAIL %s imm %h exp %h", what, imm, exp_imm); end
  endtask

  initial begin
    //                         r i s b u j ld
    for (int n = 0; n < 100; n++) begin
      int v;
      logic [31:0] x;
      // I: addi / lw, 12-bit signed
      v = int'($urandom % 4096) - 2048;
      x = 32'(v);
      expect_dec("addi", {x[11:0], 5'd3, 3'b000, 5'd4, 7'b0010011}, 7'b0100000, x);
      expect_dec("lw",   {x[11:0], 5'd3, 3'b010, 5'd4, 7'b0000011}, 7'b0100001, x);
      // S: sw
      expect_dec("sw", {x[11:5], 5'd7, 5'd3, 3'b010, x[4:0], 7'b0100011}, 7'b0010000, x);
      // B: bne, even 13-bit signed
      v = (int'($urandom % 4096) - 2048) * 2;
      x = 32'(v);
      expect_dec("bne", {x[12], x[10:5], 5'd2, 5'd1, 3'b001, x[4:1], x[11], 7'b1100011},
                 7'b0001000, x);
      // U: lui
      x = {$urandom % (1 << 20), 12'b0};
      x = {x[31:12], 12'b0};
      expect_dec("lui", {x[31:12], 5'd5, 7'b0110111}, 7'b0000100, x);
      // J: jal, even 21-bit signed
      v = (int'($urandom % (1 << 20)) - (1 << 19)) * 2;
      x = 32'(v);
      expect_dec("jal", {x[20], x[10:1], x[11], x[19:12], 5'd1, 7'b1101111}, 7'b0000010, x);
      // R: add
      expect_dec("add", {7'b0, 5'd2, 5'd1, 3'b000, 5'd3, 7'b0110011}, 7'b1000000, 32'd0);
    end
    expect_dec("addi -1", 32'hfff0_0093, 7'b0100000, 32'hffff_ffff);  // addi x1,x0,-1
    expect_dec("bne -4", 32'hfe20_9ee3, 7'b0001000, 32'hffff_fffc);   // bne x1,x2,-4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
