// rf2: register file with write-to-read bypassing.
//
// Same storage and ports as rf, but a read port whose address equals the
// write address while we is high returns the write data at once instead of
// the stored value. In the pipelined processor the write-back stage writes
// in the same cycle in which the decode stage reads, so without the bypass
// an instruction three slots behind a producer would read a stale value.
// Register 0 still reads as zero, ahead of the bypass. Follows the
// lecture's RF2; the reset input is this design's addition.
module rf2 #(
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

  logic [XLEN-1:0] q1, q2;
  logic            bp1, bp2;

  rf #(.NREG(NREG), .XLEN(XLEN)) u_rf (
    .clk, .rst, .ra1, .ra2, .rd1(q1), .rd2(q2), .wa, .we, .wd
  );

  assign bp1 = we && (ra1 == wa);
  assign bp2 = we && (ra2 == wa);

  assign rd1 = (ra1 == '0) ? '0 : (bp1 ? wd : q1);
  assign rd2 = (ra2 == '0) ? '0 : (bp2 ? wd : q2);

endmodule
