// instr_encoder: the instruction foil's hard-wired instruction matrix, a
// combinational ROM from the PC to a 10-bit instruction word. It holds the
// running-averager program, which computes out = round((in + out_old)/2)
// with one extra bit of resolution (out is twice the average of in):
//    0 LD A,C3   1 SUB A,C3  (A = 0)       2 LD C1,A
//    3 LD C0,IN  4 LD A,C0   5 ADD A,C1    6 INC A    7 LSR A   8 LD C1,A
//    9 LD C0,IN 10 LD A,C0  11 ADD A,C1   12 LD OUT,A 13 LSR A  14 JUMP 2
// ("C3" is Regsel 11, the constant 1). The program follows the published
// listing; address 15, unused by it, holds a NOOP. Words with fewer than
// 2^PC_W addresses are filled with NOOPs as well.
module instr_encoder
  import mpu_pkg::*;
#(
  parameter int unsigned PC_W = 4
) (
  input  logic [PC_W-1:0] pc,
  output instr_t          instr
);

  always_comb begin
    unique case (int'(pc))
      0:       instr = enc_alu(ALU_LD,  REG_ONE);
      1:       instr = enc_alu(ALU_SUB, REG_ONE);
      2:       instr = enc_ldc(REG_C1, 1'b1);
      3:       instr = enc_ldc(REG_C0, 1'b0);
      4:       instr = enc_alu(ALU_LD,  REG_C0);
      5:       instr = enc_alu(ALU_ADD, REG_C1);
      6:       instr = enc_alu(ALU_ADD, REG_ONE);    // INC A
      7:       instr = enc_alu(ALU_LSR, REG_C0);
      8:       instr = enc_ldc(REG_C1, 1'b1);
      9:       instr = enc_ldc(REG_C0, 1'b0);
      10:      instr = enc_alu(ALU_LD,  REG_C0);
      11:      instr = enc_alu(ALU_ADD, REG_C1);
      12:      instr = enc_ldout();
      13:      instr = enc_alu(ALU_LSR, REG_C0);
      14:      instr = enc_jump(4'd2);
      default: instr = enc_nop();
    endcase
  end

endmodule
