// instruction_foil: program sequencer that feeds the processor foil.
// The PC addresses the instruction encoder; on each rising clock edge the
// low nine bits of the addressed word, opcode(8:0), are captured in the
// output register that drives the connector, and the PC moves on. If bit 9
// of the word is set the PC instead loads the jump target from bits (3:0);
// a jump word has bits (8:4) clear, so what reaches the processor in its
// place is a NOOP. Reset (synchronous) loads the PC with 0. Timing: the word
// at address p appears on opcode one clock after the PC holds p, and the
// processor executes it on the following edge. The structure follows the
// published instruction-foil diagram; the output register has no reset and
// loads every cycle, so while reset is held it carries the word at address 0.
module instruction_foil
  import mpu_pkg::*;
#(
  parameter int unsigned PC_W = 4
) (
  input  logic                clk,
  input  logic                reset,
  output logic [OPCODE_W-1:0] opcode
);

  logic [PC_W-1:0] pc;
  instr_t          word;

  instr_encoder #(.PC_W(PC_W)) u_enc (.pc(pc), .instr(word));

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk   (clk),
    .reset (reset),
    .jump  (word[OP_JUMP]),
    .target(word[PC_W-1:0]),
    .pc    (pc)
  );

  always_ff @(posedge clk) opcode <= word[OPCODE_W-1:0];

  // A jump word must read as NOOP on the processor: no register writes.
  a_jump_is_nop: assert property (@(posedge clk)
      word[OP_JUMP] |-> (word[OPCODE_W-1:OP_WR_OUT] == '0));

endmodule
