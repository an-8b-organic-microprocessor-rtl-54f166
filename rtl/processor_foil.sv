// processor_foil: the 8-bit organic accumulator processor.
// Datapath: the ALU combines accumulator A with the operand selected by
// Regsel (C0, C1, C2 or the constant 1); its result is written into A when
// opcode(5) is 1. The Out register copies A when opcode(4) is 1 and drives the
// output pins. A 2:1 input mux (opcode(3): 1 = A, 0 = IN) feeds the working
// registers, one of which is written when opcode(6) is 1. Every instruction
// takes one clock: operands are read combinationally and all enabled writes
// happen together on the rising edge. The overflow pin comes straight from
// the ALU and so describes the instruction currently on opcode(8:0).
// Interface: clk, opcode(8:0), in(7:0) in; out(7:0), overflow out, as on the
// foil's connector. The block structure and opcode fields follow the
// published diagram and instruction table; there is no reset pin, so the
// program must initialise every register before it reads it.
module processor_foil
  import mpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                clk,
  input  logic [OPCODE_W-1:0] opcode,
  input  logic [WIDTH-1:0]    in_data,
  output logic [WIDTH-1:0]    out_data,
  output logic                overflow
);

  logic [WIDTH-1:0] acc;       // accumulator A
  logic [WIDTH-1:0] alu_y;
  logic [WIDTH-1:0] operand;   // C0/C1/C2/1
  logic [WIDTH-1:0] c_din;     // input mux: A or IN

  assign c_din = opcode[OP_SRC_A] ? acc : in_data;

  alu #(.WIDTH(WIDTH)) u_alu (
    .op      (alu_op_e'(opcode[2:0])),
    .a       (acc),
    .b       (operand),
    .y       (alu_y),
    .overflow(overflow)
  );

  en_reg #(.WIDTH(WIDTH)) u_acc (
    .clk(clk), .en(opcode[OP_WR_A]), .d(alu_y), .q(acc)
  );

  en_reg #(.WIDTH(WIDTH)) u_out (
    .clk(clk), .en(opcode[OP_WR_OUT]), .d(acc), .q(out_data)
  );

  working_regs #(.WIDTH(WIDTH)) u_cregs (
    .clk   (clk),
    .regsel(regsel_e'(opcode[OP_RSEL_HI:OP_RSEL_LO])),
    .wr_en (opcode[OP_WR_C]),
    .d     (c_din),
    .q_sel (operand)
  );

endmodule
