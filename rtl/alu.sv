// alu: the processor's 8-bit arithmetic and logic unit (combinational).
// y = f(a, b) with a the accumulator and b the register-select mux output
// (C0, C1, C2 or the constant 1). op is opcode(2:0):
//   000 AND  001 OR  010 NOT a  011 pass b (LD)
//   100 ADD  101 SUB (a - b)  110 logical shift right a  111 shift left a
// INC and DEC are ADD and SUB with b = 1. The operation set and codes follow
// the published instruction table. The right shift is logical, as in that
// table and its measured results, although a prose description calls it
// arithmetic. The meaning of the overflow pin is this design's choice: the
// carry out of ADD or the borrow of SUB, i.e. the unsigned result left
// 0..2^WIDTH-1; it is 0 for every other operation.
module alu
  import mpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             overflow
);

  logic [WIDTH:0] sum;   // WIDTH+1 bits: MSB is carry (ADD) or borrow (SUB)

  always_comb begin
    sum      = '0;
    y        = '0;
    overflow = 1'b0;
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_NOT: y = ~a;
      ALU_LD:  y = b;
      ALU_ADD: begin
        sum      = {1'b0, a} + {1'b0, b};
        y        = sum[WIDTH-1:0];
        overflow = sum[WIDTH];
      end
      ALU_SUB: begin
        sum      = {1'b0, a} - {1'b0, b};
        y        = sum[WIDTH-1:0];
        overflow = sum[WIDTH];
      end
      ALU_LSR: y = {1'b0, a[WIDTH-1:1]};
      ALU_LSL: y = {a[WIDTH-2:0], 1'b0};
      default: y = '0;
    endcase
  end

endmodule
