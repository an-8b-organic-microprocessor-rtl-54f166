// working_regs: the three working registers C0, C1, C2 with their write
// decoder and the operand mux that feeds the ALU's second input.
// When wr_en (opcode(6)) is 1 the decoder enables the register named by
// regsel (opcode(8:7)); regsel = 11 names the constant 1 and writes nothing.
// q_sel is combinational: C0, C1, C2 or the constant 1 for regsel 00..11.
// Writes land on the rising clock edge. The decoder table, the four mux
// inputs and the constant follow the published block diagram; there is no
// reset, as on the processor foil.
module working_regs
  import mpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  regsel_e          regsel,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q_sel
);

  logic [2:0]       en;     // decoder outputs EN(C0), EN(C1), EN(C2)
  logic [WIDTH-1:0] c [3];

  always_comb begin
    en = '0;
    if (wr_en && regsel != REG_ONE) en[regsel] = 1'b1;
  end

  for (genvar i = 0; i < 3; i++) begin : g_c
    en_reg #(.WIDTH(WIDTH)) u_c (.clk(clk), .en(en[i]), .d(d), .q(c[i]));
  end

  always_comb begin
    unique case (regsel)
      REG_C0:  q_sel = c[0];
      REG_C1:  q_sel = c[1];
      REG_C2:  q_sel = c[2];
      REG_ONE: q_sel = WIDTH'(1);
      default: q_sel = WIDTH'(1);
    endcase
  end

endmodule
