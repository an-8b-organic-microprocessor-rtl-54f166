// program_counter: the instruction foil's PC_W-bit program counter.
// Its write enable is reset OR jump (opcode(9) of the word being fetched).
// When enabled it loads through a 2:1 mux: all zeros during reset, else the
// jump target (low PC_W bits of that word). Otherwise it counts up by one
// each rising clock edge, wrapping at 2^PC_W. Reset is therefore synchronous.
// The OR gate, mux, "0000" constant and 4-bit width follow the published
// instruction-foil diagram; counting up when not loading is implied by the
// sequential program listing.
module program_counter #(
  parameter int unsigned PC_W = 4
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            jump,
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] pc
);

  logic            we;
  logic [PC_W-1:0] load_val;

  assign we       = reset | jump;
  assign load_val = reset ? '0 : target;

  always_ff @(posedge clk) begin
    if (we) pc <= load_val;
    else    pc <= pc + 1'b1;
  end

endmodule
