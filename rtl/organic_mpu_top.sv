// organic_mpu_top: the complete two-foil system, an instruction foil wired
// 1-to-1 to the 8-bit processor foil on one common clock.
// The instruction foil steps through its stored program (the running
// averager) and presents opcode(8:0); the processor executes each word one
// clock after it appears. With the stored program the output register is
// rewritten once every 13 clocks with twice the running average of in(7:0).
// Ports: clk, reset (instruction-foil reset, synchronous), in_data, and the
// processor pins out_data and overflow; the foil-to-foil opcode bus is also
// brought out so that it can be observed. Sharing the clock between the two
// foils is this design's choice.
module organic_mpu_top
  import mpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned PC_W  = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [WIDTH-1:0]    in_data,
  output logic [WIDTH-1:0]    out_data,
  output logic                overflow,
  output logic [OPCODE_W-1:0] opcode
);

  instruction_foil #(.PC_W(PC_W)) u_ifoil (
    .clk   (clk),
    .reset (reset),
    .opcode(opcode)
  );

  processor_foil #(.WIDTH(WIDTH)) u_pfoil (
    .clk     (clk),
    .opcode  (opcode),
    .in_data (in_data),
    .out_data(out_data),
    .overflow(overflow)
  );

endmodule
