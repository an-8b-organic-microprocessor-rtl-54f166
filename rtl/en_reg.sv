// en_reg: WIDTH-bit register with load enable, the storage element used for
// the accumulator A, the Out register and the working registers C0-C2.
// On a rising clock edge q takes d when en is 1 and holds otherwise. There is
// no reset, as the processor foil has no reset pin; a program initialises
// every register it reads. Rising-edge triggering is this design's choice.
module en_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (en) q <= d;
  end

endmodule
