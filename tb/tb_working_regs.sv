// tb_working_regs: self-checking test of C0-C2, the write decoder and the
// operand mux. The registers are first written with known values, then random
// (regsel, wr_en, d) triples are applied each clock. Before each edge q_sel is
// compared with a model array (regsel 11 must give 1); after the edge the
// model takes the write, ignoring writes to regsel 11.
module tb_working_regs;
  import mpu_pkg::*;
  int checks = 0, failures = 0;
  logic       clk, wr_en;
  regsel_e    regsel;
  logic [7:0] d, q_sel;
  logic [7:0] model [4];

  working_regs #(.WIDTH(8)) dut (.clk(clk), .regsel(regsel), .wr_en(wr_en), .d(d), .q_sel(q_sel));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input int r, input bit w, input logic [7:0] v);
    regsel = regsel_e'(r); wr_en = w; d = 8'(v);
    #1;
    checks++;
    if (q_sel !== model[r]) begin
      failures++;
      $display("FAIL regsel=%0d q_sel=%02h expected %02h", r, q_sel, model[r]);
    end
    @(posedge clk);
    if (w && r != 3) model[r] = v;
    #1;
  endtask

  initial begin
    model[3] = 8'd1;
    regsel = REG_C0; wr_en = 1'b0; d = '0;
    @(posedge clk); #1;
    // initialise the three registers (regsel 11 write must do nothing)
    for (int r = 0; r < 3; r++) begin
      regsel = regsel_e'(r); wr_en = 1'b1; d = 8'(8'h10 * (r + 1));
      @(posedge clk); #1;
      model[r] = 8'(8'h10 * (r + 1));
    end
    cycle(3, 1'b1, 8'hee);
    for (int r = 0; r < 4; r++) cycle(r, 1'b0, 8'h00);
    for (int n = 0; n < 1000; n++)
      cycle($urandom_range(3), 1'($urandom_range(1)), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
