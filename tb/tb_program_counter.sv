// tb_program_counter: self-checking test of the program counter: synchronous
// reset to 0, counting up by one per clock with wrap-around at 15, and
// loading the target in the same cycle the jump input is high (jump has
// priority over counting, reset over jump).
module tb_program_counter;
  int checks = 0, failures = 0;
  logic       clk, reset, jump;
  logic [3:0] target, pc;
  int         model;

  program_counter #(.PC_W(4)) dut (.clk(clk), .reset(reset), .jump(jump), .target(target), .pc(pc));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit r, input bit j, input int t);
    reset = r; jump = j; target = 4'(t);
    @(posedge clk);
    if (r)      model = 0;
    else if (j) model = t;
    else        model = (model + 1) % 16;
    #1;
    checks++;
    if (int'(pc) != model) begin
      failures++;
      $display("FAIL r=%0d j=%0d t=%0d pc=%0d expected %0d", r, j, t, pc, model);
    end
  endtask

  initial begin
    model = 0;
    step(1, 0, 9);
    step(1, 1, 9);                                   // reset wins over jump
    for (int n = 0; n < 20; n++) step(0, 0, 0);      // count and wrap
    step(0, 1, 2);
    step(0, 0, 0);
    for (int n = 0; n < 1000; n++)
      step($urandom_range(15) == 0, $urandom_range(7) == 0, $urandom_range(15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
