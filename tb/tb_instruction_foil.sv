// tb_instruction_foil: runs the instruction foil from reset and checks the
// opcode(8:0) stream cycle by cycle: after reset (held two clocks) the word
// of address 0 is repeated once, then the words of addresses 1..14 appear
// one per clock (the jump word as a NOOP), then the loop 2..14
// repeats with a period of 13 clocks. A second reset in mid-loop must restart
// the sequence at address 0.
module tb_instruction_foil;
  import mpu_pkg::*;
  import averager_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       clk, reset;
  logic [8:0] opcode;
  int         addr;      // address whose word should be on opcode

  instruction_foil #(.PC_W(4)) dut (.clk(clk), .reset(reset), .opcode(opcode));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk); #1;
      addr = (addr == 14) ? 2 : addr + 1;
      checks++;
      if (opcode !== EXP_WORDS[addr][8:0]) begin
        failures++;
        $display("FAIL opcode=%b expected word %0d (%b)", opcode, addr, EXP_WORDS[addr][8:0]);
      end
    end
  endtask

  initial begin
    reset = 1;
    repeat (2) @(posedge clk);
    #1;
    addr = 0;
    checks++;
    if (opcode !== EXP_WORDS[0][8:0]) begin
      failures++;
      $display("FAIL opcode during reset=%b", opcode);
    end
    reset = 0;
    // the PC still holds 0 at the first edge after release: word 0 twice
    addr = -1;
    run(15 + 13 * 5);
    // reset mid-loop
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    @(posedge clk); #1;                  // PC was 0 after the reset edge
    addr = 0;
    checks++;
    if (opcode !== EXP_WORDS[0][8:0]) begin
      failures++;
      $display("FAIL opcode after reset=%b", opcode);
    end
    run(60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
