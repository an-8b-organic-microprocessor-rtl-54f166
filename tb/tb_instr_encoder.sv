// tb_instr_encoder: checks every address of the program ROM against the
// running-averager words written out bit by bit in averager_ref_pkg.
module tb_instr_encoder;
  import mpu_pkg::*;
  import averager_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] pc;
  instr_t     instr;

  instr_encoder #(.PC_W(4)) dut (.pc(pc), .instr(instr));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      pc = 4'(p);
      #1;
      checks++;
      if (instr !== EXP_WORDS[p]) begin
        failures++;
        $display("FAIL pc=%0d word=%b expected %b", p, instr, EXP_WORDS[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
