// tb_organic_mpu_top: end-to-end test of the two connected foils running the
// stored running-averager program at the default sizes.
// After reset the output register must be rewritten every 13 clocks, first 14
// clocks after the last clock edge with reset high, and hold in between. The input is
// changed only right after an output update, so that both input samples of a
// loop see the same value, and each update is compared with a loop-level
// model of the algorithm. The stimulus replays the step from 0 to 7 (outputs
// 0B, 0D, 0E), then random inputs including large ones that make the adder
// overflow, then a reset in mid-run that must restart the averager from 0.
// Each mechanism (reset, jump, LD C from IN and from A, INC through the
// constant register, ADD, SUB, LSR, LD OUT, overflow) is counted and must
// occur at least once.
module tb_organic_mpu_top;
  import averager_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       clk, reset;
  logic [7:0] in_data, out_data;
  logic       overflow;
  logic [8:0] opcode;

  organic_mpu_top dut (
    .clk(clk), .reset(reset), .in_data(in_data),
    .out_data(out_data), .overflow(overflow), .opcode(opcode));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // mechanism counters, from the pins and the foil-to-foil opcode bus
  int n_reset, n_jump_nop, n_ldc_in, n_ldc_a, n_inc, n_add, n_sub, n_lsr, n_ldout, n_ovf;

  always @(posedge clk) begin : count
    if (reset) n_reset <= n_reset + 1;
    else begin
      if (opcode[6:4] == 3'b000)                        n_jump_nop <= n_jump_nop + 1;  // NOOP in place of the jump
      if (opcode[6] && !opcode[3])                      n_ldc_in <= n_ldc_in + 1;
      if (opcode[6] &&  opcode[3])                      n_ldc_a <= n_ldc_a + 1;
      if (opcode[5] && opcode[2:0] == 3'b100 && opcode[8:7] == 2'b11) n_inc <= n_inc + 1;
      if (opcode[5] && opcode[2:0] == 3'b100 && opcode[8:7] != 2'b11) n_add <= n_add + 1;
      if (opcode[5] && opcode[2:0] == 3'b101)           n_sub <= n_sub + 1;
      if (opcode[5] && opcode[2:0] == 3'b110)           n_lsr <= n_lsr + 1;
      if (opcode[4])                                    n_ldout <= n_ldout + 1;
      if (overflow)                                     n_ovf <= n_ovf + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s, exp_out;

  // Run `loops` output periods; kind picks the input of each period:
  // 0 the step 0,0,7,7,..  1 random 0..63  2 random 128..255  3 constant 7.
  task automatic run_loops(input int loops, input int kind);
    logic [7:0] held;
    int x;
    for (int l = 0; l < loops; l++) begin
      case (kind)
        0: x = (l < 2) ? 0 : 7;                      // step 0 -> 7
        1: x = $urandom_range(63);                   // six-bit converter range
        3: x = 7;
        default: x = $urandom_range(128, 255);       // large: adder overflows
      endcase
      in_data = 8'(x);
      avg_loop(x, s, exp_out);
      // 12 clocks where Out must hold, then the update clock
      for (int c = 0; c < 12; c++) begin
        held = out_data;
        @(posedge clk); #1;
        checks++;
        if (out_data !== held) begin
          failures++;
          $display("FAIL out changed off-schedule: %02h -> %02h", held, out_data);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (int'(out_data) != exp_out) begin
        failures++;
        $display("FAIL loop %0d in=%0d out=%02h expected %02h", l, x, out_data, exp_out);
      end
    end
  endtask

  task automatic do_reset();
    reset = 1;
    repeat (2) @(posedge clk);
    #1;
    reset = 0;
    s = 0;
    // word 0 is on the opcode bus for two clocks after the last reset edge,
    // so the first LD OUT executes 14 clocks after it; two of them here
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    in_data = 0;
    do_reset();
    // first loop: 12 more clocks after the one above
    in_data = 0;
    avg_loop(0, s, exp_out);
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (int'(out_data) != exp_out) begin
      failures++;
      $display("FAIL first output %02h expected %02h", out_data, exp_out);
    end
    run_loops(5, 0);
    // a step from 0 to 7 right at reset: expect 0B, 0D, 0E
    do_reset();
    in_data = 7;
    avg_loop(7, s, exp_out);
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (out_data != 8'h0b) begin failures++; $display("FAIL step: %02h expected 0B", out_data); end
    run_loops(2, 3);
    checks++;
    if (out_data != 8'h0e) begin failures++; $display("FAIL step: %02h expected 0E", out_data); end
    run_loops(40, 1);
    run_loops(20, 2);
    // reset in mid-run restarts the averager from 0
    repeat (5) @(posedge clk);
    do_reset();
    in_data = 8'd33;
    avg_loop(33, s, exp_out);
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (int'(out_data) != exp_out) begin
      failures++;
      $display("FAIL after reset %02h expected %02h", out_data, exp_out);
    end
    run_loops(10, 1);

    $display("mechanisms: reset=%0d jump=%0d ldc_in=%0d ldc_a=%0d inc=%0d add=%0d sub=%0d lsr=%0d ldout=%0d overflow=%0d",
             n_reset, n_jump_nop, n_ldc_in, n_ldc_a, n_inc, n_add, n_sub, n_lsr, n_ldout, n_ovf);
    begin
      automatic int counts [10] = '{n_reset, n_jump_nop, n_ldc_in, n_ldc_a, n_inc, n_add, n_sub, n_lsr, n_ldout, n_ovf};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never occurred", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
