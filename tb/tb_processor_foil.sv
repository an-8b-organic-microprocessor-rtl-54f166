// tb_processor_foil: self-checking test of the processor foil driven, like a
// bench tester would, through its opcode, in and clk pins only.
// The registers are first initialised by instructions (the foil has no
// reset). Then every instruction of the instruction table is applied, each
// followed by LD OUT,A so its effect on A shows at the pins, and then random
// nine-bit opcodes (any combination of the write enables). A reference model
// of A, C0-C2 and Out predicts out(7:0) after every clock and the overflow
// pin before every clock; each instruction must complete in one clock.
module tb_processor_foil;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic [8:0] opcode;
  logic [7:0] in_data, out_data;
  logic       overflow;

  int m_a, m_out;
  int m_c [4];

  processor_foil #(.WIDTH(8)) dut (
    .clk(clk), .opcode(opcode), .in_data(in_data), .out_data(out_data), .overflow(overflow));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one opcode for one clock and update the model.
  task automatic exec(input logic [8:0] op, input logic [7:0] din, input bit check_out);
    int rs, b, y, v, code;
    opcode = op; in_data = din;
    rs   = int'(op[8:7]);
    code = int'(op[2:0]);
    b    = (rs == 3) ? 1 : m_c[rs];
    v    = 0;
    case (code)
      0: y = m_a & b;
      1: y = m_a | b;
      2: y = 255 - m_a;
      3: y = b;
      4: begin y = (m_a + b) % 256; v = int'((m_a + b) > 255); end
      5: begin y = (m_a - b + 256) % 256; v = int'(m_a < b); end
      6: y = m_a / 2;
      default: y = (m_a * 2) % 256;
    endcase
    #1;
    if (check_out) begin
      checks++;
      if (int'(overflow) != v) begin
        failures++;
        $display("FAIL op=%b overflow=%0d expected %0d", op, overflow, v);
      end
    end
    @(posedge clk);
    if (op[6] && rs != 3) m_c[rs] = op[3] ? m_a : int'(din);
    if (op[4]) m_out = m_a;
    if (op[5]) m_a = y;
    #1;
    if (check_out) begin
      checks++;
      if (int'(out_data) != m_out) begin
        failures++;
        $display("FAIL op=%b out=%02h expected %02h", op, out_data, m_out);
      end
    end
  endtask

  localparam logic [8:0] LD_OUT = 9'b000010000;

  initial begin
    m_c[3] = 1;
    m_a = 0; m_out = 0; m_c[0] = 0; m_c[1] = 0; m_c[2] = 0;
    // initialise: A = 1 - 1 + in, C0..C2 and Out from A and IN
    exec(9'b110100011, 0, 0);        // LD A,C3
    exec(9'b110100101, 0, 0);        // SUB A,C3 -> 0
    exec(9'b001000000, 8'h3c, 0);    // LD C0,IN
    exec(9'b011001000, 0, 0);        // LD C1,A
    exec(9'b101000000, 8'hc5, 0);    // LD C2,IN
    exec(LD_OUT, 0, 1);
    exec(9'b000100011, 0, 1);        // LD A,C0
    exec(LD_OUT, 0, 1);
    // every table instruction, for every register where it takes one
    for (int rr = 0; rr < 4; rr++) begin
      for (int code = 0; code < 8; code++) begin
        exec({2'(rr), 4'b0100, 3'(code)}, 0, 1);
        exec(LD_OUT, 0, 1);
      end
      if (rr != 3) begin
        exec({2'(rr), 7'b1000000}, 8'($urandom_range(255)), 1);  // LD C,IN
        exec({2'(rr), 4'b0100, 3'b011}, 0, 1);               // LD A,C
        exec(LD_OUT, 0, 1);
        exec({2'(rr), 7'b1001000}, 0, 1);                    // LD C,A
        exec({2'(rr), 4'b0100, 3'b100}, 0, 1);               // ADD A,C
        exec(LD_OUT, 0, 1);
      end
      exec({2'(rr), 7'b0000101}, 0, 1);                      // NOOP
    end
    for (int n = 0; n < 3000; n++)
      exec(9'($urandom_range(511)), 8'($urandom_range(255)), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
