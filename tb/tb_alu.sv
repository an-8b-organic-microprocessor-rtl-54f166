// tb_alu: self-checking test of the ALU. Every operation is applied to the
// corner operands (0, 1, 0x7F, 0x80, 0xFF) in all pairs and to random
// operands; results and overflow are compared with a reference written with
// plain integer arithmetic.
module tb_alu;
  import mpu_pkg::*;

  int checks = 0, failures = 0;
  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       ovf;

  alu #(.WIDTH(8)) dut (.op(op), .a(a), .b(b), .y(y), .overflow(ovf));

  function automatic void ref_model(input int o, input int x, input int z,
                                    output int ry, output int rv);
    rv = 0;
    case (o)
      0: ry = x & z;
      1: ry = x | z;
      2: ry = 255 - x;
      3: ry = z;
      4: begin ry = (x + z) % 256; rv = int'((x + z) > 255); end
      5: begin ry = (x - z + 256) % 256; rv = int'(x < z); end
      6: ry = x / 2;
      default: ry = (x * 2) % 256;
    endcase
  endfunction

  task automatic check(input int o, input int x, input int z);
    int ry, rv;
    op = alu_op_e'(o); a = 8'(x); b = 8'(z);
    #1;
    ref_model(o, x, z, ry, rv);
    checks++;
    if (int'(y) != ry || int'(ovf) != rv) begin
      failures++;
      $display("FAIL op=%0d a=%02h b=%02h y=%02h ovf=%0d exp y=%02h ovf=%0d",
               o, x, z, y, ovf, ry, rv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corner[5] = '{0, 1, 'h7f, 'h80, 'hff};
    for (int o = 0; o < 8; o++)
      foreach (corner[i]) foreach (corner[j]) check(o, corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) check($urandom_range(7), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
