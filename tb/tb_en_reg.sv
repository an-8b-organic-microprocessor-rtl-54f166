// tb_en_reg: self-checking test of the enabled register. Random data and
// enable are applied each clock; after every rising edge q must equal the
// last value loaded with en = 1 and must not move while en = 0.
module tb_en_reg;
  int checks = 0, failures = 0;
  logic       clk, en;
  logic [7:0] d, q, model;

  en_reg #(.WIDTH(8)) dut (.clk(clk), .en(en), .d(d), .q(q));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; d = 8'h5a;
    @(posedge clk); #1;
    model = 8'h5a;
    for (int n = 0; n < 500; n++) begin
      en = 1'($urandom_range(1)); d = 8'($urandom_range(255));
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%02h expected %02h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
