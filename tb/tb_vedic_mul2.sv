// tb_vedic_mul2: exhaustive self-checking test of vedic_mul2.
//
// Applies all sixteen pairs of 2-bit operands, waits 1 ns for each and
// compares p with a * b computed here. A watchdog ends the run with a
// failure if it has not finished after 1 us.
module tb_vedic_mul2;

  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0;
  int         failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [3:0] expected;
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1ns;
      expected = 4'(a) * 4'(b);
      checks++;
      if (p !== expected) begin
        failures++;
        $display("FAIL a=%0d b=%0d got %0d expected %0d", a, b, p, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
