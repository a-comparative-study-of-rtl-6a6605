// tb_half_adder: exhaustive self-checking test of half_adder.
//
// Applies all four input pairs, waits 1 ns for each to settle and compares
// sum and carry with the arithmetic sum a + b computed here. A watchdog
// ends the run with a failure if it has not finished after 1 us.
module tb_half_adder;

  logic a, b, sum, carry;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] expected;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1ns;
      expected = 2'(a) + 2'(b);
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b got carry=%0b sum=%0b expected %02b",
                 a, b, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
