// tb_full_adder: exhaustive self-checking test of full_adder.
//
// Applies all eight input combinations, waits 1 ns for each to settle and
// compares {cout, sum} with the arithmetic sum a + b + cin computed here.
// A watchdog ends the run with a failure if it has not finished after 1 us.
module tb_full_adder;

  logic a, b, cin, sum, cout;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] expected;
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1ns;
      expected = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b sum=%0b expected %02b",
                 a, b, cin, cout, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
