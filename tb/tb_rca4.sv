// tb_rca4: exhaustive self-checking test of rca4 at its default width (4).
//
// Applies every x, y and cin (512 cases), waits 1 ns for each and compares
// {cout, sum} with x + y + cin computed here. It also counts the cases in
// which a carry ripples through all four bits (x ^ y all ones, cin = 1) and
// fails if there were none. A watchdog ends the run with a failure if it
// has not finished after 10 us.
module tb_rca4;

  localparam int unsigned W = 4;

  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;
  int           full_ripples = 0;

  rca4 dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [W:0] expected;
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {x, y, cin} = (2 * W + 1)'(i);
      #1ns;
      expected = (W + 1)'(x) + (W + 1)'(y) + (W + 1)'(cin);
      if ((x ^ y) == '1 && cin) full_ripples++;
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%0b got %0d expected %0d",
                 x, y, cin, {cout, sum}, expected);
      end
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("full-length ripples exercised: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
