// rca4: ripple carry adder, WIDTH bits wide (4 in the multiplier).
//
// A chain of WIDTH full adders. Bit i adds x[i], y[i] and the carry out of
// bit i-1; the carry into bit 0 is cin and the carry out of the top bit is
// cout. The result settles after the carry has rippled through the whole
// chain, so the delay grows linearly with WIDTH. Purely combinational, no
// clock or reset.
//
// The ripple structure and the four-bit width follow the design
// description. The carry input is this design's addition: the 4x4
// multiplier ties it to 0, which the description implies by using plain
// two-operand adders.
module rca4 #(
  parameter int unsigned WIDTH = 4  // adder width in bits
) (
  input  logic [WIDTH-1:0] x,    // first operand
  input  logic [WIDTH-1:0] y,    // second operand
  input  logic             cin,  // carry into bit 0
  output logic [WIDTH-1:0] sum,  // (x + y + cin) mod 2**WIDTH
  output logic             cout  // carry out of bit WIDTH-1
);

  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a    (x[i]),
      .b    (y[i]),
      .cin  (c[i]),
      .sum  (sum[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
