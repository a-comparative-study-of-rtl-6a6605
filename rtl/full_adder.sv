// full_adder: one-bit full adder built from two XOR gates and a 2:1 MUX.
//
// The first XOR forms the propagate signal p = a ^ b. The second XOR gives
// the sum, p ^ cin. The multiplexer, steered by p, forms the carry: when the
// two addends differ (p = 1) the incoming carry passes through; when they
// are equal (p = 0) both are the carry-out, so a is selected. Purely
// combinational, no clock or reset.
//
// The gate list (two XORs and one MUX) follows the design description.
// Which signals drive the MUX select and data inputs is not spelt out
// there; the propagate-select arrangement above is this design's choice,
// being the only one that builds a full adder from exactly these gates.
module full_adder (
  input  logic a,    // first addend
  input  logic b,    // second addend
  input  logic cin,  // carry in
  output logic sum,  // a ^ b ^ cin
  output logic cout  // majority(a, b, cin)
);

  logic p;  // propagate: the addends differ

  always_comb begin
    p    = a ^ b;          // XOR 1
    sum  = p ^ cin;        // XOR 2
    cout = p ? cin : a;    // 2:1 MUX, select = p
  end

endmodule
