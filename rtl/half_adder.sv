// half_adder: one-bit half adder.
//
// Adds two bits and gives a sum bit and a carry bit. The sum is the
// exclusive-OR of the inputs and the carry their AND. Purely combinational,
// no clock or reset.
//
// The multiplier uses this cell in two places: twice inside every 2x2
// Urdhva multiplier, and once in the 4x4 multiplier to merge the carry-outs
// of its two middle ripple carry adders. Only the function of the cell comes
// from the design description; the XOR/AND realisation is the usual one and
// is this design's choice.
module half_adder (
  input  logic a,     // first addend
  input  logic b,     // second addend
  output logic sum,   // a ^ b
  output logic carry  // a & b
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
