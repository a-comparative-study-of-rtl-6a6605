// vedic_mul2: 2x2-bit unsigned multiplier after the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule.
//
// Four AND gates form the bit products. The vertical product a0&b0 is
// p[0] directly. The two crosswise products a1&b0 and a0&b1 are added by a
// half adder whose sum is p[1]. Its carry is added to the second vertical
// product a1&b1 by a second half adder, whose sum is p[2] and carry p[3].
// Purely combinational, no clock or reset.
//
// The structure (AND gates and two half adders, and which product enters
// which adder) follows the design description exactly.
module vedic_mul2 (
  input  logic [1:0] a,  // A1..A0
  input  logic [1:0] b,  // B1..B0
  output logic [3:0] p   // P3..P0 = a * b
);

  logic a0b0, a1b0, a0b1, a1b1;  // bit products
  logic c_cross;                 // carry of the crosswise sum

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  half_adder u_ha_cross (
    .a     (a0b1),
    .b     (a1b0),
    .sum   (p[1]),
    .carry (c_cross)
  );

  half_adder u_ha_high (
    .a     (a1b1),
    .b     (c_cross),
    .sum   (p[2]),
    .carry (p[3])
  );

endmodule
