// vedic_mul4: 4x4-bit unsigned Vedic multiplier (top level).
//
// The Urdhva Tiryagbhyam rule is applied to 2-bit digits. Writing
// a = aH:aL and b = bH:bL with 2-bit halves, four 2x2 Urdhva multipliers
// form the digit products at once:
//   m0 = aL*bL (weight 1), m1 = aL*bH and m2 = aH*bL (weight 4, the
//   crosswise pair), m3 = aH*bH (weight 16).
// They are then summed by three 4-bit ripple carry adders and a half adder:
//   - s[1:0] is m0[1:0], which nothing else reaches.
//   - Adder A adds the crosswise pair m2 + m1 into t1, carry c1.
//   - Adder B adds t1 and m0[3:2] (zero-extended) into t2, carry c2;
//     s[3:2] is t2[1:0].
//   - The half adder merges c1 and c2 (both weigh 64) into hc:hs.
//   - Adder C adds m3 and {hc, hs, t2[3:2]} into s[7:4].
// The product of two 4-bit numbers is at most 225, so adder C never
// carries out; its carry-out is left unconnected for that reason. c1 and
// c2 are never both 1 either, so hc stays 0 for every input, but it is kept
// as the structure prescribes.
//
// Interface: a and b in, s = a * b out. Purely combinational: s settles one
// propagation delay after a or b change. There is no clock or reset.
//
// Everything above (the four digit multipliers, which digits each one
// takes, the three 4-bit adders, the half adder and where each result bit
// is taken) follows the design description. The bit order in which the
// half adder outputs enter adder C is this design's reading, fixed by the
// weights of the signals.
module vedic_mul4 (
  input  logic [3:0] a,  // A3..A0
  input  logic [3:0] b,  // B3..B0
  output logic [7:0] s   // S7..S0 = a * b
);

  logic [3:0] m0, m1, m2, m3;  // 2x2 digit products
  logic [3:0] t1, t2;          // sums of adders A and B
  logic       c1, c2;          // carry-outs of adders A and B
  logic       hs, hc;          // half adder merging c1 and c2
  logic       cout_unused;     // carry-out of adder C, always 0

  // Digit products
  vedic_mul2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(m0));
  vedic_mul2 u_m1 (.a(a[1:0]), .b(b[3:2]), .p(m1));
  vedic_mul2 u_m2 (.a(a[3:2]), .b(b[1:0]), .p(m2));
  vedic_mul2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(m3));

  // Adder A: crosswise products
  rca4 u_add_a (
    .x    (m2),
    .y    (m1),
    .cin  (1'b0),
    .sum  (t1),
    .cout (c1)
  );

  // Adder B: add the upper half of m0
  rca4 u_add_b (
    .x    (t1),
    .y    ({2'b00, m0[3:2]}),
    .cin  (1'b0),
    .sum  (t2),
    .cout (c2)
  );

  // Merge the two middle carries
  half_adder u_ha (
    .a     (c1),
    .b     (c2),
    .sum   (hs),
    .carry (hc)
  );

  // Adder C: high nibble
  rca4 u_add_c (
    .x    (m3),
    .y    ({hc, hs, t2[3:2]}),
    .cin  (1'b0),
    .sum  (s[7:4]),
    .cout (cout_unused)
  );

  assign s[3:0] = {t2[1:0], m0[1:0]};

endmodule
