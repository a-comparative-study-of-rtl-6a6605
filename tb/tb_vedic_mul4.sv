// tb_vedic_mul4: end-to-end self-checking test of the 4x4 Vedic multiplier.
//
// Runs the multiplier at its only size over all 256 operand pairs, in
// ascending order and then in a random order drawn with $urandom, waiting
// 1 ns after each change. Each product is compared with a * b computed
// here.
//
// Besides the products it counts how often each internal mechanism of the
// structure was exercised, working each one out from the operands alone:
//   - the crosswise adder (aH*bL + aL*bH) carrying out,
//   - the second middle adder (adding the upper half of aL*bL) carrying out,
//   - a nonzero carry word from the half adder reaching the high adder,
//   - the high adder seeing a nonzero second operand (middle sum bits).
// A mechanism that never happened counts as a failure. A watchdog ends the
// run with a failure if it has not finished after 100 us.
module tb_vedic_mul4;

  logic [3:0] a, b;
  logic [7:0] s;
  int         checks = 0;
  int         failures = 0;
  int         n_carry_cross = 0;
  int         n_carry_mid = 0;
  int         n_half_adder = 0;
  int         n_high_add = 0;

  vedic_mul4 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand pair and compare the product.
  task automatic apply(input logic [3:0] av, input logic [3:0] bv);
    int unsigned crosswise, low, mid;
    a = av;
    b = bv;
    #1ns;
    checks++;
    if (s !== 8'(int'(av) * int'(bv))) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %0d expected %0d", av, bv, s,
               int'(av) * int'(bv));
    end
    // Mechanism bookkeeping from the operands only
    crosswise = int'(av[3:2]) * int'(bv[1:0]) + int'(av[1:0]) * int'(bv[3:2]);
    low   = int'(av[1:0]) * int'(bv[1:0]);
    mid   = (crosswise % 16) + (low / 4);
    if (crosswise >= 16) n_carry_cross++;
    if (mid >= 16) n_carry_mid++;
    if (crosswise >= 16 || mid >= 16) n_half_adder++;
    if ((mid % 16) / 4 != 0) n_high_add++;
  endtask

  initial begin : stimulus
    int unsigned order[256];
    int unsigned tmp, j;

    // Ascending sweep
    for (int i = 0; i < 256; i++) apply(4'(i >> 4), 4'(i));

    // The same pairs again in a shuffled order, so that every product is
    // also reached from a different previous input.
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      j        = $urandom_range(i, 0);
      tmp      = order[i];
      order[i] = order[j];
      order[j] = tmp;
    end
    for (int i = 0; i < 256; i++) apply(4'(order[i] >> 4), 4'(order[i]));

    $display("crosswise adder carry-outs:   %0d", n_carry_cross);
    $display("middle adder carry-outs:      %0d", n_carry_mid);
    $display("half adder carries merged:    %0d", n_half_adder);
    $display("middle bits into high adder:  %0d", n_high_add);
    checks += 4;
    if (n_carry_cross == 0) begin
      failures++;
      $display("FAIL the crosswise adder never carried out");
    end
    if (n_carry_mid == 0) begin
      failures++;
      $display("FAIL the middle adder never carried out");
    end
    if (n_half_adder == 0) begin
      failures++;
      $display("FAIL the half adder never received a carry");
    end
    if (n_high_add == 0) begin
      failures++;
      $display("FAIL the high adder never received middle sum bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
