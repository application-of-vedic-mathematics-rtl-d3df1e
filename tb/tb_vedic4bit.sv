// tb_vedic4bit: end-to-end self-checking testbench for the 4x4 Vedic
// multiplier at its only (default) configuration.
//
// 1. The two worked examples: 0100 x 0010 = 00001000, and 0010 x 1000 =
//    00010000 together with that example's internal values (half products
//    s0..s3, aligned term sp, adder sums lo1 and lo2, carries c1 and c2).
// 2. All 256 operand pairs. For each, the product is compared with P*Q
//    computed as an integer, and every intermediate stage is compared with
//    a value computed from the operand halves in integer arithmetic:
//    {c1,lo1} = pl*qu + pu*ql, sp = {(pu*qu) mod 4, (pl*ql) div 4},
//    {c2,lo2} = lo1 + sp, {hc,hs} = c1 + c2.
// 3. Every carry path of the datapath is counted: Ad1 carry, Ad2 carry,
//    the half-adder sum, the internal look-ahead carry of the 2-bit adder,
//    and no carry at all. A path never exercised counts as a failure.
//    Ad1 and Ad2 never carry together (Ad1 carries only for 15 x 15, where
//    Ad2 does not), so the half-adder carry can never be 1; the sweep
//    checks that it indeed never is.
// A time-based watchdog ends the run with a failure if it hangs.
module tb_vedic4bit;

  logic [3:0] P, Q;
  logic [7:0] mult;
  int checks = 0;
  int failures = 0;

  int n_c1_only = 0, n_c2_only = 0, n_both = 0, n_ad3_carry = 0, n_none = 0;

  vedic4bit dut (.P(P), .Q(Q), .mult(mult));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (P=%b Q=%b mult=%b)", what, P, Q, mult);
    end
  endtask

  initial begin
    // Worked example: 4 x 2 = 8.
    P = 4'b0100;
    Q = 4'b0010;
    #1;
    check(mult == 8'b0000_1000, "example 0100 x 0010");

    // Worked example with internal values: 2 x 8 = 16.
    P = 4'b0010;
    Q = 4'b1000;
    #1;
    check(mult == 8'b0001_0000, "example 0010 x 1000");
    check(dut.pl == 2'b10 && dut.pu == 2'b00 && dut.ql == 2'b00 && dut.qu == 2'b10,
          "example halves");
    check(dut.s0 == 4'b0000 && dut.s1 == 4'b0100 && dut.s2 == 4'b0000 && dut.s3 == 4'b0000,
          "example half products");
    check(dut.sp == 4'b0000, "example sp");
    check(dut.lo1 == 4'b0100 && dut.lo2 == 4'b0100, "example adder sums");
    check(dut.c1 == 1'b0 && dut.c2 == 1'b0, "example carries");

    // Exhaustive sweep.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        int xl, xu, yl, yu, xsum, outer, lo1_v, c1_v, sp_v, sum2, lo2_v, c2_v;
        P = 4'(x);
        Q = 4'(y);
        #1;
        xl = x % 4;  xu = x / 4;
        yl = y % 4;  yu = y / 4;
        xsum = xl * yu + xu * yl;
        lo1_v = xsum % 16;
        c1_v  = xsum / 16;
        outer = xu * yu;
        sp_v  = (outer % 4) * 4 + (xl * yl) / 4;
        sum2  = lo1_v + sp_v;
        lo2_v = sum2 % 16;
        c2_v  = sum2 / 16;

        check(int'(mult) == x * y, "product");
        check(int'(dut.lo1) == lo1_v && int'(dut.c1) == c1_v, "Ad1 sum/carry");
        check(int'(dut.sp) == sp_v, "aligned outer products");
        check(int'(dut.lo2) == lo2_v && int'(dut.c2) == c2_v, "Ad2 sum/carry");
        check(int'({dut.hc, dut.hs}) == c1_v + c2_v, "half adder");

        if (c1_v == 1 && c2_v == 0) n_c1_only++;
        if (c1_v == 0 && c2_v == 1) n_c2_only++;
        if (c1_v == 1 && c2_v == 1) n_both++;
        if (c1_v == 0 && c2_v == 0) n_none++;
        if (dut.Ad3.c1) n_ad3_carry++;
        check(dut.hc == 1'b0, "half-adder carry stays 0");
      end
    end

    $display("carry paths: Ad1-only=%0d Ad2-only=%0d both(HA carry)=%0d Ad3-internal=%0d none=%0d",
             n_c1_only, n_c2_only, n_both, n_ad3_carry, n_none);
    check(n_c1_only > 0, "Ad1 carry exercised");
    check(n_c2_only > 0, "Ad2 carry exercised");
    check(n_c1_only + n_c2_only > 0, "half-adder sum exercised");
    check(n_both == 0, "half-adder carry never set");
    check(n_ad3_carry > 0, "2-bit adder look-ahead carry exercised");
    check(n_none > 0, "carry-free case exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
