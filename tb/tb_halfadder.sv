// tb_halfadder: exhaustive self-checking testbench for the half adder.
// The four input pairs are applied and {carry, sum} is compared with the
// integer a + b. A time-based watchdog guards against a hang.
module tb_halfadder;

  logic a, b, sum, carry;
  int checks = 0;
  int failures = 0;

  halfadder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        a = 1'(i);
        b = 1'(j);
        #1;
        checks++;
        if (int'({carry, sum}) != i + j) begin
          failures++;
          $display("FAIL halfadder %0d+%0d: carry=%0b sum=%0b", i, j, carry, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
