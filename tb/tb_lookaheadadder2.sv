// tb_lookaheadadder2: exhaustive self-checking testbench for the 2-bit
// carry look-ahead adder. All 16 operand pairs are applied and sum is
// compared with (a + b) mod 4. A time-based watchdog guards against a hang.
module tb_lookaheadadder2;

  logic [1:0] a, b, sum;
  int checks = 0;
  int failures = 0;

  lookaheadadder2 dut (.a(a), .b(b), .sum(sum));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(sum) != (i + j) % 4) begin
          failures++;
          $display("FAIL lookaheadadder2 %0d+%0d: got %0d", i, j, sum);
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
