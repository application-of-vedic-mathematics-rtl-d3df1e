// tb_lookaheadadder: exhaustive self-checking testbench for the carry
// look-ahead adder. The default 4-bit instance gets all 256 operand pairs;
// a second 6-bit instance (all 4096 pairs) checks that the flattened
// look-ahead carry equations hold for other widths too. Each {carry, sum}
// is compared with the integer sum a + b. A time-based watchdog guards
// against a hang.
module tb_lookaheadadder;

  localparam int unsigned W2 = 6;

  logic [3:0]    a4, b4, s4;
  logic          c4;
  logic [W2-1:0] a6, b6, s6;
  logic          c6;
  int checks = 0;
  int failures = 0;

  lookaheadadder dut4 (.a(a4), .b(b4), .sum(s4), .carry(c4));
  lookaheadadder #(.WIDTH(W2)) dut6 (.a(a6), .b(b6), .sum(s6), .carry(c6));

  initial begin
    a6 = '0;
    b6 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (int'({c4, s4}) != i + j) begin
          failures++;
          $display("FAIL 4-bit %0d+%0d: carry=%0b sum=%0d", i, j, c4, s4);
        end
      end
    end
    for (int i = 0; i < (1 << W2); i++) begin
      for (int j = 0; j < (1 << W2); j++) begin
        a6 = W2'(i);
        b6 = W2'(j);
        #1;
        checks++;
        if (int'({c6, s6}) != i + j) begin
          failures++;
          $display("FAIL %0d-bit %0d+%0d: carry=%0b sum=%0d", W2, i, j, c6, s6);
        end
      end
    end
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
