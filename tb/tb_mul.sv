// tb_mul: exhaustive self-checking testbench for the 2x2 multiplier cell.
// All 16 operand pairs are applied; each product is compared with the
// integer product a*b worked out in the testbench. A time-based watchdog
// ends the run with a failure if it ever hangs.
module tb_mul;

  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0;
  int failures = 0;

  mul dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(q) != i * j) begin
          failures++;
          $display("FAIL mul %0d*%0d: got %0d", i, j, q);
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
