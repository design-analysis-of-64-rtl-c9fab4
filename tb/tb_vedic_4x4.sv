// tb_vedic_4x4: exhaustive self-checking test of the 4x4 Vedic multiplier.
// Every operand pair is applied, one per time step, and the product is
// compared with the testbench's own a*b computed at full width. A watchdog
// ends the run with a failure if the sweep does not finish in time.
module tb_vedic_4x4;
  logic [4-1:0]  a, b;
  logic [8-1:0] c;
  int              checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**4; x++)
      for (int y = 0; y < 2**4; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks++;
        if (c !== 8'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
