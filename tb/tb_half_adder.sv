// tb_half_adder: exhaustive self-checking test of the half adder. All four
// input pairs are applied, one per time step, and sum/carry are compared with
// the column sum x + y computed by the testbench. A watchdog ends the run
// with a failure if the stimulus does not finish in time.
module tb_half_adder;
  logic x, y, s, c;
  int   checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] expected;
      {x, y} = 2'(i);
      expected = 2'(int'(x) + int'(y));
      #1;
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL x=%0b y=%0b: got c=%0b s=%0b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
