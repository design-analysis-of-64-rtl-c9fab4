// tb_vedic_16x16: self-checking test of the 16x16 Vedic multiplier. Corner
// operands (zero, one, all ones, single set bits, halves all ones) and
// random operands are applied, one per time step, and the product is
// compared with the testbench's own a*b computed at 32 bits. All-ones
// operands make every adder of the tree carry across its full width. A
// watchdog ends the run with a failure if the stimulus does not finish.
module tb_vedic_16x16;
  localparam int unsigned N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] c;
  int             checks = 0, failures = 0;

  vedic_16x16 dut (.a(a), .b(b), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[N-1:0];
  endfunction

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x; b = y;
    expected = (2*N)'(x) * (2*N)'(y);
    #1;
    checks++;
    if (c !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h want %h", x, y, c, expected);
    end
  endtask

  initial begin
    logic [N-1:0] edges [6];
    edges = '{N'(0), N'(1), '1, {1'b1, {(N-1){1'b0}}}, {(N/2){1'b1}}, {{(N/2){1'b1}}, {(N/2){1'b0}}}};
    foreach (edges[i]) foreach (edges[j]) check(edges[i], edges[j]);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check(N'(1) << i, N'(1) << j);
    for (int k = 0; k < 20000; k++) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
