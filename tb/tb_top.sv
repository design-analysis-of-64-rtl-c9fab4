// tb_top: end-to-end self-checking test of the 64-bit Vedic multiplier at its
// full size (no parameters are overridden). It first applies the reference
// operation a = 345, b = 678, whose product is 233910 with the upper half of
// out zero, then corner operands and random 64-bit operands, and compares out
// with the testbench's own 128-bit a*b. Coverage counters make sure each of
// the following happened at least once, and count a failure otherwise:
//   ref_op     the 345 x 678 reference operation
//   hi_half    a product reaching into out[127:64] (all four 32x32 partial
//              products and all adder levels carry data)
//   full_carry all-ones operands: every adder in the tree carries end to end
//   cross_only a product whose low 32x32 term is zero (only the upper and
//              crosswise partial products contribute)
// A watchdog ends the run with a failure if the stimulus does not finish.
module tb_top;
  logic [63:0]  a, b;
  logic [127:0] out;
  int           checks = 0, failures = 0;
  int           n_ref = 0, n_hi = 0, n_full = 0, n_cross = 0;

  top dut (.a(a), .b(b), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] expected;
    a = x; b = y;
    expected = 128'(x) * 128'(y);
    #1;
    checks++;
    if (out !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h want %h", x, y, out, expected);
    end
    if (expected[127:64] != 0)                  n_hi++;
    if (x == '1 && y == '1)                     n_full++;
    if ((x[31:0] == 0 || y[31:0] == 0) && expected != 0) n_cross++;
  endtask

  initial begin
    // Reference operation: 345 x 678 = 233910, out[63:32] = 0.
    check(64'd345, 64'd678);
    checks++;
    if (out[31:0] !== 32'd233910 || out[127:32] !== '0) begin
      failures++;
      $display("FAIL reference: out[31:0]=%0d out[63:32]=%0d", out[31:0], out[63:32]);
    end else n_ref++;

    check('1, '1);
    check('1, 64'd1);
    check(64'd0, '1);
    check({32'hFFFF_FFFF, 32'd0}, {32'hFFFF_FFFF, 32'd0});
    check({32'h8000_0000, 32'd0}, 64'h0000_0001_0000_0001);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) check(64'(1) << i, 64'(1) << j);
    for (int k = 0; k < 20000; k++)
      check({$urandom, $urandom}, {$urandom, $urandom});
    for (int k = 0; k < 200; k++)
      check({$urandom, 32'd0}, {$urandom, $urandom});

    $display("coverage: ref_op=%0d hi_half=%0d full_carry=%0d cross_only=%0d",
             n_ref, n_hi, n_full, n_cross);
    if (n_ref == 0)   failures++;
    if (n_hi == 0)    failures++;
    if (n_full == 0)  failures++;
    if (n_cross == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
