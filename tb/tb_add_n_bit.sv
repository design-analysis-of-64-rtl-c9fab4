// tb_add_n_bit: self-checking test of the adder at its default width (96
// bits) and at 6 bits (the width of the 4x4 level's wide adders), which is
// tested exhaustively. Expected sums are formed in a wider variable and
// truncated, so carries into and out of every bit position are checked,
// including the dropped carry out of the top bit. Random and corner operands
// (all ones, single set bits) exercise the 96-bit instance.
module tb_add_n_bit;
  localparam int unsigned W = 96;
  logic [W-1:0] i1, i2, ans;
  logic [5:0]   s1, s2, sans;
  int           checks = 0, failures = 0;

  add_n_bit               dut   (.input1(i1), .input2(i2), .answer(ans));
  add_n_bit #(.WIDTH(6))  dut6  (.input1(s1), .input2(s2), .answer(sans));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check96(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] wide;
    i1 = x; i2 = y;
    wide = {1'b0, x} + {1'b0, y};
    #1;
    checks++;
    if (ans !== wide[W-1:0]) begin
      failures++;
      $display("FAIL %h + %h: got %h want %h", x, y, ans, wide[W-1:0]);
    end
  endtask

  initial begin
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        s1 = 6'(x); s2 = 6'(y);
        #1;
        checks++;
        if (sans !== 6'((x + y) % 64)) begin
          failures++;
          $display("FAIL6 %0d + %0d: got %0d", x, y, sans);
        end
      end
    check96('1, 96'd1);
    check96('1, '1);
    check96('0, '0);
    for (int k = 0; k < W; k++) check96(W'(1) << k, W'(1) << k);
    for (int k = 0; k < 2000; k++)
      check96({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
