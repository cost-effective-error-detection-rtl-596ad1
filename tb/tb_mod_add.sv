// tb_mod_add: exhaustive check of the end-around-carry adder for N = 2, 3, 4
// and 5: the output must equal (a + b) mod (2^N - 1), where all ones is
// accepted as a second encoding of zero. Both encodings of zero must occur.
module tb_mod_add;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   zero_ones = 0;

  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;

  mod_add #(.N(2)) dut2 (.a(a2), .b(b2), .s(s2));
  mod_add          dut3 (.a(a3), .b(b3), .s(s3));
  mod_add #(.N(4)) dut4 (.a(a4), .b(b4), .s(s4));
  mod_add #(.N(5)) dut5 (.a(a5), .b(b5), .s(s5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, int got);
    int m = (1 << n) - 1;
    checks++;
    if (got >= (1 << n) || (got % m) != ((x + y) % m)) begin
      failures++;
      $display("FAIL N=%0d %0d + %0d -> %0d", n, x, y, got);
    end
    if (got == m) zero_ones++;
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y);
        a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
        @(posedge clk);
        if (x < 4 && y < 4)   check(2, x, y, int'(s2));
        if (x < 8 && y < 8)   check(3, x, y, int'(s3));
        if (x < 16 && y < 16) check(4, x, y, int'(s4));
        check(5, x, y, int'(s5));
      end
    checks++;
    if (zero_ones == 0) begin
      failures++;
      $display("FAIL all-ones zero never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
