// tb_mod_mul: exhaustive check of the modulo 2^N - 1 multiplier for N = 2,
// 3, 4 and 5: p and cs_a + cs_b must both equal (a * b) mod (2^N - 1),
// all ones accepted as zero.
module tb_mod_mul;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] a2, b2, p2, ca2, cb2;
  logic [2:0] a3, b3, p3, ca3, cb3;
  logic [3:0] a4, b4, p4, ca4, cb4;
  logic [4:0] a5, b5, p5, ca5, cb5;

  mod_mul #(.N(2)) dut2 (.a(a2), .b(b2), .cs_a(ca2), .cs_b(cb2), .p(p2));
  mod_mul          dut3 (.a(a3), .b(b3), .cs_a(ca3), .cs_b(cb3), .p(p3));
  mod_mul #(.N(4)) dut4 (.a(a4), .b(b4), .cs_a(ca4), .cs_b(cb4), .p(p4));
  mod_mul #(.N(5)) dut5 (.a(a5), .b(b5), .cs_a(ca5), .cs_b(cb5), .p(p5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, int got, int ca, int cb);
    int m = (1 << n) - 1;
    checks++;
    if (got % m != (x * y) % m || (ca + cb) % m != (x * y) % m) begin
      failures++;
      $display("FAIL N=%0d %0d * %0d -> p=%0d cs=%0d+%0d", n, x, y, got, ca, cb);
    end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y);
        a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
        @(posedge clk);
        if (x < 4 && y < 4)   check(2, x, y, int'(p2), int'(ca2), int'(cb2));
        if (x < 8 && y < 8)   check(3, x, y, int'(p3), int'(ca3), int'(cb3));
        if (x < 16 && y < 16) check(4, x, y, int'(p4), int'(ca4), int'(cb4));
        check(5, x, y, int'(p5), int'(ca5), int'(cb5));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
