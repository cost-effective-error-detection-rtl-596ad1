// tb_mod_sub: exhaustive check of the modulo 2^N - 1 subtractor for N = 2, 3
// and 4: (a - b) mod (2^N - 1), all ones accepted as zero.
module tb_mod_sub;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] a2, b2, d2;
  logic [2:0] a3, b3, d3;
  logic [3:0] a4, b4, d4;

  mod_sub #(.N(2)) dut2 (.a(a2), .b(b2), .d(d2));
  mod_sub          dut3 (.a(a3), .b(b3), .d(d3));
  mod_sub #(.N(4)) dut4 (.a(a4), .b(b4), .d(d4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, int got);
    int m = (1 << n) - 1;
    checks++;
    if (got >= (1 << n) || (got % m) != (((x - y) % m + m) % m)) begin
      failures++;
      $display("FAIL N=%0d %0d - %0d -> %0d", n, x, y, got);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y); a4 = 4'(x); b4 = 4'(y);
        @(posedge clk);
        if (x < 4 && y < 4) check(2, x, y, int'(d2));
        if (x < 8 && y < 8) check(3, x, y, int'(d3));
        check(4, x, y, int'(d4));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
