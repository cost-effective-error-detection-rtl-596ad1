// tb_full_adder: exhaustive check of the one-bit full adder against integer
// addition of its three inputs.
module tb_full_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic a, b, ci, s, co;

  full_adder dut (.a, .b, .ci, .s, .co);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
