// tb_mod_reduce: random and corner-case check of the Wallace-tree-like
// reducer. Instances: the default (32 bits, mod 7), 32 bits mod 3 and mod 15,
// 64 bits mod 7, and an odd 71-bit input mod 31. Each result (the N-bit res
// and the carry-save pair) is compared with the input's residue computed by
// the % operator.
module tb_mod_reduce;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [31:0] x32;
  logic [63:0] x64;
  logic [70:0] x71;

  logic [2:0] r_d, a_d, b_d;       // default: WIN 32, N 3
  logic [1:0] r_2, a_2, b_2;       // WIN 32, N 2
  logic [3:0] r_4, a_4, b_4;       // WIN 32, N 4
  logic [2:0] r_64, a_64, b_64;    // WIN 64, N 3
  logic [4:0] r_71, a_71, b_71;    // WIN 71, N 5

  mod_reduce                         dut_d  (.in(x32), .cs_a(a_d),  .cs_b(b_d),  .res(r_d));
  mod_reduce #(.N(2))                dut_2  (.in(x32), .cs_a(a_2),  .cs_b(b_2),  .res(r_2));
  mod_reduce #(.N(4))                dut_4  (.in(x32), .cs_a(a_4),  .cs_b(b_4),  .res(r_4));
  mod_reduce #(.N(3), .WIN(64))      dut_64 (.in(x64), .cs_a(a_64), .cs_b(b_64), .res(r_64));
  mod_reduce #(.N(5), .WIN(71))      dut_71 (.in(x71), .cs_a(a_71), .cs_b(b_71), .res(r_71));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, logic [127:0] x, int n, int r, int ca, int cb);
    logic [127:0] m = 128'((1 << n) - 1);
    int want = int'(x % m);
    checks++;
    if (r % int'(m) != want || (ca + cb) % int'(m) != want) begin
      failures++;
      $display("FAIL %s x=%h want=%0d res=%0d cs=%0d+%0d", tag, x, want, r, ca, cb);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0:       begin x32 = '0; x64 = '0; x71 = '0; end
        1:       begin x32 = '1; x64 = '1; x71 = '1; end
        2:       begin x32 = 32'h8000_0000; x64 = 64'h8000_0000_0000_0000; x71 = 71'h1 << 70; end
        default: begin
          x32 = $urandom();
          x64 = {$urandom(), $urandom()};
          x71 = {7'($urandom()), $urandom(), $urandom()};
        end
      endcase
      @(posedge clk);
      check("32/3",  128'(x32), 3, int'(r_d),  int'(a_d),  int'(b_d));
      check("32/2",  128'(x32), 2, int'(r_2),  int'(a_2),  int'(b_2));
      check("32/4",  128'(x32), 4, int'(r_4),  int'(a_4),  int'(b_4));
      check("64/3",  128'(x64), 3, int'(r_64), int'(a_64), int'(b_64));
      check("71/5",  128'(x71), 5, int'(r_71), int'(a_71), int'(b_71));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
