// tb_mac_sc: end-to-end check of the single-cycle self-checking MAC at its
// default sizes (32-bit operands, 64-bit accumulator, mod 7 shadow).
//
// Random operations, mostly with full-range operands so that the accumulator
// wraps often, are compared with a reference model that keeps the exact
// accumulator in a 64-bit variable: acc must match, the shadow residue must
// equal acc mod 7 and err must stay low. Errors are then injected for one
// cycle by forcing an internal net, once in the main adder output and once
// in the shadow multiplier output; err must rise on that very edge. Each
// mechanism (wraparound, clear, all-ones shadow zero, back-to-back
// operations, detection of each fault kind) is counted and must occur.
module tb_mac_sc;
  localparam int unsigned W = 32, ACC_W = 64, N = 3;
  localparam int unsigned M = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, clr = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [ACC_W-1:0] acc;
  logic [N-1:0] shadow_res;
  logic err;

  int checks = 0, failures = 0;
  int n_ops = 0, n_wrap = 0, n_clr = 0, n_ones_zero = 0, n_b2b = 0;
  int n_det_main = 0, n_det_shadow = 0;

  mac_sc dut (.clk, .rst_n, .en, .clr, .a, .b, .acc, .shadow_res, .err);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ACC_W-1:0] ref_acc = '0;
  bit prev_en = 1'b0;
  // values forced onto internal nets during fault injection
  logic [ACC_W:0] inj_sum;
  logic [N-1:0]   inj_rp;

  task automatic expect_eq(string what, logic [ACC_W-1:0] got, logic [ACC_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%h want=%h", what, got, want);
    end
  endtask

  // One operation (or idle/clear cycle); fault: 0 none, 1 main adder, 2 shadow multiplier.
  task automatic step(bit do_en, bit do_clr, logic [W-1:0] x, logic [W-1:0] y, int fault);
    logic [ACC_W:0] full;
    @(negedge clk);
    en = do_en; clr = do_clr; a = x; b = y;
    full = {1'b0, ref_acc} + (ACC_W+1)'({{W{1'b0}}, x} * {{W{1'b0}}, y});
    if (fault == 1) begin
      inj_sum = full ^ ((ACC_W+1)'(1) << ($urandom() % ACC_W));
      force dut.sum = inj_sum;
    end else if (fault == 2) begin
      #1 inj_rp = dut.rp ^ N'(1 << ($urandom() % N));
      force dut.rp = inj_rp;
    end
    @(posedge clk);
    #1;
    if (fault == 1) release dut.sum;
    if (fault == 2) release dut.rp;
    if (do_clr) begin
      ref_acc = '0;
      n_clr++;
    end else if (do_en) begin
      n_ops++;
      if (prev_en) n_b2b++;
      if (fault == 0) begin
        if (full[ACC_W]) n_wrap++;
        ref_acc = full[ACC_W-1:0];
      end
    end
    prev_en = do_en && !do_clr;
    if (fault != 0) begin
      checks++;
      if (!err) begin
        failures++;
        $display("FAIL fault kind %0d not detected", fault);
      end else if (fault == 1) n_det_main++;
      else n_det_shadow++;
    end else begin
      expect_eq("acc", acc, ref_acc);
      expect_eq("shadow residue", ACC_W'(shadow_res % N'(M)), ref_acc % ACC_W'(M));
      expect_eq("err", ACC_W'(err), '0);
      if (shadow_res == N'(M)) n_ones_zero++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = int'($urandom() % 100);
      if (i % 500 == 250) begin
        step(1'b1, 1'b0, $urandom(), $urandom(), 1 + (i / 500) % 2);
        step(1'b0, 1'b1, '0, '0, 0);               // resynchronise after the fault
      end else if (r < 2) step(1'b0, 1'b1, '0, '0, 0);
      else if (r < 10) step(1'b0, 1'b0, '0, '0, 0);
      else if (r < 20) step(1'b1, 1'b0, W'($urandom() % 16), W'($urandom() % 16), 0);
      else step(1'b1, 1'b0, $urandom(), $urandom(), 0);
    end
    need("operations", n_ops);
    need("back-to-back operations", n_b2b);
    need("accumulator wraparounds", n_wrap);
    need("clears", n_clr);
    need("shadow zero as all ones", n_ones_zero);
    need("main-path faults detected", n_det_main);
    need("shadow faults detected", n_det_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
