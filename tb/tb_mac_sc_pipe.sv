// tb_mac_sc_pipe: end-to-end check of the pipelined self-checking MAC at its
// default sizes (32-bit operands, 64-bit accumulator, mod 7 shadow).
//
// One operation may be issued per cycle. The reference model keeps the exact
// accumulator; after every clock edge k the testbench checks acc against the
// reference after edge k, the shadow residue against the reference after
// edge k-1 (the shadow accumulator is one stage behind) and err against the
// fault status of the operation issued at edge k-2: the error must appear
// exactly two cycles after the result, never earlier or later. Faults are
// injected by forcing, for one cycle, the main adder output (seen at
// stage 1) or the shadow multiplier output (seen at stage 2).
module tb_mac_sc_pipe;
  localparam int unsigned W = 32, ACC_W = 64, N = 3;
  localparam int unsigned M = (1 << N) - 1;
  localparam int NCYC = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, clr = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [ACC_W-1:0] acc;
  logic [N-1:0] shadow_res;
  logic err;

  int checks = 0, failures = 0;
  int n_ops = 0, n_wrap = 0, n_clr = 0, n_ones_zero = 0, n_b2b = 0;
  int n_det_main = 0, n_det_shadow = 0, n_err_latency2 = 0;

  mac_sc_pipe dut (.clk, .rst_n, .en, .clr, .a, .b, .acc, .shadow_res, .err);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ACC_W-1:0] ref_hist [NCYC+1];   // reference acc after edge k
  bit               err_hist [NCYC+1];   // op issued at edge k was faulty
  logic [ACC_W:0]   inj_sum;
  logic [N-1:0]     inj_rp;

  task automatic expect_eq(string what, int k, logic [ACC_W-1:0] got, logic [ACC_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL cycle %0d %s got=%h want=%h", k, what, got, want);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-32s %0d", what, n);
  endtask

  initial begin
    logic [ACC_W-1:0] cur;
    logic [ACC_W:0]   full;
    int cooldown = 0;
    int shadow_fault_at = -1;
    int taint_until = 0;
    bit prev_en = 1'b0;
    cur = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      int r;
      int fault;
      @(negedge clk);
      // shadow fault: corrupt the multiplier output during stage 2 of the
      // operation issued at the previous edge
      if (shadow_fault_at == k) begin
        inj_rp = dut.rp ^ N'(1 << ($urandom() % N));
        force dut.rp = inj_rp;
      end
      r = int'($urandom() % 100);
      fault = 0;
      en = 1'b0; clr = 1'b0; a = '0; b = '0;
      if (cooldown > 0) begin
        cooldown--;
        if (cooldown == 0) clr = 1'b1;            // resynchronise after a fault
      end else if (k % 600 == 300) begin
        fault = 1 + (k / 600) % 2;
        en = 1'b1; a = $urandom(); b = $urandom();
        cooldown = 4;
        taint_until = k + 5;                     // shadow cleared at edge k+5
      end else if (r < 2) clr = 1'b1;
      else if (r < 12) en = 1'b0;
      else if (r < 22) begin en = 1'b1; a = W'($urandom() % 16); b = W'($urandom() % 16); end
      else begin en = 1'b1; a = $urandom(); b = $urandom(); end

      full = {1'b0, cur} + (ACC_W+1)'({{W{1'b0}}, a} * {{W{1'b0}}, b});
      if (fault == 1) begin
        inj_sum = full ^ ((ACC_W+1)'(1) << ($urandom() % ACC_W));
        force dut.sum = inj_sum;
      end
      if (fault == 2) shadow_fault_at = k + 1;

      @(posedge clk);
      #1;
      if (fault == 1) release dut.sum;
      if (shadow_fault_at == k) release dut.rp;
      err_hist[k] = (fault != 0);
      if (clr) begin
        cur = '0;
        n_clr++;
      end else if (en) begin
        n_ops++;
        if (prev_en) n_b2b++;
        if (fault == 0 && full[ACC_W]) n_wrap++;
        cur = (fault == 1) ? inj_sum[ACC_W-1:0] : full[ACC_W-1:0];
      end
      prev_en = en && !clr;
      ref_hist[k] = cur;

      expect_eq("acc", k, acc, cur);
      if (k >= 2) begin
        expect_eq("err (2-cycle latency)", k, ACC_W'(err), ACC_W'(err_hist[k-2]));
        if (err && err_hist[k-2]) begin
          n_err_latency2++;
          if (k - 2 == shadow_fault_at - 1) n_det_shadow++;
          else n_det_main++;
        end
      end
      // the shadow accumulator trails by one edge; after a fault it is
      // expected to disagree until the clear has reached it
      if (k >= 1 && k >= taint_until) begin
        expect_eq("shadow residue", k, ACC_W'(shadow_res % N'(M)), ref_hist[k-1] % ACC_W'(M));
        if (shadow_res == N'(M)) n_ones_zero++;
      end
    end
    need("operations", n_ops);
    need("back-to-back operations", n_b2b);
    need("accumulator wraparounds", n_wrap);
    need("clears", n_clr);
    need("shadow zero as all ones", n_ones_zero);
    need("errors flagged after 2 cycles", n_err_latency2);
    need("main-path faults detected", n_det_main);
    need("shadow faults detected", n_det_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
