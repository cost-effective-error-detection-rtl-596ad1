// tb_msd_top: end-to-end test of the top level with every parameter at its
// default (32-bit operands, 64-bit accumulators, mod 7 shadow datapaths).
//
// Both MACs receive the same random stream of operations, clears and idle
// cycles, one per clock. A reference model keeps the exact accumulator.
// After each edge k: both accumulators must match it; the single-cycle
// unit's shadow residue must equal it mod 7 and its err must report the
// operation of edge k; the pipelined unit's shadow residue must equal the
// reference of edge k-1 mod 7 and its err must report the operation of edge
// k-2. Faults are injected for one cycle into the main adder output of both
// units and, alternately, into the shadow multiplier outputs. Every
// mechanism (wraparound, clear, all-ones zero, back-to-back issue, each
// detection in each unit) is counted and must occur at least once.
module tb_msd_top;
  localparam int unsigned W = msd_pkg::MSD_W, ACC_W = msd_pkg::MSD_ACC_W, N = msd_pkg::MSD_N;
  localparam int unsigned M = (1 << N) - 1;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, clr = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [ACC_W-1:0] s_acc, p_acc;
  logic [N-1:0] s_shadow_res, p_shadow_res;
  logic s_err, p_err;

  msd_top dut (
    .clk, .rst_n,
    .s_en(en), .s_clr(clr), .s_a(a), .s_b(b), .s_acc, .s_shadow_res, .s_err,
    .p_en(en), .p_clr(clr), .p_a(a), .p_b(b), .p_acc, .p_shadow_res, .p_err
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ops = 0, n_wrap = 0, n_clr = 0, n_ones_zero = 0, n_b2b = 0;
  int n_s_det_main = 0, n_s_det_shadow = 0, n_p_det_main = 0, n_p_det_shadow = 0;

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ACC_W-1:0] ref_hist [NCYC+1];
  int               fault_hist [NCYC+1];   // 0 none, 1 main, 2 shadow
  logic [ACC_W:0]   inj_sum;
  logic [N-1:0]     inj_rp_s, inj_rp_p;

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
    end else $display("  %-36s %0d", what, n);
  endtask

  initial begin
    logic [ACC_W-1:0] cur;
    logic [ACC_W:0]   full;
    int cooldown = 0, taint_until = 0, p_shadow_fault_at = -1;
    bit prev_en = 1'b0;
    cur = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      int r, fault;
      @(negedge clk);
      if (p_shadow_fault_at == k) begin
        inj_rp_p = dut.u_mac_pipe.rp ^ N'(1 << ($urandom() % N));
        force dut.u_mac_pipe.rp = inj_rp_p;
      end
      r = int'($urandom() % 100);
      fault = 0;
      en = 1'b0; clr = 1'b0; a = '0; b = '0;
      if (cooldown > 0) begin
        cooldown--;
        if (cooldown == 0) clr = 1'b1;
      end else if (k % 500 == 250) begin
        fault = 1 + (k / 500) % 2;
        en = 1'b1; a = $urandom(); b = $urandom();
        cooldown = 4;
        taint_until = k + 5;
      end else if (r < 2) clr = 1'b1;
      else if (r < 12) en = 1'b0;
      else if (r < 22) begin en = 1'b1; a = W'($urandom() % 16); b = W'($urandom() % 16); end
      else begin en = 1'b1; a = $urandom(); b = $urandom(); end

      full = {1'b0, cur} + (ACC_W+1)'({{W{1'b0}}, a} * {{W{1'b0}}, b});
      if (fault == 1) begin
        inj_sum = full ^ ((ACC_W+1)'(1) << ($urandom() % ACC_W));
        force dut.u_mac.sum = inj_sum;
        force dut.u_mac_pipe.sum = inj_sum;
      end else if (fault == 2) begin
        #1 inj_rp_s = dut.u_mac.rp ^ N'(1 << ($urandom() % N));
        force dut.u_mac.rp = inj_rp_s;
        p_shadow_fault_at = k + 1;
      end

      @(posedge clk);
      #1;
      if (fault == 1) begin
        release dut.u_mac.sum;
        release dut.u_mac_pipe.sum;
      end
      if (fault == 2) release dut.u_mac.rp;
      if (p_shadow_fault_at == k) release dut.u_mac_pipe.rp;
      fault_hist[k] = fault;
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

      expect_eq("s_acc", k, s_acc, cur);
      expect_eq("p_acc", k, p_acc, cur);
      expect_eq("s_err", k, ACC_W'(s_err), ACC_W'(fault != 0));
      if (s_err && fault == 1) n_s_det_main++;
      if (s_err && fault == 2) n_s_det_shadow++;
      if (k >= 2) begin
        expect_eq("p_err (2-cycle latency)", k, ACC_W'(p_err), ACC_W'(fault_hist[k-2] != 0));
        if (p_err && fault_hist[k-2] == 1) n_p_det_main++;
        if (p_err && fault_hist[k-2] == 2) n_p_det_shadow++;
      end
      if (k >= taint_until) begin
        expect_eq("s_shadow_res", k, ACC_W'(s_shadow_res % N'(M)), cur % ACC_W'(M));
        if (s_shadow_res == N'(M)) n_ones_zero++;
        if (k >= 1)
          expect_eq("p_shadow_res", k, ACC_W'(p_shadow_res % N'(M)), ref_hist[k-1] % ACC_W'(M));
      end
    end
    need("operations", n_ops);
    need("back-to-back operations", n_b2b);
    need("accumulator wraparounds", n_wrap);
    need("clears", n_clr);
    need("shadow zero as all ones", n_ones_zero);
    need("single-cycle: main faults detected", n_s_det_main);
    need("single-cycle: shadow faults detected", n_s_det_shadow);
    need("pipelined: main faults detected", n_p_det_main);
    need("pipelined: shadow faults detected", n_p_det_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
