// mac_lane_check: testbench helper that runs one self-checking MAC (the
// single-cycle mac_sc when PIPE = 0, mac_sc_pipe when PIPE = 1) with a
// residue width N through a random operation stream, checks it against a
// reference model and injects one main-adder fault per FAULT_EVERY cycles.
// Checks: acc after every edge, the shadow residue (one edge behind when
// pipelined) mod 2^N - 1, and err at the expected latency (0 or 2 edges).
// It raises done after NCYC cycles and reports its counts on its outputs.
module mac_lane_check #(
  parameter int unsigned N           = 3,
  parameter bit          PIPE        = 1'b0,
  parameter int          NCYC        = 1500,
  parameter int          FAULT_EVERY = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   detected,
  output int   wraps
);
  localparam int unsigned W = 32, ACC_W = 64;
  localparam int unsigned M = (1 << N) - 1;
  localparam int LAT = PIPE ? 2 : 0;

  logic en, clr;
  logic [W-1:0] a, b;
  logic [ACC_W-1:0] acc;
  logic [N-1:0] shadow_res;
  logic err;
  logic [ACC_W:0] inj_sum;

  if (PIPE) begin : g_dut
    mac_sc_pipe #(.W(W), .ACC_W(ACC_W), .N(N)) dut (.clk, .rst_n, .en, .clr, .a, .b, .acc, .shadow_res, .err);
  end else begin : g_dut
    mac_sc #(.W(W), .ACC_W(ACC_W), .N(N)) dut (.clk, .rst_n, .en, .clr, .a, .b, .acc, .shadow_res, .err);
  end

  logic [ACC_W-1:0] ref_hist [NCYC];
  bit               flt_hist [NCYC];

  task automatic expect_eq(string what, int k, logic [ACC_W-1:0] got, logic [ACC_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL N=%0d PIPE=%0d cycle %0d %s got=%h want=%h", N, PIPE, k, what, got, want);
    end
  endtask

  initial begin
    logic [ACC_W-1:0] cur;
    logic [ACC_W:0]   full;
    int cooldown = 0, taint_until = 0;
    checks = 0; failures = 0; detected = 0; wraps = 0; done = 1'b0;
    en = 1'b0; clr = 1'b0; a = '0; b = '0;
    cur = '0;
    @(posedge rst_n);
    for (int k = 0; k < NCYC; k++) begin
      bit fault;
      @(negedge clk);
      fault = 1'b0;
      en = 1'b0; clr = 1'b0; a = '0; b = '0;
      if (cooldown > 0) begin
        cooldown--;
        if (cooldown == 0) clr = 1'b1;
      end else if (k % FAULT_EVERY == FAULT_EVERY / 2) begin
        fault = 1'b1;
        en = 1'b1; a = $urandom(); b = $urandom();
        cooldown = 4;
        taint_until = k + 5;
      end else if ($urandom() % 10 != 0) begin
        en = 1'b1; a = $urandom(); b = $urandom();
      end
      full = {1'b0, cur} + (ACC_W+1)'({{W{1'b0}}, a} * {{W{1'b0}}, b});
      if (fault) begin
        inj_sum = full ^ ((ACC_W+1)'(1) << ($urandom() % ACC_W));
        force g_dut.dut.sum = inj_sum;
      end
      @(posedge clk);
      #1;
      if (fault) release g_dut.dut.sum;
      flt_hist[k] = fault;
      if (clr) cur = '0;
      else if (en) begin
        if (!fault && full[ACC_W]) wraps++;
        cur = fault ? inj_sum[ACC_W-1:0] : full[ACC_W-1:0];
      end
      ref_hist[k] = cur;
      expect_eq("acc", k, acc, cur);
      if (k >= LAT) begin
        expect_eq("err", k, ACC_W'(err), ACC_W'(flt_hist[k-LAT]));
        if (err && flt_hist[k-LAT]) detected++;
      end
      if (k >= taint_until && k >= 1)
        expect_eq("shadow residue", k, ACC_W'(shadow_res % N'(M)),
                  (PIPE ? ref_hist[k-1] : cur) % ACC_W'(M));
    end
    done = 1'b1;
  end
endmodule
