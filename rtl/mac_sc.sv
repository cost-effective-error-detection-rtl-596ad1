// mac_sc: self-checking multiply-accumulate unit with a Mersenne modulo
// shadow datapath.
//
// Main datapath: acc <= acc + a * b (unsigned W-bit operands, ACC_W-bit
// accumulator that wraps on overflow). Shadow datapath: the N-bit residues
// a' and b' of the operands (mod M = 2^N - 1) are multiplied and added to a
// shadow accumulator residue s, so that s tracks acc mod M. Checker: the
// reducer that sums the new accumulator bits also takes the complement of
// the predicted residue (complement = negation mod M), so a single reducer
// both reduces and subtracts; it stops at 2N carry-save bits and a zero
// comparator built for that form raises the error when the two disagree.
//
// Overflow: the main adder's carry-out c (weight 2^ACC_W) goes into the
// checker reducer, and the shadow accumulator subtracts the residue of
// 2^ACC_W when c is set, so s keeps tracking the wrapped accumulator. The
// accumulator width, unsigned operands, overflow handling and clear input
// are this design's choices; the shadow datapath, the summing reducer,
// negation by complement and the 2N-bit zero comparator follow the document.
//
// Interface and timing: when en is high at a rising clock edge the
// operation is performed and acc updates at that edge; err is registered at
// the same edge and is high for one cycle if that operation's check failed.
// clr (priority over en) zeroes both accumulators. rst_n is an asynchronous,
// active-low reset. shadow_res exposes the shadow accumulator residue.
module mac_sc #(
  parameter int unsigned W     = msd_pkg::MSD_W,
  parameter int unsigned ACC_W = msd_pkg::MSD_ACC_W,
  parameter int unsigned N     = msd_pkg::MSD_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic [ACC_W-1:0] acc,
  output logic [N-1:0]     shadow_res,
  output logic             err
);
  import msd_pkg::*;

  // Checker input: accumulator bits, the carry-out at bit ACC_W, and the
  // complemented prediction starting on a column-0 boundary.
  localparam int unsigned PRED_OFF = round_up(ACC_W + 1, N);
  localparam int unsigned CHK_W    = PRED_OFF + N;
  localparam logic [N-1:0] WRAP_RES = N'(pow2_res(ACC_W, N));

  // ---------------- main datapath ----------------
  logic [2*W-1:0]  prod;
  logic [ACC_W:0]  sum;           // {carry-out, new accumulator}

  always_comb begin
    prod = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    sum  = {1'b0, acc} + (ACC_W+1)'(prod);
  end

  // ---------------- shadow datapath ----------------
  logic [N-1:0] ra, rb, rp, pred, pred_wrap, shadow_next;

  mod_reduce #(.N(N), .WIN(W)) u_red_a (.in(a), .cs_a(), .cs_b(), .res(ra));
  mod_reduce #(.N(N), .WIN(W)) u_red_b (.in(b), .cs_a(), .cs_b(), .res(rb));
  mod_mul    #(.N(N))          u_mul   (.a(ra), .b(rb), .cs_a(), .cs_b(), .p(rp));
  mod_add    #(.N(N))          u_add   (.a(shadow_res), .b(rp), .s(pred));
  mod_sub    #(.N(N))          u_wrap  (.a(pred), .b(WRAP_RES), .d(pred_wrap));

  assign shadow_next = sum[ACC_W] ? pred_wrap : pred;

  // ---------------- checker ----------------
  logic [CHK_W-1:0] chk_in;
  logic [N-1:0]     chk_u, chk_v;
  logic             chk_zero;

  always_comb begin
    chk_in = '0;
    chk_in[ACC_W:0] = sum;
    chk_in[PRED_OFF +: N] = ~pred;
  end

  mod_reduce   #(.N(N), .WIN(CHK_W)) u_red_chk (.in(chk_in), .cs_a(chk_u), .cs_b(chk_v), .res());
  mod_zero_cmp #(.N(N))              u_zero    (.u(chk_u), .v(chk_v), .zero(chk_zero));

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      shadow_res <= '0;
      err        <= 1'b0;
    end else if (clr) begin
      acc        <= '0;
      shadow_res <= '0;
      err        <= 1'b0;
    end else begin
      err <= en & ~chk_zero;
      if (en) begin
        acc        <= sum[ACC_W-1:0];
        shadow_res <= shadow_next;
      end
    end
  end

  // The product always fits the accumulator, so only the adder can overflow.
  initial assert (ACC_W >= 2*W) else $error("mac_sc: ACC_W must be at least 2*W");
endmodule
