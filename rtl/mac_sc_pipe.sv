// mac_sc_pipe: self-checking MAC with a pipelined shadow datapath.
//
// The main datapath is the unmodified single-cycle MAC (acc <= acc + a*b),
// so the clock period stays that of the original MAC. The shadow datapath
// and checker are split over pipeline registers so that they are off the
// critical path; the error signal therefore arrives two cycles after the
// result:
//   stage 1 (edge e0): acc and the carry-out update; the operand residues
//                      a', b' are reduced in parallel and registered.
//   stage 2 (edge e1): s' = s + a'*b' (minus the residue of 2^ACC_W when the
//                      main adder wrapped) is written to the shadow
//                      accumulator; the reducer sums the now-registered acc,
//                      the registered carry and ~s' into 2N carry-save bits,
//                      which are registered.
//   stage 3 (edge e2): the zero comparator's verdict is registered as err.
// The shadow accumulator is held complemented (its flip-flops store ~s),
// folding the negation the checker needs into the register, as the document
// suggests by baking inverters into flip-flops. Operations may be issued
// back to back, one per cycle.
//
// Interface: as mac_sc, except that err, high for one cycle, reports the
// operation issued two clock edges earlier. clr zeroes acc at once and the
// shadow accumulator one edge later, in step with the pipeline. The stage
// split and the clear behaviour are this design's choices.
module mac_sc_pipe #(
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

  localparam int unsigned PRED_OFF = round_up(ACC_W + 1, N);
  localparam int unsigned CHK_W    = PRED_OFF + N;
  localparam logic [N-1:0] WRAP_RES = N'(pow2_res(ACC_W, N));

  // ---------------- main datapath (single cycle) ----------------
  logic [2*W-1:0] prod;
  logic [ACC_W:0] sum;

  always_comb begin
    prod = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    sum  = {1'b0, acc} + (ACC_W+1)'(prod);
  end

  // ---------------- stage 1: operand residues ----------------
  logic [N-1:0] ra, rb;
  logic [N-1:0] ra_q, rb_q;
  logic         c_q, v1_q, clr1_q;

  mod_reduce #(.N(N), .WIN(W)) u_red_a (.in(a), .cs_a(), .cs_b(), .res(ra));
  mod_reduce #(.N(N), .WIN(W)) u_red_b (.in(b), .cs_a(), .cs_b(), .res(rb));

  // ---------------- stage 2: shadow MAC and summing reducer ----------------
  logic [N-1:0] nshadow_q;              // complemented shadow accumulator
  logic [N-1:0] rp, pred, pred_wrap, shadow_next;
  logic [CHK_W-1:0] chk_in;
  logic [N-1:0] chk_u, chk_v;
  logic [N-1:0] chk_u_q, chk_v_q;
  logic         v2_q;

  assign shadow_res = ~nshadow_q;

  mod_mul #(.N(N)) u_mul  (.a(ra_q), .b(rb_q), .cs_a(), .cs_b(), .p(rp));
  mod_add #(.N(N)) u_add  (.a(shadow_res), .b(rp), .s(pred));
  mod_sub #(.N(N)) u_wrap (.a(pred), .b(WRAP_RES), .d(pred_wrap));

  assign shadow_next = c_q ? pred_wrap : pred;

  always_comb begin
    chk_in = '0;
    chk_in[ACC_W-1:0]     = acc;        // holds this operation's result now
    chk_in[ACC_W]         = c_q;
    chk_in[PRED_OFF +: N] = ~pred;
  end

  mod_reduce #(.N(N), .WIN(CHK_W)) u_red_chk (.in(chk_in), .cs_a(chk_u), .cs_b(chk_v), .res());

  // ---------------- stage 3: zero compare ----------------
  logic chk_zero;
  mod_zero_cmp #(.N(N)) u_zero (.u(chk_u_q), .v(chk_v_q), .zero(chk_zero));

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      ra_q      <= '0;
      rb_q      <= '0;
      c_q       <= 1'b0;
      v1_q      <= 1'b0;
      clr1_q    <= 1'b0;
      nshadow_q <= '1;                  // ~0: shadow residue zero
      chk_u_q   <= '0;
      chk_v_q   <= '0;
      v2_q      <= 1'b0;
      err       <= 1'b0;
    end else begin
      // stage 1
      v1_q   <= en & ~clr;
      clr1_q <= clr;
      ra_q   <= ra;
      rb_q   <= rb;
      c_q    <= sum[ACC_W];
      if (clr)     acc <= '0;
      else if (en) acc <= sum[ACC_W-1:0];
      // stage 2
      if (clr1_q)    nshadow_q <= '1;
      else if (v1_q) nshadow_q <= ~shadow_next;
      v2_q    <= v1_q;
      chk_u_q <= chk_u;
      chk_v_q <= chk_v;
      // stage 3
      err <= v2_q & ~chk_zero;
    end
  end

  initial assert (ACC_W >= 2*W) else $error("mac_sc_pipe: ACC_W must be at least 2*W");
endmodule
