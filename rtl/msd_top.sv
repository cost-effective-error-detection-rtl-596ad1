// msd_top: the two self-checking MAC organisations side by side.
//
// Port group "s" drives the single-cycle self-checking MAC (err reports the
// operation performed at the same clock edge); port group "p" drives the
// pipelined one (err reports the operation issued two edges earlier). Both
// use a W-bit main datapath, an ACC_W-bit accumulator and a modulo 2^N - 1
// shadow datapath built from the reducer, modulo adder, subtractor,
// multiplier and zero comparator. The two units share clock and reset and
// are otherwise independent. Error recovery (restart, flush, rollback) is
// left to the system around the err outputs.
module msd_top #(
  parameter int unsigned W     = msd_pkg::MSD_W,
  parameter int unsigned ACC_W = msd_pkg::MSD_ACC_W,
  parameter int unsigned N     = msd_pkg::MSD_N
) (
  input  logic             clk,
  input  logic             rst_n,
  // single-cycle self-checking MAC
  input  logic             s_en,
  input  logic             s_clr,
  input  logic [W-1:0]     s_a,
  input  logic [W-1:0]     s_b,
  output logic [ACC_W-1:0] s_acc,
  output logic [N-1:0]     s_shadow_res,
  output logic             s_err,
  // pipelined self-checking MAC
  input  logic             p_en,
  input  logic             p_clr,
  input  logic [W-1:0]     p_a,
  input  logic [W-1:0]     p_b,
  output logic [ACC_W-1:0] p_acc,
  output logic [N-1:0]     p_shadow_res,
  output logic             p_err
);
  mac_sc #(.W(W), .ACC_W(ACC_W), .N(N)) u_mac (
    .clk, .rst_n, .en(s_en), .clr(s_clr), .a(s_a), .b(s_b),
    .acc(s_acc), .shadow_res(s_shadow_res), .err(s_err)
  );

  mac_sc_pipe #(.W(W), .ACC_W(ACC_W), .N(N)) u_mac_pipe (
    .clk, .rst_n, .en(p_en), .clr(p_clr), .a(p_a), .b(p_b),
    .acc(p_acc), .shadow_res(p_shadow_res), .err(p_err)
  );
endmodule
