// mod_sub: N-bit subtractor modulo 2^N - 1.
//
// In one's-complement residue arithmetic the negation of x is its bitwise
// complement (~x = M - x for M = 2^N - 1), so a - b is the end-around-carry
// sum of a and ~b. Output not normalized (zero may appear as all ones).
// Purely combinational.
module mod_sub #(
  parameter int unsigned N = msd_pkg::MSD_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);
  mod_add #(.N(N)) u_add (.a(a), .b(~b), .s(d));
endmodule
