// mod_mul: N-bit multiplier modulo M = 2^N - 1.
//
// An array multiplier with a wraparound: partial product j is a & {N{b[j]}}
// shifted left by j, and because 2^N = 1 (mod M) the bits shifted out at the
// top re-enter at the bottom, i.e. the row is rotated left by j. The N rows
// of N bits (N*N bits, each already in its residue column) are then summed
// by the modulo reducer, which yields the carry-save pair and the N-bit
// non-normalized product. Purely combinational.
module mod_mul #(
  parameter int unsigned N = msd_pkg::MSD_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] cs_a,
  output logic [N-1:0] cs_b,
  output logic [N-1:0] p
);
  logic [N*N-1:0] pp;

  // Row j occupies bits [j*N +: N]; a position's index mod N is its column.
  always_comb begin
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(N); i++)
        pp[j*N + (i + j) % N] = a[i] & b[j];
  end

  mod_reduce #(.N(N), .WIN(N*N)) u_red (.in(pp), .cs_a(cs_a), .cs_b(cs_b), .res(p));
endmodule
