// mod_zero_cmp: zero test modulo 2^N - 1 of a residue held as two N-bit
// words (the 2N-bit carry-save output of the reducer).
//
// The value is u + v with 0 <= u, v <= M = 2^N - 1, so u + v is in [0, 2M]
// and is zero modulo M exactly when it is 0, M or 2M:
//   0  : u and v both all zeros
//   M  : v is the bitwise complement of u
//   2M : u and v both all ones
// This handles non-normalized inputs without ever finishing the addition,
// which is the point of stopping the reduction at 2N bits. Purely
// combinational.
module mod_zero_cmp #(
  parameter int unsigned N = msd_pkg::MSD_N
) (
  input  logic [N-1:0] u,
  input  logic [N-1:0] v,
  output logic         zero
);
  always_comb begin
    zero = (&(u ^ v)) | ((~|u) & (~|v)) | ((&u) & (&v));
  end
endmodule
