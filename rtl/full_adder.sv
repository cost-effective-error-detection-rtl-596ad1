// full_adder: one-bit full adder, the cell the modulo reducer is built from.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational. In the
// reducer each instance takes three bits of one residue column and returns a
// sum bit to the same column and a carry bit to the next column, removing
// one bit from the tree.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
