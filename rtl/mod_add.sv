// mod_add: N-bit adder modulo 2^N - 1 (end-around-carry adder).
//
// Since 2^N = 1 (mod 2^N - 1), the carry out of the top bit has the weight of
// bit 0 and is added back in. A gate-level ring of full adders would feed the
// carry-out straight into the carry-in; here the same result is formed
// without a combinational loop: the N-bit sum plus its carry-out. That second
// addition never carries again because a + b <= 2^(N+1) - 2.
//
// The output is not normalized: 0 is returned as either all zeros or all
// ones (the two encodings of zero that the document notes for its adder).
// Purely combinational.
module mod_add #(
  parameter int unsigned N = msd_pkg::MSD_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N:0] raw;
  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    s   = raw[N-1:0] + N'(raw[N]);
  end
endmodule
